`timescale 1ps/1fs
// vm_gen: the part of the control block that produces the sampling signal VM
// and its complement VM'.
//
// A NAND of out_s and out_x is 0 only in the short window (one NOT delay)
// after the falling CK edge has reached p_s while the tap p_11 still shows
// the high phase: that is the sampling instant t_s = D_high + tau. The NAND
// output is VM'; an inverter gives VM. Since out_s and out_x are outputs of the
// sampler, they are frozen at 1 as soon as VM rises, so VM stays 1 until Rs
// clears out_s. (In silicon a transfer gate balances the delay of VM' against
// the inverter; here both are ideal.)
//
// Interface: out_s, out_x in; vm, vm_n out; combinational. The loop
// out_s -> vm -> sampler -> out_s is the intended hold mechanism.
module vm_gen (
  input  logic out_s,
  input  logic out_x,
  output logic vm,
  output logic vm_n
);
  assign vm_n = ~(out_s & out_x);
  assign vm   = ~vm_n;
endmodule
