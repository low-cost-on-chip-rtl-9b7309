`timescale 1ps/1fs
// control_block (CB): generates the sampling signal VM and the reset pulse
// Rs of the jitter measurement scheme (behavioural, as it contains the
// delay-based Rs pulse generator).
//
// VM rises when the falling CK edge reaches p_s while p_11 is still high
// (vm_gen) and is held by the sampler until Rs. GR, CK divided by two
// (gr_divider), fires an Rs pulse (rs_pulse_gen) on every other CK rising
// edge, so a measurement is taken on one CK high phase and held for reading
// over the following CK cycle.
//
// Interface: ck, rst_n (divider reset); out_s, out_x from the sampler;
// vm, vm_n, rs, rs_n to the sampler; gr brought out for observation.
module control_block #(
  parameter real TF_PS = 20.0
) (
  input  logic ck,
  input  logic rst_n,
  input  logic out_s,
  input  logic out_x,
  output logic vm,
  output logic vm_n,
  output logic rs,
  output logic rs_n,
  output logic gr
);
  vm_gen u_vm (.out_s(out_s), .out_x(out_x), .vm(vm), .vm_n(vm_n));
  gr_divider u_div (.ck(ck), .rst_n(rst_n), .gr(gr));
  rs_pulse_gen #(.TF_PS(TF_PS)) u_rs (.gr(gr), .rs(rs), .rs_n(rs_n));
endmodule
