`timescale 1ps/1fs
// rs_pulse_gen: behavioural model of the reset pulse generator of the control
// block (not synthesizable: the pulse width is a gate delay).
//
// GR and a delayed, inverted copy of it (node A) feed a NAND whose output is
// Rs'; an inverter gives Rs. After a rising edge of GR both NAND inputs are
// 1 until the inverter has switched, so Rs is a positive pulse of width
// TF_PS at every rising edge of GR, i.e. every other CK cycle. The width is
// not specified; 20 ps (about two gate delays) is this design's choice.
//
// Interface: gr in; rs, rs_n out.
module rs_pulse_gen #(
  parameter real TF_PS = 20.0
) (
  input  logic gr,
  output logic rs,
  output logic rs_n
);
  logic a;
  always begin
    a <= #(TF_PS) ~gr;
    @(gr);
  end

  assign rs_n = ~(gr & a);
  assign rs   = ~rs_n;
endmodule
