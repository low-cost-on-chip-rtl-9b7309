`timescale 1ps/1fs
// gr_divider: divide-by-2 of the clock under test, giving GR.
//
// GR has half the CK frequency; its rising edge (on every other CK rising
// edge) triggers the reset pulse Rs, so one CK high phase in two is measured
// and the result stays readable for the rest of the two-cycle window. A
// toggle flip-flop is the simplest divide-by-2; its asynchronous active-low
// reset (this design's choice) fixes the phase of GR.
//
// Interface: ck, rst_n in; gr out, changes on the rising edge of ck.
module gr_divider (
  input  logic ck,
  input  logic rst_n,
  output logic gr
);
  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) gr <= 1'b0;
    else        gr <= ~gr;
  end
endmodule
