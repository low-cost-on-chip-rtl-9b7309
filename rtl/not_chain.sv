`timescale 1ps/1fs
// not_chain: behavioural model of one delay line ("NOT chain") built from
// programmable-delay inverters (not synthesizable: the delay is the point).
//
// The clock under test enters the first NOT; every NOT output is a tap. All
// NOTs have the nominal delay TAU_PS except the first, whose delay FIRST_PS
// sets the phase of the whole chain: chain j of an n-chain scheme uses
// FIRST_PS = (1 + (j-1)/n) * TAU_PS, so the taps of the n chains interleave
// with a spacing of TAU_PS/n. Chain 1 has one NOT more than the others; its
// first tap is the sampling reference p_s.
//
// Interface: ck_in is the clock; taps[k] is the output of NOT k+1, delayed by
// FIRST_PS + k*TAU_PS and inverted k+1 times. prog = {A, B, C} trims all NOTs
// of the chain together.
module not_chain #(
  parameter int  N_STAGES = jm_pkg::N_TAPS_DEF,
  parameter real TAU_PS   = jm_pkg::TAU_PS_DEF,
  parameter real FIRST_PS = jm_pkg::TAU_PS_DEF
) (
  input  logic                ck_in,
  input  logic [2:0]          prog,
  output logic [N_STAGES-1:0] taps
);
  prog_not #(.NOM_PS(FIRST_PS)) u_first (.a_in(ck_in), .prog(prog), .y(taps[0]));

  for (genvar k = 1; k < N_STAGES; k++) begin : g_stage
    prog_not #(.NOM_PS(TAU_PS)) u_not (.a_in(taps[k-1]), .prog(prog), .y(taps[k]));
  end
endmodule
