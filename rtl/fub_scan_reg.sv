`timescale 1ps/1fs
// fub_scan_reg: the per-oscillator enable registers REG.1 .. REG.q of a FUB.
//
// The registers form a shift chain loaded serially from TDI on the rising
// edge of TCK (test-port style); bit k drives the enable r_(k+1) of ring
// oscillator k+1 (its NAND input). RESET (asynchronous, active high) clears
// all bits, stopping every oscillator. Only the register names and their
// TCK / TDI / RESET inputs are documented; the shift-chain organisation and
// the TDO output are this design's choices.
//
// Interface: tck, tdi, reset in; r[Q-1:0] (r[0] = r1), tdo out.
// After Q TCK edges the first bit shifted in sits in r[Q-1].
module fub_scan_reg #(
  parameter int Q = 2
) (
  input  logic         tck,
  input  logic         tdi,
  input  logic         reset,
  output logic [Q-1:0] r,
  output logic         tdo
);
  always_ff @(posedge tck or posedge reset) begin
    if (reset) r <= '0;
    else       r <= {r[Q-2:0], tdi};
  end

  assign tdo = r[Q-1];
endmodule
