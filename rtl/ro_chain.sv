`timescale 1ps/1fs
// ro_chain: behavioural model of one ring oscillator of a process-variation
// monitoring FUB, modified so it can also serve as a NOT chain for jitter
// measurement (not synthesizable: the ring is made of delays).
//
// A 2:1 multiplexer M, selected by JT, feeds an enabling NAND N (second input:
// the enable bit r from the FUB register); the NAND drives a chain of NOTs.
// The last NOT drives a buffer B whose output is the ring output and, with
// JT = 1, is fed back through M: the ring oscillates with period
// 2*(NAND_PS + (K-1)*TAU_PS + B_PS) and is measured by the FUB counter. With
// JT = 0, M passes ck_in instead, and the NAND plus NOTs form an open delay
// line whose taps the jitter sampler reads.
//
// Stage count: a ring must invert an odd number of times. This model counts
// the NAND as one of the K inverting stages (NAND + K-1 NOTs), so K = 99 gives
// a working oscillator; this is this design's reading.
//
// Interface: taps[0] = NAND output, taps[k] = output of NOT k; ro_out after B.
module ro_chain #(
  parameter int  K       = jm_pkg::K_RO_DEF,
  parameter real TAU_PS  = jm_pkg::TAU_PS_DEF,
  parameter real NAND_PS = jm_pkg::TAU_PS_DEF,
  parameter real B_PS    = jm_pkg::TAU_PS_DEF
) (
  input  logic         ck_in,
  input  logic         jt,
  input  logic         en,
  output logic [K-1:0] taps,
  output logic         ro_out
);
  logic m_out;

  assign m_out = jt ? ro_out : ck_in;

  // Each stage is evaluated once at time 0 and then on every input edge
  // (transport delay). Start the ring disabled so that it settles to a single
  // travelling edge once enabled.
  always begin
    taps[0] <= #(NAND_PS) ~(m_out & en);
    @(m_out or en);
  end

  for (genvar k = 1; k < K; k++) begin : g_not
    always begin
      taps[k] <= #(TAU_PS) ~taps[k-1];
      @(taps[k-1]);
    end
  end

  always begin
    ro_out <= #(B_PS) taps[K-1];
    @(taps[K-1]);
  end
endmodule
