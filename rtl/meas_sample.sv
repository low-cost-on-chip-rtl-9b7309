`timescale 1ps/1fs
// meas_sample (MS): the sampling stage of the jitter measurement scheme.
//
// Every chain tap reaches its output through a transfer gate driven by VM and
// VM'. While VM = 0 the gates conduct and the outputs follow the taps; when VM
// rises the gates open and the outputs keep the last values on their
// (dynamic) storage nodes until the next reset. Here each transfer gate plus
// storage node is a level-sensitive latch that is transparent while vm = 0.
//
// The reset pulse Rs clears the out_s node. Because the control block derives
// VM from out_s, this drops VM and makes all gates conduct again, ready for
// the next measurement. Which node Rs acts on is this design's choice; the
// effect (VM falls, the outputs follow the taps again) is the documented one.
//
// Interface: p_s / p are the chain taps (p[m-1] = tap of interleaved index m),
// out_s / out their sampled copies. Timing: sampling is the instant vm rises;
// nothing is clocked. The latches are intended (they are the storage nodes),
// and the loop out_s -> VM -> latch enable through the control block is the
// hold mechanism, so lint reports it as a combinational loop by design.
module meas_sample #(
  parameter int W = jm_pkg::N_CHAINS_DEF * jm_pkg::N_TAPS_DEF
) (
  input  logic         p_s,
  input  logic [W-1:0] p,
  input  logic         vm,
  input  logic         rs,
  output logic         out_s,
  output logic [W-1:0] out
);
  always_latch begin
    if (rs)       out_s = 1'b0;
    else if (!vm) out_s = p_s;
  end

  always_latch begin
    if (!vm) out = p;
  end
endmodule
