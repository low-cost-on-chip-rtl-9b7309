`timescale 1ps/1fs
// output_stage (OS): turns the sampled chain taps into a thermometer code.
//
// Consecutive NOTs alternate in polarity, so the sampled word out[1..W] has
// every tap that is in phase with CK inverted relative to the others. The
// output stage buffers each bit and complements those in phase with CK, so
// that o_R[m] = CK'(t_s - (1 + m/n)*tau): a run of 0s (bits that saw the high
// phase) followed by 1s. For a single chain this complements the odd taps;
// for n chains the taps to complement follow from the number of inversions
// of each tap (jm_pkg::tap_in_phase), which this design works out for every
// n rather than reusing the single-chain rule.
//
// Interface: out[m-1] in, o_r[m-1] out, purely combinational.
module output_stage #(
  parameter int N_TAPS   = jm_pkg::N_TAPS_DEF,
  parameter int N_CHAINS = jm_pkg::N_CHAINS_DEF,
  localparam int W       = N_TAPS * N_CHAINS
) (
  input  logic [W-1:0] out,
  output logic [W-1:0] o_r
);
  function automatic logic [W-1:0] inv_mask();
    logic [W-1:0] mk;
    for (int m = 1; m <= W; m++) mk[m-1] = jm_pkg::tap_in_phase(m, N_CHAINS);
    return mk;
  endfunction

  localparam logic [W-1:0] MASK = inv_mask();

  assign o_r = out ^ MASK;
endmodule
