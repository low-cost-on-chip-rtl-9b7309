`timescale 1ps/1fs
// jitter_eval: reads the thermometer word o_R and turns it into a jitter value.
//
// The word is compared bit by bit (W parallel XORs) with the word expected
// for a jitter-free clock, REF_ZEROS zeros followed by ones. The number of
// ones in the XOR result is the difference in high-phase length in units of
// the resolution RES_FS (tau/n). Its sign is not visible in the count: a
// mismatch beyond position REF_ZEROS means extra zeros (a wider high phase,
// positive jitter), one at or before it means fewer zeros (negative jitter).
// thermo_ok flags a word that is not a clean thermometer code (a "bubble").
//
// Interface: o_r[m-1] = o_R(m); outputs combinational. The values are
// meaningful while VM = 1.
module jitter_eval #(
  parameter int W         = jm_pkg::N_CHAINS_DEF * jm_pkg::N_TAPS_DEF,
  parameter int REF_ZEROS = jm_pkg::REF_ZEROS_DEF,
  parameter int RES_FS    = 6000,
  localparam int CW       = $clog2(W + 1)
) (
  input  logic [W-1:0]          o_r,
  output logic [CW-1:0]         diff_count,
  output logic                  widened,
  output logic signed [31:0]    jitter_fs,
  output logic                  thermo_ok
);
  localparam logic [W-1:0] REF_WORD = ~((W'(1) << REF_ZEROS) - W'(1));

  logic [W-1:0] x;
  logic [W-1:0] hi_mask;

  assign x       = o_r ^ REF_WORD;
  assign hi_mask = REF_WORD;          // positions REF_ZEROS+1 .. W

  always_comb begin
    diff_count = '0;
    for (int m = 0; m < W; m++) diff_count = diff_count + CW'(x[m]);
  end

  assign widened   = |(x & hi_mask);
  assign jitter_fs = widened ?  32'(diff_count) * RES_FS
                             : -(32'(diff_count) * RES_FS);

  // Clean thermometer code: once a 1 appears, no 0 follows.
  always_comb begin
    thermo_ok = 1'b1;
    for (int m = 1; m < W; m++)
      if (o_r[m-1] && !o_r[m]) thermo_ok = 1'b0;
  end
endmodule
