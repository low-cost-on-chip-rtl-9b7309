`timescale 1ps/1fs
// jitter_meas: stand-alone on-chip clock jitter measurement scheme with
// N_CHAINS out-of-phase NOT chains (behavioural: the chains are delay models).
//
// The clock under test CK drives N_CHAINS delay lines of N_TAPS NOTs. Chain 1
// has one extra NOT in front, whose output p_s marks when the falling CK edge
// has travelled one NOT delay. The first NOT of chain j (j >= 2) is slowed to
// (1 + (j-1)/n)*tau, so the interleaved taps are spaced by tau/n. When the
// falling edge reaches p_s while p_11 is still high, the control block raises
// VM and the sampler freezes all taps: at that moment the taps hold a snapshot
// of the CK high phase that has just ended. The output stage fixes the tap
// polarities, giving a thermometer word o_R with one 0 per tau/n of high
// phase. jitter_eval compares it with the jitter-free word. Sampling one NOT
// after the falling edge (rather than at the chain input) lets supply noise
// on the edge settle before the snapshot.
//
// Timing: every other CK rising edge (GR rising) Rs clears the previous result
// (all o_R go to 1); the following falling edge takes the new snapshot; VM
// stays 1 and the result is readable until the next Rs, two CK cycles later.
//
// Defaults follow the documented design: 2 chains of 28 NOTs of 12 ps
// (resolution 6 ps), jitter-free word of 28 zeros. The NOT delays are trimmed
// together with prog = {A, B, C}.
//
// Lint reports VM as circular logic: VM is derived from sampler outputs that
// VM itself freezes. That loop is how the result is held until Rs.
module jitter_meas #(
  parameter int  N_TAPS    = jm_pkg::N_TAPS_DEF,
  parameter int  N_CHAINS  = jm_pkg::N_CHAINS_DEF,
  parameter real TAU_PS    = jm_pkg::TAU_PS_DEF,
  parameter int  REF_ZEROS = jm_pkg::REF_ZEROS_DEF,
  parameter real TF_PS     = 20.0,
  localparam int W         = N_TAPS * N_CHAINS,
  localparam int CW        = $clog2(W + 1)
) (
  input  logic                 ck,
  input  logic                 rst_n,
  input  logic [2:0]           prog,
  output logic [W-1:0]         o_r,
  output logic                 vm,
  output logic                 rs,
  output logic                 gr,
  output logic [CW-1:0]        diff_count,
  output logic                 widened,
  output logic signed [31:0]   jitter_fs,
  output logic                 thermo_ok
);
  localparam int RES_FS = int'(TAU_PS * 1000.0 / N_CHAINS);

  logic [N_TAPS:0] c1;            // chain 1: c1[0] = p_s, c1[i] = p_1i
  logic [W-1:0]    p;             // interleaved taps, p[m-1] = tap m
  logic            out_s;
  logic [W-1:0]    out;
  logic            vm_n, rs_n;

  not_chain #(.N_STAGES(N_TAPS + 1), .TAU_PS(TAU_PS), .FIRST_PS(TAU_PS))
    u_chain1 (.ck_in(ck), .prog(prog), .taps(c1));

  for (genvar i = 1; i <= N_TAPS; i++) begin : g_c1
    assign p[jm_pkg::tap_index(1, i, N_CHAINS) - 1] = c1[i];
  end

  for (genvar j = 2; j <= N_CHAINS; j++) begin : g_chain
    logic [N_TAPS-1:0] cj;        // cj[i-1] = p_ji
    not_chain #(.N_STAGES(N_TAPS), .TAU_PS(TAU_PS),
                .FIRST_PS(TAU_PS * (1.0 + real'(j - 1) / real'(N_CHAINS))))
      u_chain (.ck_in(ck), .prog(prog), .taps(cj));
    for (genvar i = 1; i <= N_TAPS; i++) begin : g_tap
      assign p[jm_pkg::tap_index(j, i, N_CHAINS) - 1] = cj[i-1];
    end
  end

  meas_sample #(.W(W)) u_ms (
    .p_s(c1[0]), .p(p), .vm(vm), .rs(rs), .out_s(out_s), .out(out));

  output_stage #(.N_TAPS(N_TAPS), .N_CHAINS(N_CHAINS)) u_os (.out(out), .o_r(o_r));

  // out_x is the sampled p_11, interleaved position n.
  control_block #(.TF_PS(TF_PS)) u_cb (
    .ck(ck), .rst_n(rst_n), .out_s(out_s), .out_x(out[N_CHAINS-1]),
    .vm(vm), .vm_n(vm_n), .rs(rs), .rs_n(rs_n), .gr(gr));

  jitter_eval #(.W(W), .REF_ZEROS(REF_ZEROS), .RES_FS(RES_FS)) u_eval (
    .o_r(o_r), .diff_count(diff_count), .widened(widened),
    .jitter_fs(jitter_fs), .thermo_ok(thermo_ok));
endmodule
