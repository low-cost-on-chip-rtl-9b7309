`timescale 1ps/1fs
// fub_jitter: a process-variation monitoring FUB (q ring oscillators with
// enable registers, output multiplexer, divider and counter) in which
// N_CHAINS of the oscillators are re-used as the NOT chains of the jitter
// measurement scheme (behavioural: the oscillators are delay models).
//
// JT selects the mode. JT = 1: the rings are closed and the FUB measures
// process variation as before (enable one ring through the registers, select
// it with sel, read the counter). JT = 0: the multiplexer in front of ring j
// (j = 1..n) passes CK delayed by (j-1)*TD_PS, with TD_PS = tau/n, so the n
// rings become open delay lines offset by tau/n from each other. The NAND of
// ring 1 gives p_s, its NOTs p_11.. p_1N; the NAND of ring j >= 2 gives p_j1,
// its NOTs p_j2.. p_jN. That is the tap pattern of n stand-alone chains, so
// the resolution is tau/n. Only the first N stages are sampled; the rest of
// each ring still toggles. Sampler, output stage, control block and
// evaluation are the same as in the stand-alone scheme. The enable bits of
// the n re-used rings must be 1 in jitter mode.
//
// The default re-uses two rings (CKd = CK + tau/2, resolution 6 ps); four
// re-used rings give 3 ps. Rings n+1..q (if Q > N_CHAINS) keep their
// feedback permanently (JT tied to 1). The register chain, divider and
// counter organisation, the CK delays (j-1)*tau/n and the ring stage count
// (see ro_chain) are this design's choices.
//
// Timing as for jitter_meas: Rs every other CK rising edge, snapshot on the
// falling edge that follows, result held for two CK cycles.
//
// Lint reports VM as circular logic: VM is derived from sampler outputs that
// VM itself freezes. That loop is how the result is held until Rs.
module fub_jitter #(
  parameter int  N_CHAINS  = jm_pkg::N_CHAINS_DEF,
  parameter int  Q         = N_CHAINS,
  parameter int  K         = jm_pkg::K_RO_DEF,
  parameter int  N_TAPS    = jm_pkg::N_TAPS_DEF,
  parameter real TAU_PS    = jm_pkg::TAU_PS_DEF,
  parameter real TD_PS     = TAU_PS / N_CHAINS,
  parameter int  REF_ZEROS = jm_pkg::REF_ZEROS_DEF,
  parameter int  DIV_N     = 8,
  parameter real TF_PS     = 20.0,
  localparam int W         = N_CHAINS * N_TAPS,
  localparam int CW        = $clog2(W + 1),
  localparam int SW        = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                 ck,
  input  logic                 jt,
  input  logic                 tck,
  input  logic                 tdi,
  input  logic                 reset,
  input  logic [SW-1:0]        sel,
  output logic                 tdo,
  output logic                 div_out,
  output logic [15:0]          count,
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

  logic [Q-1:0] r;
  logic [Q-1:0] ro;
  logic [K-1:0] t   [N_CHAINS];   // taps of the re-used rings
  logic [W-1:0] p;
  logic         out_s;
  logic [W-1:0] out;
  logic         vm_n, rs_n;

  fub_scan_reg #(.Q(Q)) u_reg (.tck(tck), .tdi(tdi), .reset(reset), .r(r), .tdo(tdo));

  for (genvar j = 0; j < N_CHAINS; j++) begin : g_chain
    logic cki;   // clock into ring j+1: CK delayed by j*TD_PS (Td)

    if (j == 0) begin : g_ck
      assign cki = ck;
    end else begin : g_td
      always begin
        cki <= #(j * TD_PS) ck;
        @(ck);
      end
    end

    ro_chain #(.K(K), .TAU_PS(TAU_PS), .NAND_PS(TAU_PS), .B_PS(TAU_PS))
      u_ro (.ck_in(cki), .jt(jt), .en(r[j]), .taps(t[j]), .ro_out(ro[j]));

    for (genvar i = 1; i <= N_TAPS; i++) begin : g_tap
      if (j == 0) begin : g_c1
        assign p[jm_pkg::tap_index(1, i, N_CHAINS) - 1] = t[0][i];
      end else begin : g_cj
        assign p[jm_pkg::tap_index(j + 1, i, N_CHAINS) - 1] = t[j][i-1];
      end
    end
  end

  for (genvar k = N_CHAINS; k < Q; k++) begin : g_ro
    logic [K-1:0] tk;
    ro_chain #(.K(K), .TAU_PS(TAU_PS), .NAND_PS(TAU_PS), .B_PS(TAU_PS))
      u_ro (.ck_in(1'b0), .jt(1'b1), .en(r[k]), .taps(tk), .ro_out(ro[k]));
  end

  ppv_counter #(.Q(Q), .DIV_N(DIV_N), .CW(16)) u_cnt (
    .ro(ro), .sel(sel), .reset(reset), .div_out(div_out), .count(count));

  meas_sample #(.W(W)) u_ms (
    .p_s(t[0][0]), .p(p), .vm(vm), .rs(rs), .out_s(out_s), .out(out));

  output_stage #(.N_TAPS(N_TAPS), .N_CHAINS(N_CHAINS)) u_os (.out(out), .o_r(o_r));

  control_block #(.TF_PS(TF_PS)) u_cb (
    .ck(ck), .rst_n(~reset), .out_s(out_s), .out_x(out[N_CHAINS-1]),
    .vm(vm), .vm_n(vm_n), .rs(rs), .rs_n(rs_n), .gr(gr));

  jitter_eval #(.W(W), .REF_ZEROS(REF_ZEROS), .RES_FS(RES_FS)) u_eval (
    .o_r(o_r), .diff_count(diff_count), .widened(widened),
    .jitter_fs(jitter_fs), .thermo_ok(thermo_ok));
endmodule
