`timescale 1ps/1fs
// jitter_meas_top: the two implementations of the clock jitter measurement
// scheme side by side, both observing the same clock under test CK.
//
//  * sa_*  : stand-alone scheme (jitter_meas) with its own two NOT chains of
//            programmable-delay NOTs, 28 taps each, resolution tau/2 = 6 ps.
//  * fub_* : a process-variation FUB whose first two ring oscillators double
//            as the NOT chains (fub_jitter); JT = 0 selects jitter
//            measurement, JT = 1 process-variation measurement.
//
// Each result is a 56-bit thermometer word o_R plus the evaluated jitter in
// fs. A measurement is taken every other CK cycle: Rs clears the previous
// result at a CK rising edge, the snapshot is taken one NOT delay after the
// following falling edge, and it stays valid (vm = 1) until the next Rs,
// about 1.5 CK cycles later. The VM
// outputs are reported as circular logic by lint; the loop through the
// samplers is the intended hold mechanism (see meas_sample).
module jitter_meas_top (
  input  logic                ck,
  // stand-alone scheme
  input  logic                sa_rst_n,
  input  logic [2:0]          sa_prog,
  output logic [55:0]         sa_o_r,
  output logic                sa_vm,
  output logic                sa_rs,
  output logic                sa_gr,
  output logic [5:0]          sa_diff_count,
  output logic                sa_widened,
  output logic signed [31:0]  sa_jitter_fs,
  output logic                sa_thermo_ok,
  // RO-reusing FUB
  input  logic                fub_jt,
  input  logic                fub_tck,
  input  logic                fub_tdi,
  input  logic                fub_reset,
  input  logic                fub_sel,
  output logic                fub_tdo,
  output logic                fub_div_out,
  output logic [15:0]         fub_count,
  output logic [55:0]         fub_o_r,
  output logic                fub_vm,
  output logic                fub_rs,
  output logic                fub_gr,
  output logic [5:0]          fub_diff_count,
  output logic                fub_widened,
  output logic signed [31:0]  fub_jitter_fs,
  output logic                fub_thermo_ok
);
  jitter_meas u_sa (
    .ck(ck), .rst_n(sa_rst_n), .prog(sa_prog), .o_r(sa_o_r), .vm(sa_vm),
    .rs(sa_rs), .gr(sa_gr), .diff_count(sa_diff_count), .widened(sa_widened),
    .jitter_fs(sa_jitter_fs), .thermo_ok(sa_thermo_ok));

  fub_jitter u_fub (
    .ck(ck), .jt(fub_jt), .tck(fub_tck), .tdi(fub_tdi), .reset(fub_reset),
    .sel(fub_sel), .tdo(fub_tdo), .div_out(fub_div_out), .count(fub_count),
    .o_r(fub_o_r), .vm(fub_vm), .rs(fub_rs), .gr(fub_gr),
    .diff_count(fub_diff_count), .widened(fub_widened),
    .jitter_fs(fub_jitter_fs), .thermo_ok(fub_thermo_ok));
endmodule
