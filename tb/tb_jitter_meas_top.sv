`timescale 1ps/1fs
// tb_jitter_meas_top: end-to-end test of the top level at its default
// parameters (two chains of 28 NOTs, tau = 12 ps, rings of 99 stages).
// Both implementations watch the same clock:
//  * jitter-free, widened and narrowed high phases, including the documented
//    operating point (high phase of 169 ps -> 28 zeros, 0 ps; +7 ps -> 29
//    zeros, measured as 6 ps), with words checked against a model of the
//    driven clock (bit m = complement of CK at t_fall - m*6 ps);
//  * results held over the unmeasured cycle, cleared by Rs;
//  * programmed NOT delay on the stand-alone scheme;
//  * PPV mode of the FUB (JT = 1): ring period 2*(99+1)*12 ps through the
//    divide-by-8 and counter, and the switch back to jitter mode.
module tb_jitter_meas_top;
  localparam real LOW_PS = 180.0;
  int checks = 0, failures = 0;
  int n_meas = 0, n_wide = 0, n_narrow = 0, n_zero = 0, n_hold = 0, n_reset = 0, n_trim = 0,
      n_ppv = 0, n_switch = 0;

  logic ck = 1'b0, sa_rst_n = 1'b1;
  logic [2:0] sa_prog = 3'b100;
  logic [55:0] sa_o_r, fub_o_r;
  logic sa_vm, sa_rs, sa_gr, sa_widened, sa_ok;
  logic [5:0] sa_dc, fub_dc;
  logic signed [31:0] sa_jit, fub_jit;
  logic fub_jt = 1'b0, fub_tck = 1'b0, fub_tdi = 1'b0, fub_reset = 1'b0, fub_sel = 1'b0;
  logic fub_tdo, fub_div_out, fub_vm, fub_rs, fub_gr, fub_widened, fub_ok;
  logic [15:0] fub_count;

  jitter_meas_top dut (
    .ck(ck), .sa_rst_n(sa_rst_n), .sa_prog(sa_prog), .sa_o_r(sa_o_r), .sa_vm(sa_vm),
    .sa_rs(sa_rs), .sa_gr(sa_gr), .sa_diff_count(sa_dc), .sa_widened(sa_widened),
    .sa_jitter_fs(sa_jit), .sa_thermo_ok(sa_ok),
    .fub_jt(fub_jt), .fub_tck(fub_tck), .fub_tdi(fub_tdi), .fub_reset(fub_reset),
    .fub_sel(fub_sel), .fub_tdo(fub_tdo), .fub_div_out(fub_div_out), .fub_count(fub_count),
    .fub_o_r(fub_o_r), .fub_vm(fub_vm), .fub_rs(fub_rs), .fub_gr(fub_gr),
    .fub_diff_count(fub_dc), .fub_widened(fub_widened), .fub_jitter_fs(fub_jit),
    .fub_thermo_ok(fub_ok));

  realtime edge_t[$];
  logic    edge_v[$];
  task automatic drive_ck(logic v);
    ck = v; edge_t.push_back($realtime); edge_v.push_back(v);
  endtask
  function automatic logic ck_at(realtime t);
    for (int k = edge_t.size() - 1; k >= 0; k--)
      if (edge_t[k] <= t) return edge_v[k];
    return 1'b0;
  endfunction
  function automatic real tau_of(logic [2:0] c);
    real tbl [8] = '{15.5, 15.5, 13.2, 13.2, 12.0, 10.8, 10.1, 9.4};
    return tbl[c];
  endfunction

  realtime t_sa_vm, t_fub_vm, t_div, per_div;
  always @(posedge sa_vm) t_sa_vm = $realtime;
  always @(posedge fub_vm) t_fub_vm = $realtime;
  always @(posedge fub_div_out) begin per_div = $realtime - t_div; t_div = $realtime; end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic load_regs(logic [1:0] en);   // en[k] enables ring k+1
    for (int k = 1; k >= 0; k--) begin
      fub_tdi = en[k]; #50 fub_tck = 1'b1; #50 fub_tck = 1'b0;
    end
  endtask

  function automatic logic [55:0] model_word(realtime tf, real tau, output int zeros);
    logic [55:0] w;
    zeros = 0;
    for (int m = 1; m <= 56; m++) begin
      w[m-1] = ~ck_at(tf - m * tau / 2.0);
      if (!w[m-1]) zeros++;
    end
    return w;
  endfunction

  // fub_on: the FUB is in jitter mode and takes part in this measurement.
  task automatic measure(real high_ps, real next_high_ps, bit fub_on, int exp_zeros);
    realtime tf;
    logic [55:0] w, keep;
    int zeros, zf;
    real tau = tau_of(sa_prog);
    drive_ck(1'b1);
    #3;
    chk(sa_rs && !sa_vm && &sa_o_r[27:0], "SA: Rs clears VM and word");
    if (fub_on) chk(fub_rs && !fub_vm && &fub_o_r[27:0], "FUB: Rs clears VM and word");
    n_reset++;
    #(high_ps - 3.0);
    drive_ck(1'b0); tf = $realtime;
    #(LOW_PS / 2);
    w = model_word(tf, tau, zeros);
    chk(sa_vm && t_sa_vm - tf > tau - 0.01 && t_sa_vm - tf < tau + 0.01, "SA: VM one NOT after falling edge");
    chk(sa_o_r == w && sa_ok && sa_jit == (zeros - 28) * 6000, $sformatf("SA: word/jitter %0d zeros %0d", sa_jit, zeros));
    if (exp_zeros >= 0) chk(zeros == exp_zeros, $sformatf("documented operating point: %0d zeros", zeros));
    if (sa_prog != 3'b100) n_trim++;
    if (fub_on) begin
      w = model_word(tf, 12.0, zf);
      chk(fub_vm && t_fub_vm - tf > 11.99 && t_fub_vm - tf < 12.01, "FUB: VM timing");
      chk(fub_o_r == w && fub_ok && fub_jit == (zf - 28) * 6000, $sformatf("FUB: word/jitter %0d", fub_jit));
    end
    if (sa_prog == 3'b100) begin
      if (zeros > 28) n_wide++; else if (zeros < 28) n_narrow++; else n_zero++;
    end
    n_meas++;
    keep = sa_o_r;
    #(LOW_PS / 2);
    drive_ck(1'b1); #(next_high_ps); drive_ck(1'b0); #(LOW_PS);
    chk(sa_vm && sa_o_r == keep, "SA: hold over unmeasured cycle");
    n_hold++;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // both implementations in jitter mode, GR phases aligned
    #1 sa_rst_n = 1'b0; fub_reset = 1'b1;
    #1000;
    fub_reset = 1'b0;
    load_regs(2'b11);
    #2000;
    sa_rst_n = 1'b1;
    fub_reset = 1'b1; #1 fub_reset = 1'b0;   // clears the FUB registers ...
    load_regs(2'b11);                       // ... reload, CK is idle meanwhile
    #100;
    measure(169.0, 160.0, 1, 28);   // J = 0
    measure(176.0, 169.0, 1, 29);   // J = +7 ps, measured as +6 ps
    measure(163.0, 175.0, 1, -1);
    measure(185.0, 169.0, 1, -1);
    sa_prog = 3'b110; #1000;
    measure(169.0, 169.0, 1, -1);
    sa_prog = 3'b100; #1000;

    // FUB to PPV mode: rings alone, CK idle
    for (int k = 0; k < 2; k++) begin
      realtime exp_per = 8 * 2.0 * 100.0 * 12.0;
      fub_reset = 1'b0; #1 fub_reset = 1'b1; fub_jt = 1'b1; fub_sel = 1'(k); #3000;
      fub_reset = 1'b0; #100;
      load_regs(2'(1 << k));
      // bounded wait: a ring that does not oscillate must fail, not hang
      fork
        repeat (2) @(posedge fub_div_out);
        #(3 * exp_per + 5000.0);
      join_any
      disable fork;
      #1;
      chk(per_div > exp_per - 0.01 && per_div < exp_per + 0.01, $sformatf("ring %0d period %0.1f", k + 1, per_div));
      chk(fub_count == 16'd2, $sformatf("ring %0d count %0d", k + 1, fub_count));
      n_ppv++;
    end
    n_switch++;

    // back to jitter mode; realign the FUB's GR with the stand-alone scheme
    fub_reset = 1'b0; #1 fub_reset = 1'b1; fub_jt = 1'b0; #3000;
    fub_reset = 1'b0;
    load_regs(2'b11);
    #2000;
    if (sa_gr) begin
      drive_ck(1'b1); #169; drive_ck(1'b0); #180;
    end
    measure(170.0, 169.0, 1, -1);
    measure(158.0, 169.0, 1, -1);
    n_switch++;

    chk(n_zero > 0, "mechanism: jitter-free phase");
    chk(n_wide > 0, "mechanism: widened phase");
    chk(n_narrow > 0, "mechanism: narrowed phase");
    chk(n_hold > 0 && n_reset > 0, "mechanism: hold and Rs reset");
    chk(n_trim > 0, "mechanism: programmed NOT delay");
    chk(n_ppv == 2 && n_switch == 2, "mechanism: PPV mode and mode switches");
    $display("measurements=%0d widened=%0d narrowed=%0d zero=%0d holds=%0d resets=%0d trimmed=%0d ppv=%0d switches=%0d",
             n_meas, n_wide, n_narrow, n_zero, n_hold, n_reset, n_trim, n_ppv, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
