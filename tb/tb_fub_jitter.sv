`timescale 1ps/1fs
// tb_fub_jitter: a FUB with three 99-stage ring oscillators, the first two
// re-usable as NOT chains.
//  1. Jitter mode (JT = 0, rings 1 and 2 enabled through the registers):
//     measured words are compared with a model of the driven clock
//     (bit m = complement of CK at t_fall - m*6 ps), jitter with
//     (zeros - 28) * 6 ps, VM timing (one NAND delay after the falling edge).
//  2. PPV mode (JT = 1): each ring, enabled alone and selected, must give
//     div_out with period DIV_N * 2 * (99 + 1) * 12 ps and a counter that
//     counts divided periods.
//  3. Back to jitter mode: measurements are correct again.
// A second FUB with four rings, all four re-used as chains (CK delayed by 0,
// 3, 6 and 9 ps), runs next to it on the same clock: its 112-bit word is
// checked against the same clock model at 3 ps spacing, with a jitter-free
// count of 56, and its rings go through the same PPV checks.
module tb_fub_jitter;
  localparam real LOW_PS = 180.0;
  localparam int  DIVN   = 4;
  int checks = 0, failures = 0;
  int n_meas = 0, n_wide = 0, n_narrow = 0, n_zero = 0, n_ppv = 0, n_switch = 0, n_hold = 0;

  logic ck = 1'b0, jt = 1'b0, tck = 1'b0, tdi = 1'b0, reset = 1'b0;
  logic [1:0] sel = '0;
  logic tdo, div_out, vm, rs, gr, widened, ok;
  logic [15:0] count;
  logic [55:0] o_r;
  logic [5:0] dc;
  logic signed [31:0] jit;

  logic tck4 = 1'b0, tdi4 = 1'b0;
  logic tdo4, div4, vm4, rs4, gr4, wide4, ok4;
  logic [15:0] count4;
  logic [111:0] o_r4;
  logic [6:0] dc4;
  logic signed [31:0] jit4;

  fub_jitter #(.N_CHAINS(4), .Q(4), .REF_ZEROS(56), .DIV_N(DIVN)) dut4 (
    .ck(ck), .jt(jt), .tck(tck4), .tdi(tdi4), .reset(reset), .sel(sel), .tdo(tdo4),
    .div_out(div4), .count(count4), .o_r(o_r4), .vm(vm4), .rs(rs4), .gr(gr4),
    .diff_count(dc4), .widened(wide4), .jitter_fs(jit4), .thermo_ok(ok4));

  fub_jitter #(.Q(3), .DIV_N(DIVN)) dut (
    .ck(ck), .jt(jt), .tck(tck), .tdi(tdi), .reset(reset), .sel(sel), .tdo(tdo),
    .div_out(div_out), .count(count), .o_r(o_r), .vm(vm), .rs(rs), .gr(gr),
    .diff_count(dc), .widened(widened), .jitter_fs(jit), .thermo_ok(ok));

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

  realtime t_vm, t_div, per_div;
  always @(posedge vm) t_vm = $realtime;
  always @(posedge div_out) begin per_div = $realtime - t_div; t_div = $realtime; end
  realtime t_vm4, t_div4, per_div4;
  always @(posedge vm4) t_vm4 = $realtime;
  always @(posedge div4) begin per_div4 = $realtime - t_div4; t_div4 = $realtime; end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic load_regs(logic [2:0] en);   // en[k] enables ring k+1
    for (int k = 2; k >= 0; k--) begin
      tdi = en[k]; #50 tck = 1'b1; #50 tck = 1'b0;
    end
  endtask

  task automatic load_regs4(logic [3:0] en);
    for (int k = 3; k >= 0; k--) begin
      tdi4 = en[k]; #50 tck4 = 1'b1; #50 tck4 = 1'b0;
    end
  endtask

  task automatic measure(real high_ps, real next_high_ps);
    realtime tf;
    logic [55:0] exp_w, keep;
    logic [111:0] exp_w4, keep4;
    int zeros = 0, zeros4 = 0;
    drive_ck(1'b1);
    #3;
    chk(rs && !vm, "Rs clears VM");
    chk(rs4 && !vm4, "4 rings: Rs clears VM");
    #(high_ps - 3.0);
    drive_ck(1'b0); tf = $realtime;
    #(LOW_PS / 2);
    chk(vm, "VM set");
    chk(t_vm - tf > 11.99 && t_vm - tf < 12.01, $sformatf("VM delay %0.3f", t_vm - tf));
    for (int m = 1; m <= 56; m++) begin
      exp_w[m-1] = ~ck_at(tf - m * 6.0);
      if (!exp_w[m-1]) zeros++;
    end
    chk(o_r == exp_w, "word");
    chk(vm4, "4 rings: VM set");
    chk(t_vm4 - tf > 11.99 && t_vm4 - tf < 12.01, $sformatf("4 rings: VM delay %0.3f", t_vm4 - tf));
    for (int m = 1; m <= 112; m++) begin
      exp_w4[m-1] = ~ck_at(tf - m * 3.0);
      if (!exp_w4[m-1]) zeros4++;
    end
    chk(o_r4 == exp_w4, "4 rings: word");
    chk(ok4 && jit4 == (zeros4 - 56) * 3000, $sformatf("4 rings: jitter %0d zeros %0d", jit4, zeros4));
    chk(ok && jit == (zeros - 28) * 6000, $sformatf("jitter %0d zeros %0d", jit, zeros));
    if (zeros > 28) n_wide++; else if (zeros < 28) n_narrow++; else n_zero++;
    n_meas++;
    keep = o_r;
    keep4 = o_r4;
    #(LOW_PS / 2);
    drive_ck(1'b1); #(next_high_ps); drive_ck(1'b0); #(LOW_PS);
    chk(vm && o_r == keep, "hold");
    chk(vm4 && o_r4 == keep4, "4 rings: hold");
    n_hold++;
  endtask

  task automatic jitter_mode();
    reset = 1'b0; #1 reset = 1'b1; jt = 1'b0; #2000;
    reset = 1'b0; #100;
    load_regs(3'b011);
    load_regs4(4'b1111);
    #2000;
    measure(169.0, 160.0);
    measure(176.0, 169.0);
    measure(163.0, 175.0);
    measure(190.0, 169.0);
  endtask

  task automatic ppv_ring(int k);
    realtime exp_per = DIVN * 2.0 * 100.0 * 12.0;
    reset = 1'b0; #1 reset = 1'b1; jt = 1'b1; sel = 2'(k); #3000;
    reset = 1'b0; #100;
    load_regs(3'(1 << k));
    load_regs4(4'(1 << k));
    // bounded wait: a ring that does not oscillate must fail, not hang
    fork
      repeat (3) @(posedge div_out);
      #(4 * exp_per + 5000.0);
    join_any
    disable fork;
    #1;
    chk(per_div > exp_per - 0.01 && per_div < exp_per + 0.01, $sformatf("ring %0d period %0.1f", k + 1, per_div));
    chk(count == 16'd3, $sformatf("ring %0d count %0d", k + 1, count));
    chk(per_div4 > exp_per - 0.01 && per_div4 < exp_per + 0.01, $sformatf("4 rings: ring %0d period %0.1f", k + 1, per_div4));
    n_ppv++;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    jitter_mode();
    for (int k = 0; k < 3; k++) ppv_ring(k);
    n_switch++;
    jitter_mode();
    n_switch++;
    chk(n_wide > 0 && n_narrow > 0 && n_zero > 0, "mechanism: widened, narrowed and jitter-free phases");
    chk(n_ppv == 3, "mechanism: PPV mode on every ring");
    chk(n_switch == 2 && n_hold > 0, "mechanism: mode switches and holds");
    $display("measurements=%0d widened=%0d narrowed=%0d zero=%0d ppv=%0d switches=%0d",
             n_meas, n_wide, n_narrow, n_zero, n_ppv, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
