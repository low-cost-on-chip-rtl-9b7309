`timescale 1ps/1fs
// tb_jitter_meas: end-to-end test of the stand-alone scheme with 1, 2 and 4
// NOT chains of 28 NOTs (resolution 12, 6 and 3 ps), all fed by the same CK.
//
// The reference is a model of the clock alone: the testbench records every
// CK edge it drives, and predicts bit m of the thermometer word as the
// complement of CK at t_fall - m*tau/n, where t_fall is the falling edge that
// ends the measured high phase and tau the (programmed) NOT delay. The
// jitter is expected as (zeros - zeros_ref) * tau_nominal/n. Also checked:
// VM rises one NOT delay after the falling edge; a result is held through
// the following (unmeasured) cycle; Rs on every other rising edge clears VM
// and the low part of the word. The CK low phase is 180 ps so that the chains
// (28*12 = 336 ps) never reach back into an earlier high phase at nominal delay.
module tb_jitter_meas;
  localparam real LOW_PS = 180.0;
  int checks = 0, failures = 0;
  int n_meas = 0, n_wide = 0, n_narrow = 0, n_zero = 0, n_hold = 0, n_reset = 0, n_trim = 0, n_bubble = 0;

  logic ck = 1'b0, rst_n = 1'b1;
  logic [2:0] prog = 3'b100;

  logic [27:0]  o1;  logic vm1, rs1, gr1, w1, ok1;  logic [4:0] dc1; logic signed [31:0] j1;
  logic [55:0]  o2;  logic vm2, rs2, gr2, w2, ok2;  logic [5:0] dc2; logic signed [31:0] j2;
  logic [111:0] o4;  logic vm4, rs4, gr4, w4, ok4;  logic [6:0] dc4; logic signed [31:0] j4;

  jitter_meas #(.N_CHAINS(1), .REF_ZEROS(14)) d1 (.ck(ck), .rst_n(rst_n), .prog(prog), .o_r(o1), .vm(vm1),
    .rs(rs1), .gr(gr1), .diff_count(dc1), .widened(w1), .jitter_fs(j1), .thermo_ok(ok1));
  jitter_meas d2 (.ck(ck), .rst_n(rst_n), .prog(prog), .o_r(o2), .vm(vm2),
    .rs(rs2), .gr(gr2), .diff_count(dc2), .widened(w2), .jitter_fs(j2), .thermo_ok(ok2));
  jitter_meas #(.N_CHAINS(4), .REF_ZEROS(56)) d4 (.ck(ck), .rst_n(rst_n), .prog(prog), .o_r(o4), .vm(vm4),
    .rs(rs4), .gr(gr4), .diff_count(dc4), .widened(w4), .jitter_fs(j4), .thermo_ok(ok4));

  // ---- clock model -------------------------------------------------------
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

  realtime t_vm;
  always @(posedge vm2) t_vm = $realtime;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // Compare one DUT's word with the model and evaluate the jitter check.
  task automatic check_word(int n, int refz, logic [111:0] got, logic ok, logic signed [31:0] jit,
                            realtime tf, real tau);
    logic [111:0] exp_w = '0;
    int w = 28 * n, zeros = 0;
    logic thermo = 1'b1;
    for (int m = 1; m <= w; m++) begin
      exp_w[m-1] = ~ck_at(tf - m * tau / n);
      if (!exp_w[m-1]) zeros++;
      if (m > 1 && exp_w[m-2] && !exp_w[m-1]) thermo = 1'b0;
    end
    chk(got == exp_w, $sformatf("word n=%0d", n));
    chk(ok == thermo, $sformatf("thermo flag n=%0d", n));
    if (thermo) chk(jit == (zeros - refz) * int'(12000.0 / n), $sformatf("jitter n=%0d got %0d zeros %0d", n, jit, zeros));
    else if (n == 2) n_bubble++;
    if (n == 2 && thermo) begin
      if (zeros > refz) n_wide++; else if (zeros < refz) n_narrow++; else n_zero++;
    end
  endtask

  // One measured CK cycle (starts with Rs) followed by one unmeasured cycle.
  task automatic measure(real high_ps, real next_high_ps);
    realtime tf;
    logic [55:0] keep;
    real tau = tau_of(prog);
    drive_ck(1'b1);
    #3;
    chk(rs2 && gr2, "Rs at rising edge");
    chk(!vm1 && !vm2 && !vm4, "VM cleared by Rs");
    chk(&o2[27:0] && &o1[13:0] && &o4[55:0], "word cleared by Rs");
    n_reset++;
    #(high_ps - 3.0);
    drive_ck(1'b0); tf = $realtime;
    #(LOW_PS / 2);
    chk(vm1 && vm2 && vm4, "VM set after falling edge");
    chk(t_vm - tf > tau - 0.01 && t_vm - tf < tau + 0.01, $sformatf("VM delay %0.3f", t_vm - tf));
    check_word(1, 14, 112'(o1), ok1, j1, tf, tau);
    check_word(2, 28, 112'(o2), ok2, j2, tf, tau);
    check_word(4, 56, o4, ok4, j4, tf, tau);
    n_meas++;
    if (prog != 3'b100) n_trim++;
    keep = o2;
    #(LOW_PS / 2);
    drive_ck(1'b1); #(next_high_ps); drive_ck(1'b0); #(LOW_PS);
    chk(vm2 && o2 == keep && !rs2, "result held over the unmeasured cycle");
    n_hold++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // settle the chains with CK low, then release the divider
    #1 rst_n = 1'b0;
    #1000;
    rst_n = 1'b1;
    #100;
    // nominal operating point: 28 zeros without jitter, 29 with +7 ps
    measure(169.0, 150.0);
    measure(176.0, 190.0);
    measure(163.0, 169.0);
    measure(182.0, 160.0);
    measure(173.0, 169.0);
    measure(167.0, 169.0);
    // trimmed NOT delays: faster and slower settings
    prog = 3'b111; #1000;
    measure(169.0, 169.0);
    measure(181.0, 169.0);
    prog = 3'b001; #1000;
    measure(169.0, 169.0);
    prog = 3'b100; #1000;
    measure(169.0, 169.0);

    chk(n_wide > 0,   "mechanism: widened high phase measured");
    chk(n_narrow > 0, "mechanism: narrowed high phase measured");
    chk(n_zero > 0,   "mechanism: jitter-free phase measured");
    chk(n_hold > 0,   "mechanism: hold over unmeasured cycle");
    chk(n_reset > 0,  "mechanism: Rs reset");
    chk(n_trim > 0,   "mechanism: programmed NOT delay");
    $display("measurements=%0d widened=%0d narrowed=%0d zero=%0d holds=%0d resets=%0d trimmed=%0d bubbles=%0d",
             n_meas, n_wide, n_narrow, n_zero, n_hold, n_reset, n_trim, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
