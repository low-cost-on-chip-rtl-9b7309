`timescale 1ps/1fs
// tb_control_block: with CK running and the sampler feedback modelled by
// the testbench (out_s held at 1 once VM rises, cleared by Rs), checks that
// Rs pulses once every two CK cycles, at the CK rising edge, and that VM
// rises when out_s and out_x are both 1 and stays up until the next Rs.
module tb_control_block;
  int checks = 0, failures = 0;
  logic ck = 1'b0, rst_n = 1'b1;
  logic out_s = 1'b0, out_x = 1'b0;
  logic vm, vm_n, rs, rs_n, gr;
  int rs_pulses = 0, ck_rises = 0;

  control_block dut (.ck(ck), .rst_n(rst_n), .out_s(out_s), .out_x(out_x),
                     .vm(vm), .vm_n(vm_n), .rs(rs), .rs_n(rs_n), .gr(gr));

  always #167 ck = ~ck;
  always @(posedge ck) if (rst_n) ck_rises++;
  always @(posedge rs) begin
    rs_pulses++;
    checks++;
    if (ck !== 1'b1) begin failures++; $display("FAIL rs not at ck rise"); end
  end
  always @(rs) if (rs) out_s = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    // VM needs both out_s and out_x
    out_s = 1'b1; out_x = 1'b0; #1;
    checks++;
    if (vm !== 1'b0) begin failures++; $display("FAIL vm without out_x"); end
    out_s = 1'b0; out_x = 1'b1; #1;
    checks++;
    if (vm !== 1'b0) begin failures++; $display("FAIL vm without out_s"); end
    out_x = 1'b0;
    @(negedge ck) rst_n = 1'b1;
    for (int c = 0; c < 12; c++) begin
      @(negedge ck);
      // sampling window: out_s rises one NOT delay after the falling edge
      #12 out_s = 1'b1; out_x = 1'b1;
      #1;
      checks++;
      if (vm !== 1'b1 || vm_n !== 1'b0) begin failures++; $display("FAIL vm not set"); end
      #11 out_x = 1'b1;   // held by the sampler
      @(posedge ck); #30;
      checks++;
      // after a reset cycle vm must have dropped, otherwise still high
      if (vm !== (gr ? 1'b0 : 1'b1)) begin failures++; $display("FAIL vm hold/reset gr=%b vm=%b", gr, vm); end
      out_x = 1'b0;
    end
    checks++;
    if (rs_pulses != (ck_rises + 1) / 2) begin failures++; $display("FAIL rs=%0d rises=%0d", rs_pulses, ck_rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
