`timescale 1ps/1fs
// tb_gr_divider: GR is 0 in reset and toggles on every rising CK edge, so it
// rises on every other CK rising edge.
module tb_gr_divider;
  int checks = 0, failures = 0;
  logic ck = 1'b0, rst_n = 1'b1, gr;
  int rises = 0;

  gr_divider dut (.ck(ck), .rst_n(rst_n), .gr(gr));

  always #167 ck = ~ck;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_gr = 1'b0;
    #1 rst_n = 1'b0;
    #500;
    checks++;
    if (gr !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge ck) rst_n = 1'b1;
    for (int c = 0; c < 20; c++) begin
      @(posedge ck); #1;
      exp_gr = ~exp_gr;
      checks++;
      if (gr !== exp_gr) begin failures++; $display("FAIL cycle %0d gr=%b", c, gr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
