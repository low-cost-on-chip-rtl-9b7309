`timescale 1ps/1fs
// tb_fub_scan_reg: serial loading of the enable registers and asynchronous
// reset, against a shift-register reference kept by the testbench.
module tb_fub_scan_reg;
  localparam int Q = 4;
  int checks = 0, failures = 0;
  logic tck = 1'b0, tdi = 1'b0, reset = 1'b0, tdo;
  logic [Q-1:0] r, model;

  fub_scan_reg #(.Q(Q)) dut (.tck(tck), .tdi(tdi), .reset(reset), .r(r), .tdo(tdo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset = 1'b1;
    #10;
    checks++;
    if (r !== '0) begin failures++; $display("FAIL reset"); end
    reset = 1'b0; model = '0;
    for (int c = 0; c < 40; c++) begin
      tdi = 1'($urandom);
      #5 tck = 1'b1; model = {model[Q-2:0], tdi};
      #5 tck = 1'b0;
      checks++;
      if (r !== model || tdo !== model[Q-1]) begin failures++; $display("FAIL shift r=%b exp=%b", r, model); end
      if (c == 20) begin
        reset = 1'b1; #1; model = '0;
        checks++;
        if (r !== '0) begin failures++; $display("FAIL async reset"); end
        reset = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
