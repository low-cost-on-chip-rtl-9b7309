`timescale 1ps/1fs
// tb_meas_sample: the sampler is transparent while vm = 0, holds while
// vm = 1 whatever the taps do, and rs clears out_s.
module tb_meas_sample;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic p_s, vm, rs;
  logic [W-1:0] p, out, held;
  logic out_s;

  meas_sample #(.W(W)) dut (.p_s(p_s), .p(p), .vm(vm), .rs(rs), .out_s(out_s), .out(out));

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vm = 0; rs = 0; p_s = 0; p = '0;
    #10;
    for (int it = 0; it < 50; it++) begin
      // transparent
      vm = 0;
      p = W'($urandom); p_s = $urandom_range(0, 1);
      #5;
      chk(out == p && out_s == p_s, "transparent");
      held = p;
      // hold
      p_s = 1'b1; #1;
      vm = 1; #1;
      for (int k = 0; k < 4; k++) begin
        p = W'($urandom); p_s = ~p_s; #3;
        chk(out == held && out_s == 1'b1, "hold");
      end
      // reset clears out_s only
      rs = 1; #2;
      chk(out_s == 1'b0 && out == held, "reset");
      rs = 0; #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
