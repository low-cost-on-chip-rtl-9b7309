`timescale 1ps/1fs
// tb_ppv_counter: two free-running test oscillators of different period;
// the selected one, divided by 8, must clock the counter: after M periods of
// the selected oscillator the count is M/8 and div_out has period 8*T.
module tb_ppv_counter;
  int checks = 0, failures = 0;
  logic [1:0] ro = 2'b00;
  logic sel = 1'b0, reset = 1'b0, div_out;
  logic [15:0] count;
  realtime t_div, per_div;

  ppv_counter #(.Q(2), .DIV_N(8), .CW(16)) dut (
    .ro(ro), .sel(sel), .reset(reset), .div_out(div_out), .count(count));

  always #100 ro[0] = ~ro[0];   // period 200
  always #130 ro[1] = ~ro[1];   // period 260
  always @(posedge div_out) begin per_div = $realtime - t_div; t_div = $realtime; end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      realtime tp;
      tp = (s == 0) ? 200.0 : 260.0;
      sel = 1'(s);
      reset = 1'b0; #1 reset = 1'b1;
      @(negedge ro[s]); reset = 1'b0;
      repeat (80) @(posedge ro[s]);
      #1;
      checks++;
      if (count != 16'd10) begin failures++; $display("FAIL sel=%0d count=%0d", s, count); end
      checks++;
      if (per_div < 8 * tp - 0.01 || per_div > 8 * tp + 0.01) begin failures++; $display("FAIL div period %0.1f", per_div); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
