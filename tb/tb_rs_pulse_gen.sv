`timescale 1ps/1fs
// tb_rs_pulse_gen: a rising GR edge gives one Rs pulse of TF_PS (20 ps);
// a falling GR edge gives none; Rs' is the complement of Rs.
module tb_rs_pulse_gen;
  int checks = 0, failures = 0;
  logic gr = 1'b0, rs, rs_n;
  realtime t_rise, t_fall;
  int pulses = 0;

  rs_pulse_gen #(.TF_PS(20.0)) dut (.gr(gr), .rs(rs), .rs_n(rs_n));

  always @(posedge rs) begin t_rise = $realtime; pulses++; end
  always @(negedge rs) t_fall = $realtime;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_gr;
    #200;
    for (int c = 0; c < 10; c++) begin
      gr = 1'b1; t_gr = $realtime;
      #5;
      checks++;
      if (rs !== 1'b1 || rs_n !== 1'b0) begin failures++; $display("FAIL no pulse"); end
      #300;
      checks++;
      if (rs !== 1'b0 || (t_rise - t_gr) > 0.01 || (t_fall - t_rise) < 19.99 || (t_fall - t_rise) > 20.01) begin
        failures++; $display("FAIL width %0.3f", t_fall - t_rise);
      end
      gr = 1'b0;
      #300;
    end
    checks++;
    if (pulses != 10) begin failures++; $display("FAIL pulses=%0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
