`timescale 1ps/1fs
// tb_ro_chain: a 7-stage ring (NAND + 6 NOTs, 12 ps each, 12 ps buffer).
// JT = 1, enabled: it oscillates with period 2*(7*12 + 12) = 192 ps.
// Disabled: it stops. JT = 0: the stages form a delay line, tap k switching
// (k+1)*12 ps after the input with alternating polarity.
module tb_ro_chain;
  localparam int K = 7;
  int checks = 0, failures = 0;
  logic ck = 1'b0, jt = 1'b1, en = 1'b0;
  logic [K-1:0] taps;
  logic ro_out;
  realtime t_last, per;
  int edges = 0;
  realtime t_tap [K];
  realtime t_in;

  ro_chain #(.K(K), .TAU_PS(12.0), .NAND_PS(12.0), .B_PS(12.0)) dut (
    .ck_in(ck), .jt(jt), .en(en), .taps(taps), .ro_out(ro_out));

  always @(posedge ro_out) begin
    per = $realtime - t_last; t_last = $realtime; edges++;
  end
  for (genvar k = 0; k < K; k++) begin : g_m
    always @(posedge taps[k] or negedge taps[k]) t_tap[k] = $realtime;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    en = 1'b1;
    #3000;
    checks++;
    if (per < 191.99 || per > 192.01) begin failures++; $display("FAIL period %0.3f", per); end
    en = 1'b0;
    #1000;
    edges = 0;
    #1000;
    checks++;
    if (edges != 0) begin failures++; $display("FAIL still oscillating"); end
    jt = 1'b0; en = 1'b1;
    #500;
    for (int e = 0; e < 4; e++) begin
      ck = ~ck; t_in = $realtime;
      #300;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (taps[k] !== ((k % 2 == 0) ? ~ck : ck) ||
            (t_tap[k] - t_in) < 12.0 * (k + 1) - 0.01 || (t_tap[k] - t_in) > 12.0 * (k + 1) + 0.01) begin
          failures++; $display("FAIL tap %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
