`timescale 1ps/1fs
// tb_not_chain: a 6-NOT chain with a slowed first NOT (18 ps) and 12 ps
// NOTs; checks that tap k switches FIRST + k*TAU after the input and has the
// right polarity, at the nominal and at a faster program code.
module tb_not_chain;
  localparam int NS = 6;
  int checks = 0, failures = 0;
  logic ck = 1'b0;
  logic [2:0] prog = 3'b100;
  logic [NS-1:0] taps;
  realtime t_edge [NS];
  realtime t_in;

  not_chain #(.N_STAGES(NS), .TAU_PS(12.0), .FIRST_PS(18.0)) dut (.ck_in(ck), .prog(prog), .taps(taps));

  for (genvar k = 0; k < NS; k++) begin : g_mon
    always @(posedge taps[k] or negedge taps[k]) t_edge[k] = $realtime;
  end

  task automatic edge_check(real scale);
    ck = ~ck; t_in = $realtime;
    #300;
    for (int k = 0; k < NS; k++) begin
      real exp_d = scale * (18.0 + 12.0 * k);
      checks++;
      if (taps[k] !== ((k % 2 == 0) ? ~ck : ck) ||
          (t_edge[k] - t_in) < exp_d - 0.01 || (t_edge[k] - t_in) > exp_d + 0.01) begin
        failures++;
        $display("FAIL tap %0d val=%b delay=%0.3f exp=%0.3f", k, taps[k], t_edge[k] - t_in, exp_d);
      end
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400;
    edge_check(1.0);
    edge_check(1.0);
    prog = 3'b111;
    #400;
    edge_check(9.4 / 12.0);
    edge_check(9.4 / 12.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
