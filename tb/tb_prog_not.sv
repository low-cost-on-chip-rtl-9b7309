`timescale 1ps/1fs
// tb_prog_not: checks the delay and inversion of the programmable NOT for all
// eight program codes, against delays written out here independently
// (nominal 12 ps).
module tb_prog_not;
  int checks = 0, failures = 0;
  logic a = 1'b0;
  logic [2:0] prog = 3'b100;
  logic y;
  realtime t_in, t_out;

  prog_not #(.NOM_PS(12.0)) dut (.a_in(a), .prog(prog), .y(y));

  function automatic real exp_ps(logic [2:0] c);
    real tbl [8] = '{15.5, 15.5, 13.2, 13.2, 12.0, 10.8, 10.1, 9.4};
    return tbl[c];
  endfunction

  always @(posedge y or negedge y) t_out = $realtime;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50;
    for (int c = 0; c < 8; c++) begin
      prog = 3'(c);
      #50;
      for (int e = 0; e < 2; e++) begin
        a = ~a; t_in = $realtime;
        #40;
        checks++;
        if (y !== ~a || (t_out - t_in) < exp_ps(3'(c)) - 0.01 || (t_out - t_in) > exp_ps(3'(c)) + 0.01) begin
          failures++;
          $display("FAIL code=%b y=%b a=%b delay=%0.3f exp=%0.3f", 3'(c), y, a, t_out - t_in, exp_ps(3'(c)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
