`timescale 1ps/1fs
// tb_output_stage: the output stage must complement exactly the bits that
// are in phase with CK. The reference builds each chain tap by tap (chain 1
// starts with the extra p_s NOT) and places it at its delay-ordered position,
// for 1, 2 and 3 chains.
module tb_output_stage;
  localparam int N = 28;
  int checks = 0, failures = 0;
  logic [N-1:0]   in1, out1;
  logic [2*N-1:0] in2, out2;
  logic [3*N-1:0] in3, out3;

  output_stage #(.N_TAPS(N), .N_CHAINS(1)) dut1 (.out(in1), .o_r(out1));
  output_stage #(.N_TAPS(N), .N_CHAINS(2)) dut2 (.out(in2), .o_r(out2));
  output_stage #(.N_TAPS(N), .N_CHAINS(3)) dut3 (.out(in3), .o_r(out3));

  // Reference mask: order taps by delay (in units of tau/n) and mark those
  // reached through an even number of NOTs.
  function automatic logic [3*N-1:0] ref_mask(int n);
    logic [3*N-1:0] mk = '0;
    for (int j = 1; j <= n; j++)
      for (int i = 1; i <= N; i++) begin
        int delay_units = (j == 1) ? (i + 1) * n : i * n + (j - 1); // delay*n/tau
        int pos = delay_units - n;                                  // 1-based
        int nots = (j == 1) ? i + 1 : i;
        mk[pos-1] = (nots % 2 == 0);
      end
    return mk;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3*N-1:0] m1, m2, m3;
    m1 = ref_mask(1); m2 = ref_mask(2); m3 = ref_mask(3);
    for (int it = 0; it < 40; it++) begin
      in1 = N'($urandom); in2 = {$urandom, $urandom}; in3 = {$urandom, $urandom, $urandom};
      #1;
      checks++;
      if (out1 != (in1 ^ m1[N-1:0])) begin failures++; $display("FAIL n=1"); end
      checks++;
      if (out2 != (in2 ^ m2[2*N-1:0])) begin failures++; $display("FAIL n=2"); end
      checks++;
      if (out3 != (in3 ^ m3)) begin failures++; $display("FAIL n=3"); end
    end
    // single chain: exactly the odd taps are complemented
    checks++;
    if (m1[N-1:0] != {(N/2){2'b01}}) begin failures++; $display("FAIL odd rule"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
