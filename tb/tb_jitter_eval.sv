`timescale 1ps/1fs
// tb_jitter_eval: thermometer words with 0..56 zeros give the signed jitter
// (zeros - 28) * 6 ps and the mismatch count |zeros - 28|; words with a
// bubble are flagged.
module tb_jitter_eval;
  localparam int W = 56;
  int checks = 0, failures = 0;
  logic [W-1:0] o_r;
  logic [5:0] diff;
  logic widened, ok;
  logic signed [31:0] jit;

  jitter_eval #(.W(W), .REF_ZEROS(28), .RES_FS(6000)) dut (
    .o_r(o_r), .diff_count(diff), .widened(widened), .jitter_fs(jit), .thermo_ok(ok));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int z = 0; z <= W; z++) begin
      o_r = '1;
      for (int m = 0; m < z; m++) o_r[m] = 1'b0;
      #1;
      checks++;
      if (jit != (z - 28) * 6000 || int'(diff) != ((z > 28) ? z - 28 : 28 - z) || !ok ||
          widened != (z > 28)) begin
        failures++; $display("FAIL z=%0d jit=%0d diff=%0d ok=%b", z, jit, diff, ok);
      end
    end
    for (int it = 0; it < 30; it++) begin
      int z = $urandom_range(2, W - 2);
      int b = $urandom_range(0, z - 2);
      o_r = '1;
      for (int m = 0; m < z; m++) o_r[m] = 1'b0;
      o_r[b] = 1'b1;   // bubble inside the zeros
      #1;
      checks++;
      if (ok) begin failures++; $display("FAIL bubble not flagged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
