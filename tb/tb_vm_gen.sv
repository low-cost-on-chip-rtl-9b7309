`timescale 1ps/1fs
// tb_vm_gen: VM is 1 only when out_s and out_x are both 1; VM' is its
// complement.
module tb_vm_gen;
  int checks = 0, failures = 0;
  logic s, x, vm, vm_n;

  vm_gen dut (.out_s(s), .out_x(x), .vm(vm), .vm_n(vm_n));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {s, x} = 2'(k);
      #1;
      checks++;
      if (vm !== (k == 3) || vm_n !== (k != 3)) begin
        failures++; $display("FAIL s=%b x=%b vm=%b vm_n=%b", s, x, vm, vm_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
