// tb_exor4: exhaustive self-checking testbench for the 4-input XOR gate.
// Applies all 16 input combinations and compares z with the parity of the
// input count of ones, computed here by counting. A watchdog ends a hung run.
module tb_exor4;
  logic [3:0] a;
  logic       z;
  int checks = 0;
  int failures = 0;

  exor4 dut (.a1(a[0]), .a2(a[1]), .a3(a[2]), .a4(a[3]), .z(z));

  initial begin
    #1000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      a = 4'(v);
      #1ns;
      ones = 0;
      for (int b = 0; b < 4; b++) if (a[b]) ones++;
      checks++;
      if (z != logic'(ones % 2)) begin
        failures++;
        $display("FAIL a=%b z=%b", a, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
