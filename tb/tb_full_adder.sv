// tb_full_adder: exhaustive check of the one-bit full adder.
// All eight input combinations are applied; S and C_O are compared with the
// two-bit arithmetic sum a + b + ci worked out in the testbench.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned total;
      {a, b, ci} = 3'(v);
      #1;
      total = int'(v[2]) + int'(v[1]) + int'(v[0]);
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b, want %0d", a, b, ci, co, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
