// Self-checking testbench for the modified half adder.
// Applies all four input combinations and compares sum and carry with the
// arithmetic sum a + b worked out in the testbench. Combinational: each
// vector is given 1 ns to settle. A watchdog ends the run if it hangs.
module tb_modified_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  modified_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] expected;
      {a, b} = v[1:0];
      #1;
      expected = 2'(a) + 2'(b);
      checks++;
      if ({carry, sum} !== expected) begin
        failures++;
        $display("FAIL a=%b b=%b: got carry=%b sum=%b, expected %b", a, b, carry, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
