// Self-checking testbench for the modified full adder.
// Applies all eight input combinations and compares {cout, sum} with the
// arithmetic sum a + b + cin worked out in the testbench. Combinational: each
// vector is given 1 ns to settle. A watchdog ends the run if it hangs.
module tb_modified_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  modified_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] expected;
      {a, b, cin} = v[2:0];
      #1;
      expected = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: got cout=%b sum=%b, expected %b",
                 a, b, cin, cout, sum, expected);
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
