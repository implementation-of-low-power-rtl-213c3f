// Self-checking testbench for the pyramidal adder at its default 16 bits.
// Drives directed corner cases (zero, all ones, a carry rippling through
// every column, alternating bit patterns) and then random operand pairs, and
// compares {CY, S} with a + b computed by the testbench. Also counts how
// often the carry out was set and how often a carry crossed all columns, and
// fails if either never happened. A second instance at 4 bits is checked
// exhaustively over all 256 operand pairs. Combinational: 1 ns per vector.
module tb_pyramidal_adder;
  localparam int unsigned W = 16;
  localparam int unsigned NRANDOM = 20000;

  logic [W-1:0] a, b;
  logic [W:0]   sum;
  int checks = 0, failures = 0;
  int carry_outs = 0, full_ripples = 0;

  pyramidal_adder #(.WIDTH(W)) dut (.a(a), .b(b), .sum(sum));

  logic [3:0] a4, b4;
  logic [4:0] sum4;
  pyramidal_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .sum(sum4));

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W:0] expected;
    a = va;
    b = vb;
    #1;
    expected = {1'b0, va} + {1'b0, vb};
    checks++;
    if (sum !== expected) begin
      failures++;
      if (failures <= 10) $display("FAIL %h + %h: got %h, expected %h", va, vb, sum, expected);
    end
    if (expected[W]) carry_outs++;
    // A carry generated in column 0 and propagated through every column.
    if (va[0] & vb[0] && (va[W-1:1] ^ vb[W-1:1]) == '1) full_ripples++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('1, '1);
    apply('1, W'(1));
    apply(W'(1), '1);
    apply({(W/2){2'b01}}, {(W/2){2'b10}});
    apply({(W/2){2'b01}}, {(W/2){2'b01}});
    for (int i = 0; i < W; i++) apply(W'(1) << i, W'(1) << i);
    for (int i = 0; i < W; i++) apply(~(W'(1) << i), W'(1) << i);
    for (int n = 0; n < NRANDOM; n++) apply(W'($urandom), W'($urandom));
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = v[7:0];
      #1;
      checks++;
      if (sum4 !== 5'(a4) + 5'(b4)) begin
        failures++;
        $display("FAIL 4-bit %h + %h: got %h", a4, b4, sum4);
      end
    end

    if (carry_outs == 0) begin failures++; $display("FAIL carry out never set"); end
    if (full_ripples == 0) begin failures++; $display("FAIL no full-length carry ripple"); end
    $display("carry outs=%0d full-length ripples=%0d", carry_outs, full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
