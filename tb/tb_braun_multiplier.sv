// Self-checking testbench for the Braun array multiplier at its default
// 16 x 16 bits. Drives directed cases (zero, one, all ones, single bits,
// powers of two times all ones) and then random operand pairs, and compares
// the 32-bit product with a * b computed by the testbench. A second instance
// at 4 x 4 bits, the size at which the array is usually compared, is checked
// exhaustively over all 256 operand pairs.
// Combinational: 1 ns per vector.
module tb_braun_multiplier;
  localparam int unsigned W = 16;
  localparam int unsigned NRANDOM = 20000;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] sum;
  int checks = 0, failures = 0;

  braun_multiplier #(.WIDTH(W)) dut (.a(a), .b(b), .sum(sum));

  logic [3:0] a4, b4;
  logic [7:0] sum4;
  braun_multiplier #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .sum(sum4));

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [2*W-1:0] expected;
    a = va;
    b = vb;
    #1;
    expected = (2*W)'(va) * (2*W)'(vb);
    checks++;
    if (sum !== expected) begin
      failures++;
      if (failures <= 10) $display("FAIL %h * %h: got %h, expected %h", va, vb, sum, expected);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, W'(1));
    apply('1, '1);
    apply({(W/2){2'b01}}, {(W/2){2'b10}});
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++) apply(W'(1) << i, W'(1) << j);
    for (int i = 0; i < W; i++) begin
      apply('1, W'(1) << i);
      apply(W'(1) << i, '1);
    end
    for (int n = 0; n < NRANDOM; n++) apply(W'($urandom), W'($urandom));
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = v[7:0];
      #1;
      checks++;
      if (sum4 !== 8'(a4) * 8'(b4)) begin
        failures++;
        $display("FAIL 4x4 %h * %h: got %h", a4, b4, sum4);
      end
    end
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
