// End-to-end testbench for the top level at its default parameters (16-bit
// pyramidal adder and 16 x 16 Braun multiplier side by side).
// Both units are driven at the same time with independent operands: directed
// corner cases first, then random pairs, and then a sweep of operands with
// long runs of ones. Every result is compared with a + b and a * b computed by
// the testbench. It counts how often each notable event happened and fails
// if one never did:
//   adder carry out (CY) set,
//   adder carry rippling from column 0 through all columns,
//   multiplier final ripple row carrying into the top product bit,
//   multiplier zero product from a nonzero operand.
// Combinational: 1 ns per vector.
module tb_low_power_arith_top;
  localparam int unsigned W = 16;
  localparam int unsigned NRANDOM = 20000;

  logic [W-1:0]   add_a, add_b, mul_a, mul_b;
  logic [W:0]     add_sum;
  logic [2*W-1:0] mul_sum;
  int checks = 0, failures = 0;
  int n_carry_out = 0, n_full_ripple = 0, n_top_bit = 0, n_zero_product = 0;

  low_power_arith_top dut (
    .add_a(add_a), .add_b(add_b), .add_sum(add_sum),
    .mul_a(mul_a), .mul_b(mul_b), .mul_sum(mul_sum)
  );

  task automatic apply(input logic [W-1:0] aa, input logic [W-1:0] ab,
                       input logic [W-1:0] ma, input logic [W-1:0] mb);
    logic [W:0]     exp_add;
    logic [2*W-1:0] exp_mul;
    add_a = aa; add_b = ab; mul_a = ma; mul_b = mb;
    #1;
    exp_add = {1'b0, aa} + {1'b0, ab};
    exp_mul = (2*W)'(ma) * (2*W)'(mb);
    checks += 2;
    if (add_sum !== exp_add) begin
      failures++;
      if (failures <= 10) $display("FAIL add %h + %h: got %h, expected %h", aa, ab, add_sum, exp_add);
    end
    if (mul_sum !== exp_mul) begin
      failures++;
      if (failures <= 10) $display("FAIL mul %h * %h: got %h, expected %h", ma, mb, mul_sum, exp_mul);
    end
    if (exp_add[W]) n_carry_out++;
    if (aa[0] & ab[0] && (aa[W-1:1] ^ ab[W-1:1]) == '1) n_full_ripple++;
    if (exp_mul[2*W-1]) n_top_bit++;
    if (exp_mul == '0 && (ma != '0 || mb != '0)) n_zero_product++;
  endtask

  initial begin
    apply('0, '0, '0, '0);
    apply('1, W'(1), '1, '1);
    apply('1, '1, '1, '0);
    apply({(W/2){2'b10}}, {(W/2){2'b01}}, {(W/2){2'b10}}, {(W/2){2'b01}});
    for (int n = 0; n < NRANDOM; n++)
      apply(W'($urandom), W'($urandom), W'($urandom), W'($urandom));
    for (int i = 1; i <= W; i++)
      for (int j = 1; j <= W; j++) begin
        logic [W-1:0] ones_i, ones_j;
        ones_i = W'((32'd1 << i) - 1);
        ones_j = W'((32'd1 << j) - 1);
        apply(ones_i, ~ones_j + W'(1), ones_i, ones_j);
      end

    if (n_carry_out == 0)    begin failures++; $display("FAIL adder carry out never set"); end
    if (n_full_ripple == 0)  begin failures++; $display("FAIL adder carry never rippled through all columns"); end
    if (n_top_bit == 0)      begin failures++; $display("FAIL multiplier top product bit never set"); end
    if (n_zero_product == 0) begin failures++; $display("FAIL multiplier zero product never seen"); end
    $display("adder carry outs=%0d full ripples=%0d, multiplier top bit=%0d zero products=%0d",
             n_carry_out, n_full_ripple, n_top_bit, n_zero_product);
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
