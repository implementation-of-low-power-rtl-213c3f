// Top level: the pyramidal adder and the Braun array multiplier side by side.
//
// The two arithmetic units are independent datapaths that share only their
// building cells, the XNOR/multiplexer half adder and full adder. Each has
// its own operand and result ports:
//   add_a, add_b -> add_sum = {CY, S} = add_a + add_b   (WIDTH+1 bits)
//   mul_a, mul_b -> mul_sum = mul_a * mul_b             (2*WIDTH bits)
//
// Timing: purely combinational, no clock or reset; results settle one
// propagation delay after the operands change.
//
// Both units at 16 bits follow the source design; putting them in one top
// with separate ports is this implementation's choice.
module low_power_arith_top #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   add_a,
  input  logic [WIDTH-1:0]   add_b,
  output logic [WIDTH:0]     add_sum,
  input  logic [WIDTH-1:0]   mul_a,
  input  logic [WIDTH-1:0]   mul_b,
  output logic [2*WIDTH-1:0] mul_sum
);
  pyramidal_adder #(.WIDTH(WIDTH)) u_adder (
    .a  (add_a),
    .b  (add_b),
    .sum(add_sum)
  );

  braun_multiplier #(.WIDTH(WIDTH)) u_mult (
    .a  (mul_a),
    .b  (mul_b),
    .sum(mul_sum)
  );
endmodule
