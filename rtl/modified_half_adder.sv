// Modified half adder ("2.1 block").
//
// Adds two bits with one XNOR and one 2:1 multiplexer instead of the usual
// XOR/AND gate pair. The XNOR tells whether the inputs are equal; the sum is
// its complement, and the multiplexer, steered by the XNOR, passes input a as
// the carry when the inputs agree (both 1 gives carry 1, both 0 gives 0) and
// a constant 0 when they differ.
//
// Interface: a, b in; sum = a ^ b, carry = a & b out.
// Timing: purely combinational, no clock or reset.
//
// The use of an XNOR and a multiplexer follows the source design; the exact
// gate netlist inside the cell is this implementation's choice.
module modified_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic eq;  // 1 when a and b are equal

  always_comb begin
    eq    = a ~^ b;
    sum   = ~eq;
    carry = eq ? a : 1'b0;
  end
endmodule
