// Modified full adder ("2.2 block").
//
// Adds three bits with one XNOR and two 2:1 multiplexers. The XNOR of a and b
// selects both outputs: when a equals b the sum is the carry in and the carry
// out is a (the two agreeing bits decide it); when they differ the sum is the
// inverted carry in and the carry out is the carry in. No output passes
// through more than one multiplexer after the XNOR.
//
// Interface: a, b, cin in; sum = a ^ b ^ cin, cout = majority(a, b, cin) out.
// Timing: purely combinational, no clock or reset.
//
// The XNOR-and-multiplexer construction follows the source design; the exact
// netlist is this implementation's choice.
module modified_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic eq;  // 1 when a and b are equal

  always_comb begin
    eq   = a ~^ b;
    sum  = eq ? cin : ~cin;
    cout = eq ? a   : cin;
  end
endmodule
