// Pyramidal adder: a WIDTH-bit two-operand adder built only from half adders.
//
// Column i (weight 2^i) is a vertical chain of i+1 modified half adders
// ("2.1 blocks"). The first cell of the chain adds a[i] and b[i]; each further
// cell adds the running sum to one of the i carries produced by column i-1
// (column 0 has none). The last running sum of the chain is S_i. Every cell
// of the column emits a carry, so column i hands i+1 carries to column i+1
// and the columns grow by one cell each: a pyramid of WIDTH*(WIDTH+1)/2 cells
// (136 for 16 bits) and WIDTH*(WIDTH-1)/2 inter-column carries (120).
//
// Why this is exact: the value entering column i is a[i] + b[i] plus at most
// one carry (a two-operand add never carries more than 1 into a column), so
// of all the carries a column emits at most one is 1. Half adders therefore
// suffice, and the WIDTH carries leaving the top column are merged into the
// carry out CY by an OR.
//
// Interface: a, b in; sum = {CY, S[WIDTH-1:0]} out (WIDTH+1 bits).
// Timing: purely combinational, no clock or reset.
//
// The pyramid shape, the cell counts and the CY merge follow the source
// design; which incoming carry feeds which cell of a column, and the use of an
// OR to merge the top carries, are this implementation's choices.
module pyramidal_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    // Running sums (ps) and carries (pc) of the i+1 cells in this column.
    logic ps [i+1];
    logic pc [i+1];

    modified_half_adder u_head (
      .a    (a[i]),
      .b    (b[i]),
      .sum  (ps[0]),
      .carry(pc[0])
    );

    for (genvar k = 1; k <= i; k++) begin : g_cell
      modified_half_adder u_cell (
        .a    (ps[k-1]),
        .b    (g_col[i-1].pc[k-1]),
        .sum  (ps[k]),
        .carry(pc[k])
      );
    end

    assign sum[i] = ps[i];
  end

  // Carry out: at most one of the top column's carries is set.
  always_comb begin
    sum[WIDTH] = 1'b0;
    for (int k = 0; k < WIDTH; k++) sum[WIDTH] |= g_col[WIDTH-1].pc[k];
  end
endmodule
