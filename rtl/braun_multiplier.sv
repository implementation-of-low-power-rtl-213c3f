// Braun array multiplier, WIDTH x WIDTH unsigned, built from the modified
// half adder ("2.1 block") and modified full adder ("2.2 block").
//
// Partial products pp(i,j) = a[i] & b[j] (weight i+j) come from an array of
// AND gates. They are summed by a carry-save array of WIDTH-1 rows of WIDTH-1
// cells, where cell i of row j has weight i+j:
//   row 1      half adders on pp(i+1,0) and pp(i,1);
//   rows 2..   full adders on the row-above sum of the next cell (or, for the
//              leftmost cell, pp(WIDTH-1,j-1)), pp(i,j) and the carry of the
//              cell above (same i, previous row), which has the same weight.
// The rightmost sum of each row is product bit j. The sums and carries of the
// last array row are then added by a final ripple row of WIDTH-1 cells (a
// half adder, then full adders) that yields product bits WIDTH..2*WIDTH-2,
// its last carry being the top product bit.
//
// For 16 bits this is 16*15 = 240 adder cells: 239 internal carries and 210
// internal sums, plus the 32 product bits, one adder cell per carry.
//
// Interface: a, b in (WIDTH bits each); sum = a * b out (2*WIDTH bits).
// Timing: purely combinational, no clock or reset. The longest path runs down
// the array and along the ripple row, about 2*WIDTH cells.
//
// The array structure, the cell types and the output equations follow the
// source design; the numbering of rows and cells is this implementation's.
// WIDTH must be at least 2.
module braun_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] sum
);
  localparam int unsigned N = WIDTH;

  // Partial products, pp[j][i] = a[i] & b[j].
  logic [N-1:0] pp [N];
  always_comb begin
    for (int j = 0; j < N; j++) pp[j] = a & {N{b[j]}};
  end

  // Carry-save array, rows 1 .. N-1.
  for (genvar j = 1; j < N; j++) begin : g_row
    logic s [N-1];  // sum of cell i, weight i+j
    logic c [N-1];  // carry of cell i, weight i+j+1

    if (j == 1) begin : g_first
      for (genvar i = 0; i < N - 1; i++) begin : g_cell
        modified_half_adder u_ha (
          .a    (pp[0][i+1]),
          .b    (pp[1][i]),
          .sum  (s[i]),
          .carry(c[i])
        );
      end
    end else begin : g_inner
      for (genvar i = 0; i < N - 1; i++) begin : g_cell
        logic x;  // the operand of weight i+j handed down from row j-1
        if (i < N - 2) begin : g_mid
          assign x = g_row[j-1].s[i+1];
        end else begin : g_left
          assign x = pp[j-1][N-1];
        end
        modified_full_adder u_fa (
          .a   (x),
          .b   (pp[j][i]),
          .cin (g_row[j-1].c[i]),
          .sum (s[i]),
          .cout(c[i])
        );
      end
    end

    assign sum[j] = s[0];
  end

  assign sum[0] = pp[0][0];

  // Final ripple row: product bits N .. 2N-1.
  for (genvar i = 0; i < N - 1; i++) begin : g_final
    logic x;  // operand of weight N+i from the last array row
    logic r;  // ripple carry out of this cell
    if (i < N - 2) begin : g_mid
      assign x = g_row[N-1].s[i+1];
    end else begin : g_left
      assign x = pp[N-1][N-1];
    end

    if (i == 0) begin : g_ha
      modified_half_adder u_ha (
        .a    (x),
        .b    (g_row[N-1].c[i]),
        .sum  (sum[N+i]),
        .carry(r)
      );
    end else begin : g_fa
      modified_full_adder u_fa (
        .a   (x),
        .b   (g_row[N-1].c[i]),
        .cin (g_final[i-1].r),
        .sum (sum[N+i]),
        .cout(r)
      );
    end
  end

  assign sum[2*N-1] = g_final[N-2].r;
endmodule
