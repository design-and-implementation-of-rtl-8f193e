// mant_mult: unsigned N x N array multiplier for the significands (N = 53
// for double precision: the 52 fraction bits plus the hidden one). The
// result is the 2N-bit intermediate product ip = a * b.
//
// Structure (a carry-save array): partial products are single AND gates,
// a[j] & b[i]. Row 0 holds the partial products of b[0]. Each following row
// i is a line of N full adders; cell (i,j) adds partial product a[j] & b[i],
// the sum of cell (i-1, j+1) from the row above and the carry of cell
// (i-1, j). Every cell of row i has weight i + j, so sums move one column
// to the right and carries move straight down, i.e. the carries are passed
// diagonally downwards in the usual drawing of the array. Bit i of the
// product leaves row i at column 0. After the last row the remaining sums
// and carries of weights N .. 2N-1 are merged by an N-bit ripple carry
// adder, which gives the upper half of the product.
//
// Purely combinational. The critical path runs down the N rows and then
// along the final ripple carry adder.
// The AND-gate partial products and the diagonal carries follow the design;
// the ripple carry adder used as the merging row is this implementation's
// choice. The design speaks of two 52-bit operands and a 104-bit product;
// here the hidden one is included (53 bits, 106-bit product), which an
// exact double precision product needs.
module mant_mult #(
  parameter int unsigned N = 53
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] ip
);
  // One generate block per row; row 0 holds partial products only. Each
  // later row is N full adders written as bitwise equations on the row's
  // vectors: bit j of s and c is the sum and carry of cell (i, j).
  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] s;  // sum out of each cell of this row
    logic [N-1:0] c;  // carry out of each cell of this row
    if (i == 0) begin : g_first
      assign s = a & {N{b[0]}};
      assign c = '0;
    end else begin : g_adders
      logic [N-1:0] pp;         // partial products a[j] & b[i]
      logic [N-1:0] from_above; // sum of cell (i-1, j+1)
      logic [N-1:0] carry_in;   // carry of cell (i-1, j), passed diagonally
      assign pp         = a & {N{b[i]}};
      assign from_above = {1'b0, g_row[i-1].s[N-1:1]};
      assign carry_in   = g_row[i-1].c;
      assign s = pp ^ from_above ^ carry_in;
      assign c = (pp & from_above) | (pp & carry_in) | (from_above & carry_in);
    end
    assign ip[i] = s[0];
  end

  // Final carry-propagate row: weights N .. 2N-1.
  logic [N-1:0] hi;
  logic         hi_cout;
  rca #(.W(N)) u_final (
    .a   ({1'b0, g_row[N-1].s[N-1:1]}),
    .b   (g_row[N-1].c),
    .s   (hi),
    .cout(hi_cout)
  );
  // The product of two N-bit numbers fits in 2N bits, so the final carry
  // out is always 0; it is folded into the top bit to keep the adder whole.
  assign ip[2*N-1:N] = hi | {hi_cout, {(N-1){1'b0}}};
endmodule
