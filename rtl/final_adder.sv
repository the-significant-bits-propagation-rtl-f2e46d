// final_adder -- vector-merging adder at the bottom of the bit-plane array.
//
// Converts the carry-save result of the last bit-plane into a binary word.  It is a row of
// L0 basic cells (bpa_cell) chained as a ripple-carry adder: cell j adds s[j], v[j] (fed
// through the cell's partial-product input with c tied to 1) and the carry of cell j-1.
// The carry out of the top cell is dropped: the result is taken modulo 2^L0, and the array
// is sized so the true result always fits; the linter reports that last carry (rc[L0]) as
// unused, which is intended.  Combinational.
module final_adder #(
  parameter int unsigned L0 = 16
) (
  input  logic [L0-1:0] s,
  input  logic [L0-1:0] v,
  output logic [L0-1:0] sum
);
  logic [L0:0] rc;   // ripple carry, rc[j] enters cell j
  assign rc[0] = 1'b0;

  for (genvar j = 0; j < L0; j++) begin : g_cell
    bpa_cell u_cell (.a(rc[j]), .b(s[j]), .x(v[j]), .c(1'b1), .flt(2'b00),
                     .sum(sum[j]), .carry(rc[j+1]));
  end
endmodule
