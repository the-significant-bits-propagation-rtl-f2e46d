// bpa_row -- one row of the bit-plane array: carry-save multiply-accumulate.
//
// The row adds the partial product x * c (x an L0-bit word, c one coefficient bit) to the
// partial result held as a sum vector and a carry vector.  Cell j (bit weight 2^j, j = 0 is
// the rightmost column) takes b = s_in[j], a = a_in[j] and the partial-product bit
// x[j] & c, and produces s_out[j] (weight 2^j) and co[j] (weight 2^(j+1)).  In the next row
// co[j] enters the cell one column to the left, as in the array drawing.  The row is
// combinational; the bit-plane registers its outputs.
//
// Which cells are triple-modular-redundant follows the significance model: the cell in
// column L0-1-j (counted from the most significant end) of bit-plane PLANE is a tmr_cell
// when pdt_bpa_pkg::is_critical() says so for the threshold ALPHA, else a bpa_cell.
// flt[j] injects a defect into cell j (see bpa_cell); tie to zero in normal use.
module bpa_row
  import pdt_bpa_pkg::*;
#(
  parameter int unsigned L0    = 16,
  parameter int unsigned PLANE = 0,
  parameter int unsigned M     = 8,
  parameter int unsigned ALPHA = 1
) (
  input  logic [L0-1:0]      s_in,
  input  logic [L0-1:0]      a_in,
  input  logic [L0-1:0]      x,
  input  logic               c,
  input  logic [L0-1:0][1:0] flt,
  output logic [L0-1:0]      s_out,
  output logic [L0-1:0]      co
);
  for (genvar j = 0; j < L0; j++) begin : g_col
    if (is_critical(PLANE, L0 - 1 - j, M, ALPHA)) begin : g_tmr
      tmr_cell u_cell (.a(a_in[j]), .b(s_in[j]), .x(x[j]), .c(c), .flt(flt[j]),
                       .sum(s_out[j]), .carry(co[j]));
    end else begin : g_plain
      bpa_cell u_cell (.a(a_in[j]), .b(s_in[j]), .x(x[j]), .c(c), .flt(flt[j]),
                       .sum(s_out[j]), .carry(co[j]));
    end
  end
endmodule
