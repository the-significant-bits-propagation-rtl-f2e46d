// bpa_cell -- basic cell of the bit-plane array.
//
// A full adder whose third operand is the partial-product bit x & c:
//   sum   = a ^ b ^ (x & c)
//   carry = a&b | a&(x&c) | b&(x&c)
// b is the sum bit of the cell above (same weight), a is the carry of the neighbour one
// weight lower, x one bit of the broadcast input word and c the coefficient bit of the row.
// The cell is purely combinational; the array places the pipeline registers.
//
// flt is a defect-injection input added for testing the fault-tolerance scheme: flt[0]
// inverts the sum output and flt[1] the carry output, which models a defective sum or carry
// circuit.  Tie it to zero in normal use.
module bpa_cell (
  input  logic       a,
  input  logic       b,
  input  logic       x,
  input  logic       c,
  input  logic [1:0] flt,
  output logic       sum,
  output logic       carry
);
  logic p;
  assign p     = x & c;
  assign sum   = (a ^ b ^ p) ^ flt[0];
  assign carry = ((a & b) | (a & p) | (b & p)) ^ flt[1];
endmodule
