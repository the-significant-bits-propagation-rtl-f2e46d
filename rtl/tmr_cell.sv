// tmr_cell -- fault-tolerant basic cell built by triple modular redundancy.
//
// Three copies of bpa_cell receive the same a, b, x and c; one majority voter selects the
// carry and another the sum, so a defect confined to one copy never reaches the outputs.
// The ports are those of bpa_cell, so the array can use either cell in any position.
// flt[1:0] injects a defect into copy 0 only (flt[0] sum, flt[1] carry); copies 1 and 2
// are taken as defect-free.  Combinational.
module tmr_cell (
  input  logic       a,
  input  logic       b,
  input  logic       x,
  input  logic       c,
  input  logic [1:0] flt,
  output logic       sum,
  output logic       carry
);
  logic [2:0] s_r, c_r;

  for (genvar i = 0; i < 3; i++) begin : g_copy
    bpa_cell u_cell (
      .a(a), .b(b), .x(x), .c(c),
      .flt(i == 0 ? flt : 2'b00),
      .sum(s_r[i]), .carry(c_r[i])
    );
  end

  maj_voter u_vote_carry (.in(c_r), .out(carry));
  maj_voter u_vote_sum   (.in(s_r), .out(sum));
endmodule
