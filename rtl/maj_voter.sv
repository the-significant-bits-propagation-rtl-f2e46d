// maj_voter -- two-out-of-three majority voter ("V" of the TMR cell).
//
// Output is 1 when at least two of the three inputs are 1.  Combinational.  The voter
// itself is assumed defect-free, as is usual for triple modular redundancy.
module maj_voter (
  input  logic [2:0] in,
  output logic       out
);
  assign out = (in[0] & in[1]) | (in[0] & in[2]) | (in[1] & in[2]);
endmodule
