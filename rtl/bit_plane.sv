// bit_plane -- one bit-plane of the semi-systolic bit-plane FIR array.
//
// A bit-plane multiplies the input stream by the bits of equal weight 2^PLANE of all KC
// coefficients.  It is a column of KC rows (bpa_row); row r adds x * c_{KC-1-r}^PLANE to
// the partial result coming from the row above, and every row is followed by a register
// stage for the sum and the carry vector.  The input word x is broadcast to all rows in the
// same clock, so a word entering row 0 at clock t meets x(t+r) in row r: this is the
// transposed FIR form of Eq. (3), computing c_{KC-1}x(t) + ... + c_0 x(t+KC-1).
//
// Interface: s_in/a_in is the carry-save partial result entering row 0 (all zero for the
// first bit-plane); a_in[j] is the carry arriving at weight 2^j.  x is the L0-bit input
// word, already extended to the row width.  cbits[i] is bit PLANE of coefficient c_i.
// s_out/co are the registered outputs of the last row; co[j] has weight 2^(j+1).
// Timing: KC clocks from s_in/a_in to s_out/co.  Synchronous active-low reset clears all
// pipeline registers (a choice of this design; the reset is not specified otherwise).
module bit_plane #(
  parameter int unsigned L0    = 16,
  parameter int unsigned KC    = 4,
  parameter int unsigned PLANE = 0,
  parameter int unsigned M     = 8,
  parameter int unsigned ALPHA = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [L0-1:0]                x,
  input  logic [KC-1:0]                cbits,
  input  logic [L0-1:0]                s_in,
  input  logic [L0-1:0]                a_in,
  input  logic [KC-1:0][L0-1:0][1:0]   flt,
  output logic [L0-1:0]                s_out,
  output logic [L0-1:0]                co
);
  logic [L0-1:0] s_row [KC];   // combinational row outputs
  logic [L0-1:0] c_row [KC];
  logic [L0-1:0] s_reg [KC];   // row registers
  logic [L0-1:0] c_reg [KC];

  for (genvar r = 0; r < KC; r++) begin : g_row
    logic [L0-1:0] s_i, a_i;
    if (r == 0) begin : g_first
      assign s_i = s_in;
      assign a_i = a_in;
    end else begin : g_next
      assign s_i = s_reg[r-1];
      assign a_i = {c_reg[r-1][L0-2:0], 1'b0};   // carry moves one column left
    end

    bpa_row #(.L0(L0), .PLANE(PLANE), .M(M), .ALPHA(ALPHA)) u_row (
      .s_in(s_i), .a_in(a_i), .x(x), .c(cbits[KC-1-r]), .flt(flt[r]),
      .s_out(s_row[r]), .co(c_row[r])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        s_reg[r] <= '0;
        c_reg[r] <= '0;
      end else begin
        s_reg[r] <= s_row[r];
        c_reg[r] <= c_row[r];
      end
    end
  end

  assign s_out = s_reg[KC-1];
  assign co    = c_reg[KC-1];
endmodule
