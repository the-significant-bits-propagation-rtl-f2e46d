// pdt_bpa -- partial-defect-tolerant semi-systolic bit-plane array (BPA) for FIR filtering.
//
// Computes y_i = c_0 x_i + c_1 x_{i-1} + ... + c_{KC-1} x_{i-KC+1} with one output word per
// clock.  The product is split into M bit-planes (Eq. 2): bit-plane k multiplies the input
// stream by bit k of every coefficient, using KC rows of L0 carry-save cells (bit_plane).
// Between planes the partial result moves one column to the right (a multiplication by 1/2):
// the sum vector shifts, the carry vector goes straight down, and the rightmost sum bit
// leaves the array as output bit y[k].  Plane k sees the input word delayed by k*KC clocks
// so that it meets the partial result of the same output word.  After the last plane a
// ripple-carry adder (final_adder) resolves the carry-save pair into y[L0+M-1:M].  The early
// output bits y[M-2:0] pass through delay lines so that a whole word appears at once.
//
// Fault tolerance: the cells whose errors can cost the output more than the tolerated
// number of significant bits (threshold ALPHA, see pdt_bpa_pkg) are triple-modular-redundant
// cells; all others are plain cells.  With ALPHA = 1 these are the KC cells of the most
// significant column of the last bit-plane.  ALPHA = 0 gives an unprotected array.
//
// Ports: x is the input word (unsigned, N bits, zero-extended to the L0-bit rows); coef[i]
// is coefficient c_i (unsigned, M bits), held constant while a result is wanted; flt is a
// defect-injection input, flt[k][r][j] = {carry, sum} inversion for the cell of plane k,
// row r, bit weight j (copy 0 only for TMR cells), zero in normal use; y is the L0+M-bit
// output word.  Timing: y shows the word whose newest input was applied KC*(M-1)+1 clocks
// earlier, i.e. KC*M clocks after its oldest input x_{i-KC+1}.  Reset: synchronous,
// active low, clears every pipeline register.
//
// Unsigned operands are this design's choice: the reference drawing extends the sign of x
// into the guard columns, but no rule is given that keeps a two's-complement carry-save
// result exact across the bit-plane shift.  The array is exact when L0 >= N + ceil(log2 KC)
// + 1, which the default (N = 8, L0 = 16, KC = 4) meets with room to spare.
module pdt_bpa #(
  parameter int unsigned KC    = 4,    // number of coefficients k_C
  parameter int unsigned M     = 8,    // coefficient word length m (number of bit-planes)
  parameter int unsigned N     = 8,    // input word length n
  parameter int unsigned L0    = 16,   // cells per row l_0
  parameter int unsigned ALPHA = 1,    // significance threshold alpha
  localparam int unsigned W    = L0 + M
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [N-1:0]                       x,
  input  logic [KC-1:0][M-1:0]               coef,
  input  logic [M-1:0][KC-1:0][L0-1:0][1:0]  flt,
  output logic [W-1:0]                       y
);
  initial begin
    assert (L0 >= N + $clog2(KC) + 1)
      else $error("pdt_bpa: L0 = %0d is too narrow for N = %0d and KC = %0d", L0, N, KC);
  end

  logic [L0-1:0] x_ext;
  assign x_ext = L0'(x);   // zero extension over the guard columns

  logic [L0-1:0] s_in  [M];
  logic [L0-1:0] a_in  [M];
  logic [L0-1:0] s_out [M];
  logic [L0-1:0] c_out [M];

  for (genvar k = 0; k < M; k++) begin : g_plane
    logic [L0-1:0] x_k;
    logic [KC-1:0] cb;

    // input word delayed by k*KC clocks for plane k
    delay_line #(.W(L0), .D(k * KC)) u_xdly (.clk(clk), .rst_n(rst_n), .d(x_ext), .q(x_k));

    for (genvar i = 0; i < KC; i++) begin : g_cb
      assign cb[i] = coef[i][k];
    end

    if (k == 0) begin : g_first
      assign s_in[k] = '0;
      assign a_in[k] = '0;
    end else begin : g_shift
      assign s_in[k] = {1'b0, s_out[k-1][L0-1:1]};   // sum shifts one column right
      assign a_in[k] = c_out[k-1];                    // carry goes straight down
    end

    bit_plane #(.L0(L0), .KC(KC), .PLANE(k), .M(M), .ALPHA(ALPHA)) u_plane (
      .clk(clk), .rst_n(rst_n), .x(x_k), .cbits(cb),
      .s_in(s_in[k]), .a_in(a_in[k]), .flt(flt[k]),
      .s_out(s_out[k]), .co(c_out[k])
    );

    // bit k of the result leaves the array here; align it with the last plane
    if (k < M - 1) begin : g_early
      delay_line #(.W(1), .D((M - 1 - k) * KC)) u_ydly (
        .clk(clk), .rst_n(rst_n), .d(s_out[k][0]), .q(y[k]));
    end else begin : g_last
      assign y[k] = s_out[k][0];
    end
  end

  final_adder #(.L0(L0)) u_adder (
    .s  ({1'b0, s_out[M-1][L0-1:1]}),
    .v  (c_out[M-1]),
    .sum(y[W-1:M])
  );
endmodule
