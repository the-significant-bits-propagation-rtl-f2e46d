// tb_bit_plane -- a bit-plane of KC = 4 rows fed with a random input stream, random
// coefficient bits and a random carry-save word at its input.  The value leaving the last
// row register must be exactly KC clocks after the word entered and equal
//   s_in(t) + a_in(t) + sum_r c_{KC-1-r} * x(t+r).
module tb_bit_plane;
  localparam int unsigned L0 = 16;
  localparam int unsigned KC = 4;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n;
  logic [L0-1:0] x, s_in, a_in, s_out, co;
  logic [KC-1:0] cbits;
  logic [KC-1:0][L0-1:0][1:0] flt;
  longint xin [$], base [$];
  logic [KC-1:0] cbh [$];
  int checks = 0, failures = 0;

  bit_plane #(.L0(L0), .KC(KC), .PLANE(0), .M(8), .ALPHA(0)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .cbits(cbits), .s_in(s_in), .a_in(a_in), .flt(flt),
    .s_out(s_out), .co(co));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flt = '0;
    cbits = 4'b1011;
    rst_n = 0; x = 0; s_in = 0; a_in = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (s_out !== '0 || co !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      x = L0'($urandom_range((1 << N) - 1));
      s_in = L0'($urandom_range(1 << 12));
      a_in = L0'($urandom_range(1 << 11)) << 1;
      if (t % 50 == 0) cbits = 4'($urandom);
      xin.push_back(longint'(x));
      base.push_back(longint'(s_in) + longint'(a_in));
      cbh.push_back(cbits);
      @(posedge clk);
      #1;
      if (t >= KC - 1) begin
        automatic int t0 = t - (KC - 1);   // word that entered row 0 in clock t0
        automatic longint exp = base[t0];
        automatic longint got = longint'(s_out) + 2 * longint'(co);
        for (int r = 0; r < KC; r++)
          if (cbh[t0 + r][KC-1-r]) exp += xin[t0 + r];
        checks++;
        if (got != exp) begin
          failures++;
          $display("FAIL t=%0d got %0d expected %0d", t, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
