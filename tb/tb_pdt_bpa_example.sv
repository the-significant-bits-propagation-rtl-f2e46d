// tb_pdt_bpa_example -- end-to-end test of the small array used to explain the structure
// (k_C = 3 coefficients, m = 2 bit-planes, n = 3, l_0 = 6), here with threshold alpha = 2,
// so the two most significant columns of the last bit-plane and the most significant
// column of the first are TMR cells.  Same checks as tb_pdt_bpa: exact filtering at the
// promised latency, defects in critical cells masked, defects in plain cells off by
// exactly the weight of the defective output.
module tb_pdt_bpa_example;
  import pdt_bpa_pkg::*;
  localparam int unsigned KC = 3, M = 2, N = 3, L0 = 6, ALPHA = 2;
  localparam int unsigned W = L0 + M;
  localparam int unsigned LAT = KC * (M - 1) + 1;

  logic clk = 0, rst_n;
  logic [N-1:0] x;
  logic [KC-1:0][M-1:0] coef;
  logic [M-1:0][KC-1:0][L0-1:0][1:0] flt;
  logic [W-1:0] y;

  pdt_bpa #(.KC(KC), .M(M), .N(N), .L0(L0), .ALPHA(ALPHA)) dut (.clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .flt(flt), .y(y));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reset = 0, n_words = 0, n_latency = 0, n_masked = 0, n_propagated = 0, n_reload = 0;
  longint xs [$];   // every input word applied since the last reset, oldest first

  function automatic longint ref_y(int i);
    longint acc = 0;
    for (int j = 0; j < int'(KC); j++)
      if (i - j >= 0) acc += longint'(coef[j]) * xs[i - j];
    return acc & ((longint'(1) << W) - 1);
  endfunction

  task automatic do_reset();
    rst_n = 0;
    x = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== '0) begin failures++; $display("FAIL y=%h after reset", y); end
    else n_reset++;
    rst_n = 1;
    xs.delete();
  endtask

  // Apply `count` random words; compare words whose index is at least `from`.
  // err_w < 0: expect exact output; otherwise expect an error of +/- 2^err_w.
  task automatic run(int count, int from, int err_w, output int ok_words);
    ok_words = 0;
    for (int t = 0; t < count; t++) begin
      int i;
      x = N'($urandom);
      xs.push_back(longint'(x));
      @(posedge clk);
      #1;
      i = xs.size() - int'(LAT);
      if (i >= from) begin
        longint exp = ref_y(i);
        longint diff = (longint'(y) - exp) & ((longint'(1) << W) - 1);
        bit good;
        if (err_w < 0) good = (diff == 0);
        else good = (diff == (longint'(1) << err_w)) ||
                    (diff == (longint'(1) << W) - (longint'(1) << err_w));
        checks++;
        if (!good) begin
          failures++;
          $display("FAIL word %0d: y=%0d expected %0d (error weight %0d)", i, y, exp, err_w);
        end else ok_words++;
      end
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ok;
    flt = '0;
    for (int i = 0; i < int'(KC); i++) coef[i] = M'($urandom);
    coef[0] = '1;  // the largest coefficient exercises the top columns
    do_reset();

    // plain filtering
    run(400, 0, -1, ok);
    n_words += ok;

    // impulse: count clocks from applying x = 1 to seeing c_0 at the output
    do_reset();
    begin
      automatic int clocks = 0;
      x = 1;
      xs.push_back(1);
      @(posedge clk);
      #1;
      clocks = 1;
      x = 0;
      while (y == 0 && clocks < 200) begin
        xs.push_back(0);
        @(posedge clk);
        #1;
        clocks++;
      end
      checks++;
      if (clocks != int'(LAT) || y != W'(coef[0])) begin
        failures++;
        $display("FAIL impulse seen after %0d clocks (expected %0d), y=%0d", clocks, LAT, y);
      end else n_latency++;
      // the response then walks through c_1 .. c_{KC-1}; the last term, from the oldest
      // input of its word, arrives KC*M clocks after that input was applied
      for (int i = 1; i < int'(KC); i++) begin
        xs.push_back(0);
        @(posedge clk);
        #1;
        clocks++;
        checks++;
        if (y != W'(coef[i])) begin
          failures++;
          $display("FAIL impulse response tap %0d: y=%0d expected %0d", i, y, coef[i]);
        end
      end
      checks++;
      if (clocks != int'(KC * M)) begin
        failures++;
        $display("FAIL last tap after %0d clocks, expected %0d", clocks, KC * M);
      end
    end

    // new coefficient set, then defects
    for (int trial = 0; trial < 40; trial++) begin
      int unsigned k, r, j, which, w;
      bit crit;
      if (trial % 10 == 0) begin
        for (int i = 0; i < int'(KC); i++) coef[i] = M'($urandom);
        if (trial == 0) coef = '1;
        n_reload++;
      end
      do_reset();
      flt = '0;
      // the first trials hit every cell of the critical partition
      if (trial < int'(KC)) begin
        k = M - 1; r = trial; j = L0 - 1 - (trial % 2); which = 1 + trial % 3;
      end else begin
        k = $urandom_range(M - 1); r = $urandom_range(KC - 1); j = $urandom_range(L0 - 1);
        which = $urandom_range(2, 1);
        // the top carry of a row inside a plane has no column to go to: use the sum
        if (which == 2 && j == L0 - 1 && r != KC - 1) which = 1;
      end
      crit = is_critical(k, L0 - 1 - j, M, ALPHA);
      flt[k][r][j] = 2'(which);
      w = (which == 1) ? k + j : k + j + 1;
      // words whose first row was computed while reset held the pipeline miss the defect
      run(120, int'(KC), crit ? -1 : int'(w), ok);
      if (crit) n_masked += (ok > 0);
      else begin
        n_propagated += (ok > 0);
        checks++;
        // significance model: a plain cell is at least ALPHA bits below the output MSB
        if (w > W - 1 - ALPHA) begin
          failures++;
          $display("FAIL unprotected cell k=%0d j=%0d error 2^%0d exceeds the bound", k, j, w);
        end
      end
    end
    flt = '0;

    $display("mechanisms: reset=%0d words=%0d latency=%0d masked=%0d propagated=%0d reload=%0d",
             n_reset, n_words, n_latency, n_masked, n_propagated, n_reload);
    checks++;
    if (n_reset == 0 || n_words == 0 || n_latency == 0 || n_masked == 0 ||
        n_propagated == 0 || n_reload == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
