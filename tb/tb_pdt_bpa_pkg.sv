// tb_pdt_bpa_pkg -- the critical-partition rule against the published cell budgets.
// For k_C = 4, m = 8 and rows of 16, 24 and 32 cells, the number of basic cells of the
// partial-defect-tolerant array (plain cells plus three per triplicated cell) must equal
// the Euclidean-metric budgets for alpha = 0, 1, 2, 4, 8, 16.  Also checks the distance of
// a few cells and the alpha = 1 partition of the k_C = 3, m = 2 example (three cells).
//
// Independently of the closed form, the error-propagation graph is rebuilt here: q = m*k_C+1
// rows (the last is the adder) of p = l_0+m-1 vertices, the bit-planes aligned by dummy
// vertices.  Between rows a vertex reaches the vertex below with weight 0 (sum) and the one
// below-left with weight 1 (carry); in the adder row it reaches its left neighbour with
// weight 1.  Repeated min-plus products d <- (A (x) d) (+) d give the shortest-path weight
// from every vertex to the output MSB, which must equal euclid_d() for every real cell.
module tb_pdt_bpa_pkg;
  import pdt_bpa_pkg::*;
  int checks = 0, failures = 0;

  int unsigned alphas [6] = '{0, 1, 2, 4, 8, 16};
  int unsigned l0s    [3] = '{16, 24, 32};
  int unsigned budget [3][6] = '{'{512, 520, 536, 592, 800, 1312},
                                 '{768, 776, 792, 848, 1056, 1568},
                                 '{1024, 1032, 1048, 1104, 1312, 1824}};

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int INF = 1 << 20;

  function automatic int tmin(int x, int y);   // tropical sum
    return x < y ? x : y;
  endfunction
  function automatic int tmul(int x, int y);   // tropical product
    return (x >= INF || y >= INF) ? INF : x + y;
  endfunction

  // Check euclid_d against the min-plus closure for an array of kc, m, l0.
  task automatic check_closure(int kc, int m, int l0);
    int q = m * kc + 1;
    int p = l0 + m - 1;
    int d [][];
    int nd [][];
    int bad = 0;
    d = new[q];
    nd = new[q];
    for (int r = 0; r < q; r++) begin
      d[r] = new[p];
      nd[r] = new[p];
      for (int g = 0; g < p; g++) d[r][g] = INF;
    end
    d[q-1][0] = 0;   // the output MSB: left end of the adder row
    for (int it = 0; it < q + p; it++) begin
      for (int r = 0; r < q; r++)
        for (int g = 0; g < p; g++) begin
          int v = d[r][g];
          if (r < q - 1) begin
            v = tmin(v, tmul(0, d[r+1][g]));
            if (g > 0) v = tmin(v, tmul(1, d[r+1][g-1]));
          end else if (g > 0) v = tmin(v, tmul(1, d[r][g-1]));
          nd[r][g] = v;
        end
      for (int r = 0; r < q; r++) d[r] = nd[r];
    end
    for (int k = 0; k < m; k++)
      for (int r = 0; r < kc; r++)
        for (int c = 0; c < l0; c++) begin
          int g = c + (m - 1 - k);
          if (d[k*kc + r][g] != int'(euclid_d(k, c, m))) bad++;
        end
    check($sformatf("min-plus closure kc=%0d m=%0d l0=%0d, mismatching cells", kc, m, l0),
          bad, 0);
  endtask

  initial begin
    check_closure(3, 2, 6);
    check_closure(4, 8, 16);
    check_closure(4, 8, 24);
    for (int a = 0; a < 3; a++)
      for (int i = 0; i < 6; i++)
        check($sformatf("cells l0=%0d alpha=%0d", l0s[a], alphas[i]),
              total_cells(4, 8, l0s[a], alphas[i]), budget[a][i]);
    check("d(last plane, col 0)", euclid_d(7, 0, 8), 0);
    check("d(first plane, col 0)", euclid_d(0, 0, 8), 7);
    check("d(plane 3, col 5)", euclid_d(3, 5, 8), 9);
    check("example alpha=1 partition", critical_cells(3, 2, 6, 1), 3);
    check("example alpha=2 partition", critical_cells(3, 2, 6, 2), 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
