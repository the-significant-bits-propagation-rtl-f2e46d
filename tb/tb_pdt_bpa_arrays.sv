// tb_pdt_bpa_arrays -- the three array sizes of the cell-budget evaluation, run as filters.
// All have k_C = 4 coefficients of m = 8 bits; the input word is 8, 16 or 24 bits and the
// rows 16, 24 or 32 cells.  Each is built with a different threshold (8, 2 and 16) so that
// partitions from a single column up to most of the array are exercised, and each is
// checked by an arr_check harness (exact filtering, masked and propagated defects).
module tb_pdt_bpa_arrays;
  int c1, f1, c2, f2, c3, f3;
  bit d1, d2, d3;
  int checks, failures;

  arr_check #(.KC(4), .M(8), .N(8),  .L0(16), .ALPHA(8))  u_arr1 (.checks(c1), .failures(f1), .done(d1));
  arr_check #(.KC(4), .M(8), .N(16), .L0(24), .ALPHA(2))  u_arr2 (.checks(c2), .failures(f2), .done(d2));
  arr_check #(.KC(4), .M(8), .N(24), .L0(32), .ALPHA(16)) u_arr3 (.checks(c3), .failures(f3), .done(d3));

  initial begin
    fork
      begin
        wait (d1 && d2 && d3);
        checks = c1 + c2 + c3;
        failures = f1 + f2 + f3;
      end
      begin
        #50000000;
        checks = c1 + c2 + c3;
        failures = f1 + f2 + f3 + 1;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
