// tb_bpa_row -- one row of the last bit-plane (PLANE = M-1) with threshold ALPHA = 3, so
// its three most significant cells are TMR cells.
// Checks: for random operands the row preserves value, s_out + 2*co = s_in + a_in + x*c;
// a defect injected into a TMR cell changes nothing; a defect in a plain cell of weight
// 2^j shifts the represented value by exactly 2^j (sum) or 2^(j+1) (carry).
module tb_bpa_row;
  localparam int unsigned L0 = 16;
  localparam int unsigned M = 8;
  localparam int unsigned ALPHA = 3;
  logic [L0-1:0] s_in, a_in, x, s_out, co;
  logic c;
  logic [L0-1:0][1:0] flt;
  int checks = 0, failures = 0, masked = 0, seen = 0;

  bpa_row #(.L0(L0), .PLANE(M-1), .M(M), .ALPHA(ALPHA)) dut (
    .s_in(s_in), .a_in(a_in), .x(x), .c(c), .flt(flt), .s_out(s_out), .co(co));

  function automatic longint value(logic [L0-1:0] s, logic [L0-1:0] k);
    return longint'(s) + 2 * longint'(k);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flt = '0;
    for (int t = 0; t < 500; t++) begin
      longint good, bad, diff;
      int unsigned j;
      s_in = L0'($urandom); a_in = L0'($urandom); x = L0'($urandom); c = 1'($urandom);
      flt = '0;
      #1;
      good = value(s_out, co);
      checks++;
      if (good != longint'(s_in) + longint'(a_in) + (c ? longint'(x) : 0)) begin
        failures++;
        $display("FAIL value s_in=%h a_in=%h x=%h c=%b", s_in, a_in, x, c);
      end
      j = $urandom_range(L0 - 1);
      flt[j] = 2'($urandom_range(3, 1));
      #1;
      bad = value(s_out, co);
      diff = bad - good;
      if (diff < 0) diff = -diff;
      checks++;
      if (j >= L0 - ALPHA) begin
        if (bad != good) begin
          failures++;
          $display("FAIL TMR cell %0d did not mask flt=%b", j, flt[j]);
        end else masked++;
      end else begin
        automatic longint exp_s = flt[j][0] ? (longint'(1) << j) : 0;
        automatic longint exp_c = flt[j][1] ? (longint'(1) << (j + 1)) : 0;
        // sum and carry errors may have either sign; accept every signed combination
        if (!(diff == exp_s + exp_c || diff == (exp_s > exp_c ? exp_s - exp_c : exp_c - exp_s))) begin
          failures++;
          $display("FAIL plain cell %0d flt=%b error %0d", j, flt[j], diff);
        end else seen++;
      end
    end
    checks++;
    if (masked == 0 || seen == 0) begin
      failures++;
      $display("FAIL masked=%0d unmasked=%0d", masked, seen);
    end
    $display("masked defects %0d, propagated defects %0d", masked, seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
