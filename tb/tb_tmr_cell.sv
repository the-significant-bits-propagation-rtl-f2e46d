// tb_tmr_cell -- the TMR cell must compute the basic-cell function for every input and must
// hide a sum or carry defect injected into one of its copies.
module tb_tmr_cell;
  logic a, b, x, c, sum, carry;
  logic [1:0] flt;
  int checks = 0, failures = 0, masked = 0;

  tmr_cell dut (.a(a), .b(b), .x(x), .c(c), .flt(flt), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int total;
      {flt, a, b, x, c} = 6'(v);
      #1;
      total = int'(a) + int'(b) + int'(1'(x & c));
      checks++;
      if (sum !== 1'(total % 2) || carry !== 1'(total / 2)) begin
        failures++;
        $display("FAIL a=%b b=%b x=%b c=%b flt=%b -> sum=%b carry=%b", a, b, x, c, flt, sum, carry);
      end else if (flt != 0) masked++;
    end
    checks++;
    if (masked != 48) begin
      failures++;
      $display("FAIL only %0d injected defects masked", masked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
