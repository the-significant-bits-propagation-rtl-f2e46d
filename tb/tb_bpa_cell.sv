// tb_bpa_cell -- exhaustive test of the basic cell.
// Every combination of a, b, x, c and the two defect-injection bits is applied and the
// outputs are compared with the arithmetic definition a + b + x*c = sum + 2*carry,
// inverted where a defect is injected.
module tb_bpa_cell;
  logic a, b, x, c, sum, carry;
  logic [1:0] flt;
  int checks = 0, failures = 0;

  bpa_cell dut (.a(a), .b(b), .x(x), .c(c), .flt(flt), .sum(sum), .carry(carry));

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
      if (sum !== (1'(total % 2) ^ flt[0]) || carry !== (1'(total / 2) ^ flt[1])) begin
        failures++;
        $display("FAIL a=%b b=%b x=%b c=%b flt=%b -> sum=%b carry=%b", a, b, x, c, flt, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
