// tb_maj_voter -- exhaustive test of the 2-of-3 majority voter against a count of ones.
module tb_maj_voter;
  logic [2:0] in;
  logic out;
  int checks = 0, failures = 0;

  maj_voter dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      checks++;
      if (out !== ($countones(in) >= 2)) begin
        failures++;
        $display("FAIL in=%b out=%b", in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
