// tb_final_adder -- random and corner operands; the sum must equal (s + v) mod 2^L0.
module tb_final_adder;
  localparam int unsigned L0 = 16;
  logic [L0-1:0] s, v, sum;
  int checks = 0, failures = 0;

  final_adder #(.L0(L0)) dut (.s(s), .v(v), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      case (t)
        0: begin s = '1; v = 1; end
        1: begin s = '1; v = '1; end
        2: begin s = 0; v = 0; end
        default: begin s = L0'($urandom); v = L0'($urandom); end
      endcase
      #1;
      checks++;
      if (sum !== L0'(s + v)) begin
        failures++;
        $display("FAIL %h + %h -> %h", s, v, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
