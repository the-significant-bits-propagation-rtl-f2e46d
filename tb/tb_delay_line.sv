// tb_delay_line -- a random word stream must come out exactly D clocks later, and the
// stages must read zero after reset.
module tb_delay_line;
  localparam int unsigned W = 8;
  localparam int unsigned D = 5;
  logic clk = 0, rst_n;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.W(W), .D(D)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    d = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL q=%h after reset", q); end
    rst_n = 1;
    for (int i = 0; i < D; i++) hist.push_back('0);
    for (int t = 0; t < 200; t++) begin
      d = W'($urandom);
      hist.push_back(d);
      @(posedge clk);
      #1;
      void'(hist.pop_front());
      checks++;
      if (q !== hist[0]) begin
        failures++;
        $display("FAIL t=%0d q=%h expected %h", t, q, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
