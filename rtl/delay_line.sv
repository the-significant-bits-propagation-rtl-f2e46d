// delay_line -- D-stage shift register for a W-bit word.
//
// Used for the delay of the input word between bit-planes (k_C clocks per plane) and for
// the output bits that leave the array before the last bit-plane, so that all bits of an
// output word appear in the same clock.  D = 0 gives a wire (clk and rst_n are then unused,
// which the linter reports for the first bit-plane's input).  The stages are cleared by a
// synchronous active-low reset.  Latency: exactly D clocks.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(D); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(D); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[D-1];
  end
endmodule
