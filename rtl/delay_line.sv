// delay_line: W-bit shift register of D stages (D = 0 is a plain wire).
// Used for the delay-equalizing latches of the pipelined counters.
// No reset: the contents are data and are flushed by the pipeline itself.
module delay_line #(
  parameter int unsigned D = 1,
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int unsigned i = 1; i < D; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[D-1];
  end
endmodule
