// apc_two_level: two-level pipelined accumulative parallel counter. Counts
// the 1s of x every clock into a Q-bit external count modulo P, without
// ever stopping the count.
//
// The first level is apc_pipe, a pipelined counter whose internal count is
// QI bits in carry-save form. On a transfer cycle its sum and carry
// registers are copied into two QI-bit buffers and cleared in the same
// clock (restart), the count arriving in that cycle being kept. In the next
// cycle the reduction circuit adds both buffers to the external register and
// reduces the result modulo P (one carry-propagate sum, then
// floor(max/P) conditional subtractions in mod_reduce), and the external
// register takes it. Transfers are made every PERIOD = floor((2^QI - 1)/N)
// clocks, so the internal count never exceeds QI bits, and also whenever
// flush is 1; both rules are this design's own. The internal width QI = 6
// follows the original (16, 6) pipelined counter; Q = 16 and P = 65521
// are this design's choices.
//
// Timing: an x sampled at edge t is in count at most LAT + PERIOD + 1
// edges later (LAT = 6 is the latency of apc_pipe). To read a final total,
// hold x at 0 for that long (or for LAT cycles, then flush, then 2 more).
// rst_n: asynchronous reset of the register rows; x must be 0 during reset
// for LAT cycles because the counter pipeline has no reset.
module apc_two_level #(
  parameter int unsigned N  = 16,
  parameter int unsigned QI = 6,
  parameter int unsigned Q  = 16,
  parameter int unsigned P  = 65521
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  input  logic         flush,
  output logic [Q-1:0] count
);
  localparam int unsigned     PERIOD = ((1 << QI) - 1) / N;
  localparam longint unsigned VMAX   = 64'(P) - 1 + 2 * ((64'd1 << QI) - 1);
  localparam int unsigned     NSUB   = int'(VMAX / 64'(P));
  localparam int unsigned     WV     = apc_pkg::bits_for(VMAX);
  localparam int unsigned     WT     = apc_pkg::bits_for(64'(PERIOD));

  logic [QI-1:0] s_q, c_q, s_buf, c_buf;
  logic          buf_valid, xfer, int_ovf;
  logic [WT-1:0] timer;
  logic [WV-1:0] v;
  logic [Q-1:0]  r;

  assign xfer = flush || (timer == WT'(PERIOD - 1));

  apc_pipe #(.N(N), .Q(QI)) u_int (
    .clk(clk), .rst_n(rst_n), .restart(xfer), .x(x),
    .s_q(s_q), .c_q(c_q), .overflow(int_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      s_buf     <= '0;
      c_buf     <= '0;
      buf_valid <= 1'b0;
      count     <= '0;
    end else begin
      timer     <= xfer ? '0 : timer + WT'(1);
      buf_valid <= xfer;
      if (xfer) begin
        s_buf <= s_q;
        c_buf <= c_q;
      end
      if (buf_valid) count <= r;
    end
  end

  // Reduction circuit: external + buffers, modulo P.
  assign v = WV'(count) + WV'(s_buf) + WV'(c_buf);
  mod_reduce #(.WI(WV), .Q(Q), .P(P), .NSUB(NSUB)) u_red (.v(v), .r(r));

  initial assert (PERIOD >= 1 && P <= (1 << Q)) else $error("apc_two_level: QI too small for N, or P too large for Q");
  // The transfer rule keeps the internal count within QI bits.
  a_no_int_ovf: assert property (@(posedge clk) disable iff (!rst_n) !int_ovf);
endmodule
