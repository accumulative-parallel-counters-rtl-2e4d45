// apc_delayed: modulo-2^Q accumulative parallel counter with delayed
// readout.
//
// The accumulated count is kept in carry-save form, a sum register s_q and a
// carry register c_q whose sum is the count (the internal count). Each clock
// a parallel counter (cpc) counts x[N-1:1] and one carry-save adder level
// adds that count to s_q and c_q, so the loop has a single FA delay after the
// counter, independent of Q. The carries are shifted one place left; the
// carry leaving bit Q-1 is dropped (modulo 2^Q) and reported on wrap. The
// free bit 0 of the carry register takes x[0] directly, so all N inputs are
// counted without another adder level (this design's choice). The external
// count is formed only for readout, by a Q-bit ripple-carry adder outside
// the loop: count = (s_q + c_q) mod 2^Q, combinational from the registers.
// wrap is registered and marks only the carries dropped from the
// carry-save word; the readout adder may wrap once more.
// rst_n: asynchronous reset; clr: synchronous clear of both registers.
module apc_delayed #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [N-1:0] x,
  output logic [Q-1:0] count,
  output logic         wrap
);
  localparam int unsigned WC = apc_pkg::cpc_width(N - 1);

  logic [WC-1:0] cnt;
  logic [Q-1:0]  s_q, c_q, s_d, cy;
  logic          co_unused;

  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .cnt(cnt));
  csa #(.W(Q)) u_csa (.a(s_q), .b(c_q), .c(Q'(cnt)), .s(s_d), .cy(cy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q  <= '0;
      c_q  <= '0;
      wrap <= 1'b0;
    end else if (clr) begin
      s_q  <= '0;
      c_q  <= '0;
      wrap <= 1'b0;
    end else begin
      s_q  <= s_d;
      c_q  <= {cy[Q-2:0], x[0]};
      wrap <= cy[Q-1];
    end
  end

  rca #(.W(Q)) u_readout (.a(s_q), .b(c_q), .ci(1'b0), .s(count), .co(co_unused));

  initial assert (Q >= WC && Q >= 2) else $error("apc_delayed: Q too small for N");
endmodule
