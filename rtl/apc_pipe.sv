// apc_pipe: bit-level pipelined modulo-2^Q accumulative parallel counter
// (the (16, 6) design for the defaults), with delayed readout.
//
// x[N-1:1] go through cpc_pipe, a parallel counter with a register after
// every full adder. Its skewed output (bit j one cycle after bit j-1) is
// deskewed by delay-equalizing registers so that all bits of one count
// reach the final row in the same cycle; x[0] is delayed by the same
// latency LAT. The final row is a carry-save accumulator: a full adder per
// count bit (half adders above the count width) adds the count to the sum
// register s_q and the carry register c_q, whose sum is the internal count.
// x[0] takes the free bit 0 of the carry register. The feedback loop holds a
// single FA. The carry out of the top half adder is registered on overflow.
//
// Timing: an x sampled at clock edge t is part of s_q + c_q after edge
// t + LAT, LAT = cpc_pipe_base(N-1) + cpc_width(N-1) - 1 (6 for N = 16:
// three FA levels, the 3-bit ripple adder's skew and the deskew registers).
// restart = 1 clears s_q and c_q while the count arriving in the same cycle
// is still taken, so the old value can be read out of s_q/c_q in that cycle
// and counting continues without a gap. rst_n is the asynchronous reset of
// the last two register rows only; the other pipeline registers have none,
// so x must be held at 0 for LAT cycles before rst_n is released.
// Counting is modulo 2^Q; the external count is (s_q + c_q) mod 2^Q.
module apc_pipe #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,
  input  logic [N-1:0] x,
  output logic [Q-1:0] s_q,
  output logic [Q-1:0] c_q,
  output logic         overflow
);
  localparam int unsigned NC   = N - 1;
  localparam int unsigned WC   = apc_pkg::cpc_width(NC);
  localparam int unsigned BASE = apc_pkg::cpc_pipe_base(NC);
  localparam int unsigned LAT  = BASE + WC - 1;

  logic [WC-1:0] cnt_skew, cnt;
  logic          x0_d;
  logic [Q-1:0]  fs, fc, s_d, cy;

  cpc_pipe #(.N(NC)) u_cpc (.clk(clk), .x(x[N-1:1]), .cnt(cnt_skew));

  for (genvar j = 0; j < WC; j++) begin : g_deskew
    delay_line #(.D(WC - 1 - j), .W(1)) u_dl (.clk(clk), .d(cnt_skew[j]), .q(cnt[j]));
  end
  delay_line #(.D(LAT), .W(1)) u_dlx0 (.clk(clk), .d(x[0]), .q(x0_d));

  // Final row: the operands fed back from the registers are zero on restart.
  assign fs = restart ? '0 : s_q;
  assign fc = restart ? '0 : c_q;

  for (genvar j = 0; j < Q; j++) begin : g_row
    if (j < WC) begin : g_fa
      full_adder u_fa (.a(cnt[j]), .b(fs[j]), .ci(fc[j]), .s(s_d[j]), .co(cy[j]));
    end else begin : g_ha
      half_adder u_ha (.a(fs[j]), .b(fc[j]), .s(s_d[j]), .co(cy[j]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q      <= '0;
      c_q      <= '0;
      overflow <= 1'b0;
    end else begin
      s_q      <= s_d;
      c_q      <= {cy[Q-2:0], x0_d};
      overflow <= cy[Q-1];
    end
  end

  initial assert (Q >= WC && Q >= 2) else $error("apc_pipe: Q too small for N");
endmodule
