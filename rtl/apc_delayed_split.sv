// apc_delayed_split: modulo-2^Q delayed-readout APC whose low QL bits are
// kept in carry-save form and whose high Q-QL bits are an ordinary counter.
//
// The low section works like apc_delayed: a parallel counter and one
// carry-save adder level update a QL-bit sum register and carry register
// each clock, x[0] entering the free bit 0 of the carry register. The carry
// that leaves bit QL-1 of the carry-save adder has weight 2^QL and is at most
// one per clock, so it simply increments the high counter. Since the high
// bits change rarely, they need no carry-save form. At readout the low
// registers are added by a QL-bit ripple-carry adder; its carry (at most 1)
// selects either the high count or the high count + 1 (carry select).
// The original design suggests a constant-time counter for the high part; a plain
// binary counter is used here. The split QL = 6 is this design's choice.
// count is combinational from the registers. Requires QL >= cpc_width(N-1)
// and Q > QL. rst_n: asynchronous reset; clr: synchronous clear.
module apc_delayed_split #(
  parameter int unsigned N  = 16,
  parameter int unsigned Q  = 16,
  parameter int unsigned QL = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [N-1:0] x,
  output logic [Q-1:0] count
);
  localparam int unsigned WC = apc_pkg::cpc_width(N - 1);
  localparam int unsigned QH = Q - QL;

  logic [WC-1:0] cnt;
  logic [QL-1:0] s_q, c_q, s_d, cy, low;
  logic [QH-1:0] hi_q, hi_inc;
  logic          c_low;

  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .cnt(cnt));
  csa #(.W(QL)) u_csa (.a(s_q), .b(c_q), .c(QL'(cnt)), .s(s_d), .cy(cy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q  <= '0;
      c_q  <= '0;
      hi_q <= '0;
    end else if (clr) begin
      s_q  <= '0;
      c_q  <= '0;
      hi_q <= '0;
    end else begin
      s_q  <= s_d;
      c_q  <= {cy[QL-2:0], x[0]};
      if (cy[QL-1]) hi_q <= hi_inc;
    end
  end

  assign hi_inc = hi_q + QH'(1);

  // Readout: assimilate the low carry-save part, carry-select the high part.
  rca #(.W(QL)) u_readout (.a(s_q), .b(c_q), .ci(1'b0), .s(low), .co(c_low));
  assign count = {(c_low ? hi_inc : hi_q), low};

  initial assert (QL >= WC && QL >= 2 && Q > QL) else $error("apc_delayed_split: bad QL");
endmodule
