// parallel_incrementer: (N, Q) parallel incrementer with ripple-carry final
// stage. z = (y + number of 1s in x) mod 2^Q, overflow = carry out.
//
// An (N-1)-input parallel counter (cpc) counts x[N-1:1]; a Q-bit
// ripple-carry adder adds that count to the additive input y, and the
// remaining increment signal x[0] enters as the adder's carry-in. This is
// the structure of the published (16, q) incrementer; Q = 6 as default is
// taken from its pipelined (16, 6) example, the Fig. 3 example leaving q open.
//
// Requires Q >= cpc_width(N-1). Purely combinational, about
// floor(log2(N-1)) + Q FA delays.
module parallel_incrementer #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 6
) (
  input  logic [N-1:0] x,
  input  logic [Q-1:0] y,
  output logic [Q-1:0] z,
  output logic         overflow
);
  localparam int unsigned WC = apc_pkg::cpc_width(N - 1);

  logic [WC-1:0] cnt;

  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .cnt(cnt));
  rca #(.W(Q)) u_add (.a(y), .b(Q'(cnt)), .ci(x[0]), .s(z), .co(overflow));

  initial assert (Q >= WC) else $error("parallel_incrementer: Q too small for N");
endmodule
