// parallel_incrementer_csel: (N, Q) parallel incrementer with carry-select
// for the high-order bits. z = (y + number of 1s in x) mod 2^Q.
//
// The low L = cpc_width(N-1) bits (floor(log2(N-1)) + 1 for N = 2^k) are formed
// as in parallel_incrementer: an (N-1)-input counter and an L-bit
// ripple-carry adder with x[0] on the carry-in. Meanwhile the Q-L high bits
// of y go through a ripple incrementer (a chain of half adders) that yields
// y_hi + 1 and its carry. The carry out of the low adder drives a multiplexer
// that outputs either y_hi (carry 0, no overflow) or y_hi + 1 with its carry
// as overflow. The incrementer runs in parallel with the counter, so the
// delay is about 2*floor(log2(N-1)) + 2 FA delays for Q up to
// 3*floor(log2(N-1)) + 2. The default Q = 11 is the top of the range the
// original design quotes for N = 16. Requires Q > L. Purely combinational.
module parallel_incrementer_csel #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 11
) (
  input  logic [N-1:0] x,
  input  logic [Q-1:0] y,
  output logic [Q-1:0] z,
  output logic         overflow
);
  localparam int unsigned L = apc_pkg::cpc_width(N - 1);
  localparam int unsigned H = Q - L;

  logic [L-1:0] cnt;
  logic         c_low;
  logic [H-1:0] y_hi, y_inc;
  logic [H:0]   ic;                       // incrementer carries

  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .cnt(cnt));
  rca #(.W(L)) u_low (.a(y[L-1:0]), .b(cnt), .ci(x[0]), .s(z[L-1:0]), .co(c_low));

  assign y_hi  = y[Q-1:L];
  assign ic[0] = 1'b1;
  for (genvar j = 0; j < H; j++) begin : g_inc
    half_adder u_ha (.a(y_hi[j]), .b(ic[j]), .s(y_inc[j]), .co(ic[j+1]));
  end

  always_comb begin
    if (c_low) begin
      z[Q-1:L] = y_inc;
      overflow = ic[H];
    end else begin
      z[Q-1:L] = y_hi;
      overflow = 1'b0;
    end
  end

  initial assert (Q > L) else $error("parallel_incrementer_csel: Q must exceed the counter width");
endmodule
