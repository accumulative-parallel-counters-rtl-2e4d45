// mod_parallel_incrementer: (N, Q; P) modular parallel incrementer.
// z = (y + number of 1s in x) mod P, for 2^(Q-1) < P <= 2^Q.
//
// A parallel counter (cpc) counts x[N-1:1]. A first ripple-carry adder adds
// that count to y, with x[0] on its carry-in; it is one bit wider than y
// so its carry-out is kept. A second ripple-carry adder adds the constant
// 2^Q - P to the first sum. That second sum reaches 2^Q exactly when the
// first sum is >= P; its bit Q then steers the multiplexer to output the
// second sum (the first minus P), otherwise the first sum is output, and
// wrap reports the choice. One subtraction is enough when y < P and
// N <= P, which the user must ensure. The adders-and-multiplexer structure
// follows the original design; the extra adder bit and the default P = 61 are this
// design's choices. Purely combinational, about 1 FA + 1 mux delay more
// than parallel_incrementer.
module mod_parallel_incrementer #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 6,
  parameter int unsigned P = 61
) (
  input  logic [N-1:0] x,
  input  logic [Q-1:0] y,
  output logic [Q-1:0] z,
  output logic         wrap
);
  localparam int unsigned    WC = apc_pkg::cpc_width(N - 1);
  localparam logic [Q:0]     K  = (Q+1)'((64'd1 << Q) - 64'(P));   // 2^Q - P

  logic [WC-1:0] cnt;
  logic [Q:0]    s1, s2;
  logic          co1_unused, co2_unused;

  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .cnt(cnt));
  rca #(.W(Q + 1)) u_add1 (.a({1'b0, y}), .b((Q+1)'(cnt)), .ci(x[0]), .s(s1), .co(co1_unused));
  rca #(.W(Q + 1)) u_add2 (.a(s1), .b(K), .ci(1'b0), .s(s2), .co(co2_unused));

  assign wrap = s2[Q];
  assign z    = wrap ? s2[Q-1:0] : s1[Q-1:0];

  initial begin
    assert (P <= (1 << Q) && P > (1 << (Q - 1))) else $error("mod_parallel_incrementer: need 2^(Q-1) < P <= 2^Q");
    assert (N <= P) else $error("mod_parallel_incrementer: need N <= P");
  end
endmodule
