// apc: accumulative parallel counter. A Q-bit register that, on every
// cycle with en = 1, adds the number of 1s among the N inputs x to its
// content, modulo P.
//
// It is a parallel incrementer whose additive input is the register and
// whose output is written back: parallel_incrementer (ripple-carry) when
// P = 2^Q, mod_parallel_incrementer otherwise. wrap is registered with the
// count and is 1 after an update that passed P (wrapped around).
// Interface: rst_n is an asynchronous active-low reset, clr a synchronous
// clear (it wins over en); both set count to 0. The reset, clear and enable
// are this design's own. Timing: one update per clock; count shows the sum
// of all x sampled on earlier enabled edges.
module apc #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 6,
  parameter int unsigned P = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] x,
  output logic [Q-1:0] count,
  output logic         wrap
);
  logic [Q-1:0] z;
  logic         z_wrap;

  if (P == (1 << Q)) begin : g_bin
    parallel_incrementer #(.N(N), .Q(Q)) u_inc (.x(x), .y(count), .z(z), .overflow(z_wrap));
  end else begin : g_mod
    mod_parallel_incrementer #(.N(N), .Q(Q), .P(P)) u_inc (.x(x), .y(count), .z(z), .wrap(z_wrap));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      wrap  <= 1'b0;
    end else if (clr) begin
      count <= '0;
      wrap  <= 1'b0;
    end else if (en) begin
      count <= z;
      wrap  <= z_wrap;
    end
  end
endmodule
