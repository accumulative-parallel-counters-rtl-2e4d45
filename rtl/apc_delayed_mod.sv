// apc_delayed_mod: modulo-P accumulative parallel counter with delayed
// readout, for 2^(Q-1) < P <= 2^Q.
//
// The internal count is carry-save (sum register s_q, carry register c_q)
// plus a one-bit register w_q of weight 2^Q. Each clock:
//   level 1: a carry-save adder adds the parallel count of x[N-1:1] to s_q
//            and c_q; x[0] takes the free bit 0 of the shifted carries.
//            The carry leaving bit Q-1 (weight 2^Q) is not kept.
//   level 2: a second carry-save adder adds m*(2^Q - P), chosen by a
//            multiplexer, where m = (carry dropped by level 1) + w_q;
//            since 2^Q = 2^Q - P (mod P) this replaces the dropped weight.
//            The carry this level drops goes to w_q for the next clock.
// Because P > 2^(Q-1), 2*(2^Q - P) < 2^Q fits the multiplexer's Q bits.
// The 2*(2^Q - P) choice can only arise when the count is as wide as the
// word (Q = cpc_width(N-1)); for wider words it stays unused.
// At readout the value s_q + c_q + w_q*(2^Q - P) (below 3*2^Q) is formed by
// one adder and brought below P by mod_reduce (floor(max/P) conditional
// subtractions). count is combinational from the registers.
// The two CSA levels and the multiplexer follow the original design; the w_q
// register, which makes the level-2 carry exact, is this design's own.
// rst_n: asynchronous reset; clr: synchronous clear.
module apc_delayed_mod #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 6,
  parameter int unsigned P = 61
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [N-1:0] x,
  output logic [Q-1:0] count
);
  localparam int unsigned   WC    = apc_pkg::cpc_width(N - 1);
  localparam logic [Q-1:0]  K     = Q'((64'd1 << Q) - 64'(P));       // 2^Q - P
  localparam longint unsigned VMAX = 2 * ((64'd1 << Q) - 1) + ((64'd1 << Q) - 64'(P));
  localparam int unsigned   NSUB  = int'(VMAX / 64'(P));
  localparam int unsigned   WV    = Q + 2;

  logic [WC-1:0] cnt;
  logic [Q-1:0]  s_q, c_q, s1, cy1, c1, s2, cy2, madd;
  logic          w_q;
  logic [WV-1:0] v;

  cpc #(.N(N - 1)) u_cpc (.x(x[N-1:1]), .cnt(cnt));

  csa #(.W(Q)) u_csa1 (.a(s_q), .b(c_q), .c(Q'(cnt)), .s(s1), .cy(cy1));
  assign c1 = {cy1[Q-2:0], x[0]};

  always_comb begin
    unique case ({cy1[Q-1], w_q})
      2'b00:          madd = '0;
      2'b01, 2'b10:   madd = K;
      default:        madd = Q'(2 * K);
    endcase
  end

  csa #(.W(Q)) u_csa2 (.a(s1), .b(c1), .c(madd), .s(s2), .cy(cy2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
      w_q <= 1'b0;
    end else if (clr) begin
      s_q <= '0;
      c_q <= '0;
      w_q <= 1'b0;
    end else begin
      s_q <= s2;
      c_q <= {cy2[Q-2:0], 1'b0};
      w_q <= cy2[Q-1];
    end
  end

  // Readout: assimilate and reduce modulo P.
  assign v = WV'(s_q) + WV'(c_q) + (w_q ? WV'(K) : '0);
  mod_reduce #(.WI(WV), .Q(Q), .P(P), .NSUB(NSUB)) u_red (.v(v), .r(count));

  initial begin
    assert (P <= (1 << Q) && P > (1 << (Q - 1))) else $error("apc_delayed_mod: need 2^(Q-1) < P <= 2^Q");
    assert (Q >= WC && Q >= 2) else $error("apc_delayed_mod: Q too small for N");
  end
endmodule
