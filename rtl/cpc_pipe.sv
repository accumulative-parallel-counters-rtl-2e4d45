// cpc_pipe: bit-level pipelined parallel counter. Counts the 1s among the N
// inputs x with the same full-adder tree as cpc, but with a register after
// every full adder, so the clock period is one FA delay plus register
// overhead.
//
// Output timing is skewed: bit j of cnt passes BASE + j registers, so for
// an x sampled at clock edge t it is valid after edge t + BASE + j - 1,
// BASE = apc_pkg::cpc_pipe_base(N) (3 for N = 15).
// Each combining ripple-carry adder works on a diagonal: position j adds the
// sub-count bits j (arriving at T + j) and the carry registered by position
// j-1, so sums and ripple carries each pass one register. The top carry of
// each adder passes a second register to keep the one-cycle-per-bit skew,
// and extra inputs and the shallower sub-count are delayed to line up
// (delay-equalizing registers). Registering every FA output follows the
// original pipelined counter; the skewed arrangement of the ripple
// adders is this design's reading of it. No reset: the pipeline empties
// itself after BASE + width cycles of valid input.
// The lint pass of Verilator reports cnt_a and cnt_b as undriven: it checks the module
// body before the recursive sub-instances that drive them are elaborated.
// They are driven by u_a and u_b; simulation of the full tree confirms it.
module cpc_pipe #(
  parameter  int unsigned N    = 15,
  localparam int unsigned W    = apc_pkg::cpc_width(N),
  localparam int unsigned BASE = apc_pkg::cpc_pipe_base(N)
) (
  input  logic         clk,
  input  logic [N-1:0] x,
  output logic [W-1:0] cnt
);
  if (N == 1) begin : g_one
    assign cnt = x;
  end else if (N == 2) begin : g_two
    logic s_d, c_d, s_q, c_q, c_qq;
    half_adder u_ha (.a(x[0]), .b(x[1]), .s(s_d), .co(c_d));
    always_ff @(posedge clk) begin
      s_q  <= s_d;
      c_q  <= c_d;
      c_qq <= c_q;
    end
    assign cnt = {c_qq, s_q};
  end else begin : g_split
    localparam int unsigned NA = (N - 1) / 2;
    localparam int unsigned NB = N - 1 - NA;
    localparam int unsigned WA = apc_pkg::cpc_width(NA);
    localparam int unsigned WB = apc_pkg::cpc_width(NB);
    localparam int unsigned BA = apc_pkg::cpc_pipe_base(NA);
    localparam int unsigned BB = apc_pkg::cpc_pipe_base(NB);
    localparam int unsigned T  = BASE - 1;   // arrival of bit 0 at the adder
    localparam int unsigned L  = W - 1;      // length of the combining adder

    logic [WA-1:0] cnt_a, cnt_a_d;
    logic [WB-1:0] cnt_b, cnt_b_d;
    logic [L-1:0]  op_a, op_b, s_d, co_d, sum_q, cy_q;
    logic [L-1:0]  ci;                       // carry into position j
    logic          x_d, c_top_q;

    cpc_pipe #(.N(NA)) u_a (.clk(clk), .x(x[NA-1:0]), .cnt(cnt_a));
    cpc_pipe #(.N(NB)) u_b (.clk(clk), .x(x[N-2:NA]), .cnt(cnt_b));

    delay_line #(.D(T - BA), .W(WA)) u_dla (.clk(clk), .d(cnt_a), .q(cnt_a_d));
    delay_line #(.D(T - BB), .W(WB)) u_dlb (.clk(clk), .d(cnt_b), .q(cnt_b_d));
    delay_line #(.D(T),      .W(1))  u_dlx (.clk(clk), .d(x[N-1]), .q(x_d));

    assign op_a = L'(cnt_a_d);
    assign op_b = L'(cnt_b_d);

    if (L == 1) begin : g_ci1
      assign ci = x_d;
    end else begin : g_cin
      assign ci = {cy_q[L-2:0], x_d};
    end
    for (genvar j = 0; j < L; j++) begin : g_fa
      full_adder u_fa (.a(op_a[j]), .b(op_b[j]), .ci(ci[j]), .s(s_d[j]), .co(co_d[j]));
    end

    always_ff @(posedge clk) begin
      sum_q   <= s_d;
      cy_q    <= co_d;
      c_top_q <= cy_q[L-1];   // second register on the top carry keeps the skew regular
    end
    assign cnt = {c_top_q, sum_q};
  end
endmodule
