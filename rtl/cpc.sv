// cpc: combinational parallel counter. cnt is the number of 1s among the N
// inputs x, in binary.
//
// Built by divide and conquer from full adders: two counters of a and b
// inputs (a = (N-1)/2, b = N-1-a) are added by a ripple-carry adder whose
// carry-in takes the one remaining input x[N-1]. Three single bits make one
// FA, two 3-input counters plus a bit make a 7-input counter with a 2-bit
// adder, two of those plus a bit a 15-input counter with a 3-bit adder, and
// so on; this is the tree of the (16, q) incrementer. N = 2 is a half adder.
// The recursion follows the original design; the split for N not of the form 2^k - 1
// is this design's own choice.
//
// Width of cnt: apc_pkg::cpc_width(N) (floor(log2 N) + 1 for N = 2^k - 1).
// Timing: purely combinational, about 2*floor(log2 N) - 1 FA delays.
// The lint pass of Verilator reports cnt_a and cnt_b as undriven: it checks the module
// body before the recursive sub-instances that drive them are elaborated.
// They are driven by u_a and u_b; simulation of the full tree confirms it.
module cpc #(
  parameter  int unsigned N = 15,
  localparam int unsigned W = apc_pkg::cpc_width(N)
) (
  input  logic [N-1:0] x,
  output logic [W-1:0] cnt
);
  if (N == 1) begin : g_one
    assign cnt = x;
  end else if (N == 2) begin : g_two
    half_adder u_ha (.a(x[0]), .b(x[1]), .s(cnt[0]), .co(cnt[1]));
  end else begin : g_split
    localparam int unsigned NA = (N - 1) / 2;
    localparam int unsigned NB = N - 1 - NA;
    localparam int unsigned WA = apc_pkg::cpc_width(NA);
    localparam int unsigned WB = apc_pkg::cpc_width(NB);
    localparam int unsigned L  = W - 1;   // length of the combining adder

    logic [WA-1:0] cnt_a;
    logic [WB-1:0] cnt_b;
    logic [L-1:0]  op_a, op_b;
    logic [L:0]    c;

    cpc #(.N(NA)) u_a (.x(x[NA-1:0]),   .cnt(cnt_a));
    cpc #(.N(NB)) u_b (.x(x[N-2:NA]),   .cnt(cnt_b));

    assign op_a = L'(cnt_a);
    assign op_b = L'(cnt_b);
    assign c[0] = x[N-1];
    for (genvar j = 0; j < L; j++) begin : g_fa
      full_adder u_fa (.a(op_a[j]), .b(op_b[j]), .ci(c[j]), .s(cnt[j]), .co(c[j+1]));
    end
    assign cnt[L] = c[L];
  end
endmodule
