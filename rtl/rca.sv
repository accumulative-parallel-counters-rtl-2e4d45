// rca: W-bit ripple-carry adder made of a chain of full adders.
// s = a + b + ci (mod 2^W), co is the carry out of the top position.
// Purely combinational; the carry ripples from bit 0 to bit W-1.
module rca #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;
  for (genvar j = 0; j < W; j++) begin : g_fa
    full_adder u_fa (.a(a[j]), .b(b[j]), .ci(c[j]), .s(s[j]), .co(c[j+1]));
  end
  assign co = c[W];
endmodule
