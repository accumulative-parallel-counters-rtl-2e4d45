// csa: W-bit carry-save adder, one full adder per bit position with no
// carry chain. a + b + c = s + 2*cy exactly, cy being the W majority bits;
// callers shift cy left by one and decide what to do with its top bit.
// Purely combinational, one FA delay.
module csa #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  for (genvar j = 0; j < W; j++) begin : g_fa
    full_adder u_fa (.a(a[j]), .b(b[j]), .ci(c[j]), .s(s[j]), .co(cy[j]));
  end
endmodule
