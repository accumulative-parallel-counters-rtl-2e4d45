// half_adder: one-bit half adder (HA). s = a ^ b, co = a & b.
// Used where a column has only two bits to add. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
