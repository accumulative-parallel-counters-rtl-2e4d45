// threshold_gate: threshold logic unit made from a parallel incrementer.
// fire = 1 when at least thresh of the N inputs x are 1.
//
// The incrementer's additive input is set to -thresh in Q-bit two's
// complement, so its output is (number of 1s) - thresh and its sign bit
// tells directly whether the threshold is reached; no comparator is needed.
// Using the incrementer with a negated threshold follows the original design;
// the reading "fire when count >= thresh" and the widths are this design's.
// Requires N < 2^(Q-1) so the difference cannot overflow; thresh is an
// unsigned Q-1 bit value. Purely combinational. Equal input weights only.
module threshold_gate #(
  parameter int unsigned N = 16,
  parameter int unsigned Q = 6
) (
  input  logic [N-1:0] x,
  input  logic [Q-2:0] thresh,
  output logic         fire
);
  logic [Q-1:0] y, z;
  logic         ovf_unused;

  assign y = -{1'b0, thresh};
  parallel_incrementer #(.N(N), .Q(Q)) u_inc (.x(x), .y(y), .z(z), .overflow(ovf_unused));
  assign fire = ~z[Q-1];

  initial assert (N < (1 << (Q - 1))) else $error("threshold_gate: Q too small for N");
endmodule
