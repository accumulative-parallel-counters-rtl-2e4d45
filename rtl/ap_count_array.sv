// ap_count_array: responder counting in a linear systolic array of M
// associative-processor modules with R responder flags each.
//
// A count instruction enters module 0 with a partial count of zero and
// moves one module per clock. Each module adds the number of its own
// responders to the partial count it receives, using a parallel incrementer
// (its additive input is the incoming partial count), and registers the
// result together with the instruction's valid bit for the next module.
// After M clocks done pulses with total = number of 1s in resp, sampled
// module by module as the instruction passes. A new instruction may enter
// every clock. Only the linear arrangement is built; widths and M, R are
// this design's choices. rst_n: asynchronous reset of the valid bits and
// partial counts. Requires Q >= bits to hold M*R.
module ap_count_array #(
  parameter int unsigned M = 4,
  parameter int unsigned R = 16,
  parameter int unsigned Q = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [M*R-1:0] resp,
  output logic           done,
  output logic [Q-1:0]   total
);
  logic [M:0]   vld;
  logic [Q-1:0] part [M+1];

  assign vld[0]  = start;
  assign part[0] = '0;

  for (genvar k = 0; k < M; k++) begin : g_mod
    logic [Q-1:0] sum;
    logic         ovf_unused;
    parallel_incrementer #(.N(R), .Q(Q)) u_inc (
      .x(resp[k*R +: R]), .y(part[k]), .z(sum), .overflow(ovf_unused)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[k+1]  <= 1'b0;
        part[k+1] <= '0;
      end else begin
        vld[k+1]  <= vld[k];
        part[k+1] <= vld[k] ? sum : '0;
      end
    end
  end

  assign done  = vld[M];
  assign total = part[M];

  initial assert ((M * R) < (1 << Q)) else $error("ap_count_array: Q too small");
endmodule
