// tb_cpc_pipe: drives a new random pattern into the pipelined 15-input
// counter (and a 7-input one) every clock and checks each output bit j
// against bit j of the population count of the pattern applied
// BASE + j - 1 clock edges earlier (bit j appears one clock after bit j-1).
// The latency itself is therefore checked on every bit.
module tb_cpc_pipe;
  localparam int unsigned N1 = 15, N2 = 7;
  localparam int unsigned W1 = apc_pkg::cpc_width(N1), B1 = apc_pkg::cpc_pipe_base(N1);
  localparam int unsigned W2 = apc_pkg::cpc_width(N2), B2 = apc_pkg::cpc_pipe_base(N2);
  localparam int unsigned CYC = 3000;

  logic          clk = 0;
  logic [N1-1:0] x1 = '0;
  logic [N2-1:0] x2 = '0;
  logic [W1-1:0] c1;
  logic [W2-1:0] c2;
  int h1 [CYC];
  int h2 [CYC];
  int checks = 0, failures = 0;

  cpc_pipe #(.N(N1)) dut1 (.clk(clk), .x(x1), .cnt(c1));
  cpc_pipe #(.N(N2)) dut2 (.clk(clk), .x(x2), .cnt(c2));

  always #5 clk = ~clk;

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (B1 != 3 || W1 != 4) failures++;   // 3 FA levels before the last adder
    for (int e = 0; e < CYC; e++) begin
      @(negedge clk);
      // outputs now reflect edges up to e-1
      for (int j = 0; j < int'(W1); j++) begin
        automatic int src = e - int'(B1) - j;
        if (src >= 0) begin
          checks++;
          if (c1[j] != h1[src][j]) begin
            failures++;
            if (failures < 10) $display("edge %0d bit %0d: got %0d exp %0d", e, j, c1[j], h1[src][j]);
          end
        end
      end
      for (int j = 0; j < int'(W2); j++) begin
        automatic int src = e - int'(B2) - j;
        if (src >= 0) begin
          checks++;
          if (c2[j] != h2[src][j]) failures++;
        end
      end
      x1 = (e % 50 == 7) ? '1 : N1'($urandom);
      x2 = N2'($urandom);
      h1[e] = ones(64'(x1));
      h2[e] = ones(64'(x2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
