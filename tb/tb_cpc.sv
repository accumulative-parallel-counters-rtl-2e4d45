// tb_cpc: self-checking testbench for the combinational parallel counter.
// Checks every input pattern of a 15-input counter (the tree of the
// (16, q) incrementer) and random patterns of 7- and 31-input counters
// against a population count computed in the testbench.
module tb_cpc;
  localparam int unsigned N1 = 15, N2 = 7, N3 = 31;
  logic [N1-1:0] x1;
  logic [N2-1:0] x2;
  logic [N3-1:0] x3;
  logic [apc_pkg::cpc_width(N1)-1:0] c1;
  logic [apc_pkg::cpc_width(N2)-1:0] c2;
  logic [apc_pkg::cpc_width(N3)-1:0] c3;
  int checks = 0, failures = 0;

  cpc #(.N(N1)) dut1 (.x(x1), .cnt(c1));
  cpc #(.N(N2)) dut2 (.x(x2), .cnt(c2));
  cpc #(.N(N3)) dut3 (.x(x3), .cnt(c3));

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    if (apc_pkg::cpc_width(N1) != 4 || apc_pkg::cpc_width(N3) != 5) failures++;
    checks++;
    for (int v = 0; v < (1 << N1); v++) begin
      x1 = N1'(v);
      x2 = N2'($urandom);
      x3 = N3'($urandom);
      #1;
      checks += 3;
      if (int'(c1) != ones(64'(x1))) failures++;
      if (int'(c2) != ones(64'(x2))) failures++;
      if (int'(c3) != ones(64'(x3))) failures++;
    end
    x3 = '1; #1; checks++; if (int'(c3) != 31) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
