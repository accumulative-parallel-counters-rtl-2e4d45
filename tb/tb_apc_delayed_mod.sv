// tb_apc_delayed_mod: runs modulo-p delayed-readout counters, (16, 6; 61)
// (16, 6; 33) and (16, 4; 9) (the second has a large 2^Q - P and needs several
// readout subtractions), on random inputs with occasional clears, and
// compares count after every clock with total mod P from the testbench.
// Counts how often the multiplexer added 2^Q - P and twice that (the
// latter is reachable only when the count is as wide as the word, as in
// the (16, 4; 9) instance).
module tb_apc_delayed_mod;
  logic        clk = 0, rst_n = 0, clr = 0;
  logic [15:0] x = '0;
  logic [5:0]  c1, c2;
  logic [3:0]  c3;
  int checks = 0, failures = 0, n_k = 0, n_2k = 0;
  longint total = 0;

  apc_delayed_mod dut (.clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(c1));
  apc_delayed_mod #(.N(16), .Q(6), .P(33)) dut2 (.clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(c2));
  apc_delayed_mod #(.N(16), .Q(4), .P(9)) dut3 (.clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(c3));

  always #5 clk = ~clk;

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks += 2;
      if (longint'(c1) != total % 61) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count=%0d exp=%0d", i, c1, total % 61);
      end
      if (longint'(c2) != total % 33) failures++;
      checks++;
      if (longint'(c3) != total % 9) failures++;
      x   = (i % 300 < 10) ? '1 : 16'($urandom);
      clr = ($urandom_range(0, 999) == 0);
      #1;
      if (dut.madd == dut.K || dut2.madd == dut2.K) n_k++;
      if (dut3.madd == 4'(2 * dut3.K)) n_2k++;
      if (clr) total = 0; else total += ones(64'(x));
    end
    checks += 2;
    if (n_k == 0) failures++;
    if (n_2k == 0) failures++;
    $display("added K %0d times, 2K %0d times", n_k, n_2k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
