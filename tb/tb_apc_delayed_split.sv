// tb_apc_delayed_split: runs the split delayed-readout counter (16 inputs,
// 16-bit count, 6 carry-save bits) on random inputs with rare clears and
// compares its count after every clock with total mod 2^16 kept in the
// testbench. Long runs make the count wrap and exercise the carry select
// at readout; a small (16, 10, QL = 5) instance is checked the same way.
module tb_apc_delayed_split;
  logic        clk = 0, rst_n = 0, clr = 0;
  logic [15:0] x = '0;
  logic [15:0] c1;
  logic [9:0]  c2;
  int checks = 0, failures = 0, n_sel = 0;
  longint total = 0;

  apc_delayed_split dut (.clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(c1));
  apc_delayed_split #(.N(16), .Q(10), .QL(5)) dut2 (.clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(c2));

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
      if (longint'(c1) != total % 65536) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count=%0d exp=%0d", i, c1, total % 65536);
      end
      if (longint'(c2) != total % 1024) failures++;
      if (dut.c_low) n_sel++;
      x   = 16'($urandom);
      clr = (i == 12000);
      if (clr) total = 0; else total += ones(64'(x));
    end
    checks++;
    if (n_sel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
