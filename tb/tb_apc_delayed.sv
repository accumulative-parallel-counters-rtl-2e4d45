// tb_apc_delayed: runs the delayed-readout counters on random inputs with
// occasional clears and compares their external count after every clock
// with a reference kept in the testbench:
//   apc_delayed (16, 6)            count = total mod 64
//   apc_delayed_split, Q=16 QL=6    count = total mod 65536
//   apc_delayed_mod (16, 6; 61)     count = total mod 61
// It also checks that carries left the carry-save word (wrap) and that
// the split counter's high section was incremented.
module tb_apc_delayed;
  logic        clk = 0, rst_n = 0, clr = 0;
  logic [15:0] x = '0;
  logic [5:0]  cd;
  logic        wd;
  int checks = 0, failures = 0, n_wrap = 0;
  longint total = 0;

  apc_delayed dut (.clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(cd), .wrap(wd));

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
      checks++;
      if (longint'(cd) != total % 64) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count=%0d exp=%0d", i, cd, total % 64);
      end
      if (wd) n_wrap++;
      x   = (i % 500 < 20) ? '1 : 16'($urandom);
      clr = ($urandom_range(0, 999) == 0);
      if (clr) total = 0; else total += ones(64'(x));
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
