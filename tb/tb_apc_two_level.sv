// tb_apc_two_level: runs the two-level pipelined APC, at its defaults
// (16 inputs, 6-bit internal count, 16-bit external count mod 65521) and
// with an 8-bit external count mod 251, through rounds of random input
// bursts with random flush requests. After each burst the inputs go to 0
// and, exactly LAT + PERIOD + 1 = 10 clock edges after the last pattern was
// sampled, count must equal the total number of 1s applied, modulo P
// (this checks the worst-case latency too). Transfers by the timer and by
// flush, and wraps of the external count, are counted and must all occur.
module tb_apc_two_level;
  localparam int LAT = 6, PERIOD = 3;
  logic        clk = 0, rst_n = 0, flush = 0;
  logic [15:0] x = '0;
  logic [15:0] c1;
  logic [7:0]  c2;
  int checks = 0, failures = 0, n_timer = 0, n_flush = 0, n_wrap1 = 0, n_wrap2 = 0;
  longint total = 0;

  apc_two_level dut1 (.clk(clk), .rst_n(rst_n), .x(x), .flush(flush), .count(c1));
  apc_two_level #(.N(16), .QI(6), .Q(8), .P(251)) dut2 (.clk(clk), .rst_n(rst_n), .x(x), .flush(flush), .count(c2));

  always #5 clk = ~clk;

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut1.xfer && !flush) n_timer++;
    if (dut1.xfer && flush) n_flush++;
    if (dut1.buf_valid && (int'(dut1.count) + int'(dut1.s_buf) + int'(dut1.c_buf) >= 65521)) n_wrap1++;
    if (dut2.buf_valid && (int'(dut2.count) + int'(dut2.s_buf) + int'(dut2.c_buf) >= 251)) n_wrap2++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LAT + 3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 120; r++) begin
      int len;
      len = $urandom_range(1, 300);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        x     = (i % 37 == 0) ? '1 : 16'($urandom);
        flush = ($urandom_range(0, 19) == 0);
        total += ones(64'(x));
      end
      @(negedge clk);
      x = '0;
      flush = 0;
      repeat (LAT + PERIOD + 1) @(negedge clk);
      checks += 2;
      if (longint'(c1) != total % 65521) begin
        failures++;
        if (failures < 10) $display("round %0d: count=%0d exp=%0d", r, c1, total % 65521);
      end
      if (longint'(c2) != total % 251) failures++;
    end
    checks += 4;
    if (n_timer == 0) failures++;
    if (n_flush == 0) failures++;
    if (n_wrap1 == 0) failures++;
    if (n_wrap2 == 0) failures++;
    $display("timer transfers %0d, flush transfers %0d, wraps %0d/%0d", n_timer, n_flush, n_wrap1, n_wrap2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
