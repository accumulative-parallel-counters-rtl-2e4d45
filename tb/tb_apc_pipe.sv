// tb_apc_pipe: runs the pipelined (16, 6) APC on random inputs with random
// restarts. After every clock the internal count (s_q + c_q) mod 64 must
// equal a reference that adds the popcount of the pattern applied LAT
// edges earlier, restarting from that count on a restart cycle (so no
// count is lost at a restart). Also checks that the value read out in a
// restart cycle is the full count up to that point, and that overflow
// pulses occur. LAT = 6 for the (16, 6) counter. A (12, 6) instance (the
// size named in the text next to the 16-input figure) is checked the same
// way on x[11:0]; its latency is also 6.
module tb_apc_pipe;
  localparam int LAT = 6;
  localparam int CYC = 20000;
  logic        clk = 0, rst_n = 0, restart = 0;
  logic [15:0] x = '0;
  logic [5:0]  s_q, c_q;
  logic        ovf;
  logic [5:0]  s2, c2;
  logic        ovf2;
  int h2 [CYC + LAT];
  int ref2 = 0;
  int h [CYC + LAT];
  int checks = 0, failures = 0, n_ovf = 0, n_restart = 0;
  int ref_cnt = 0;

  apc_pipe #(.N(12), .Q(6)) dut2 (.clk(clk), .rst_n(rst_n), .restart(restart), .x(x[11:0]), .s_q(s2), .c_q(c2), .overflow(ovf2));
  apc_pipe dut (.clk(clk), .rst_n(rst_n), .restart(restart), .x(x), .s_q(s_q), .c_q(c_q), .overflow(ovf));

  always #5 clk = ~clk;

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  initial begin
    repeat (CYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // x = 0 during reset flushes the counter pipeline.
    for (int i = 0; i < LAT; i++) begin h[i] = 0; h2[i] = 0; end
    repeat (LAT + 3) @(negedge clk);
    rst_n = 1;
    for (int e = LAT; e < CYC + LAT; e++) begin
      @(negedge clk);
      checks++;
      if ((int'(s_q) + int'(c_q)) % 64 != ref_cnt % 64) begin
        failures++;
        if (failures < 10) $display("edge %0d: s+c=%0d exp=%0d", e, (int'(s_q) + int'(c_q)) % 64, ref_cnt % 64);
      end
      if (ovf) n_ovf++;
      checks++;
      if ((int'(s2) + int'(c2)) % 64 != ref2 % 64) failures++;
      x       = (e % 400 < 40) ? '1 : 16'($urandom);
      restart = ($urandom_range(0, 9) == 0);
      h[e]    = ones(64'(x));
      h2[e]   = ones(64'(x[11:0]));
      if (restart) begin
        n_restart++;
        ref_cnt = h[e - LAT];
        ref2    = h2[e - LAT];
      end else begin
        ref_cnt = ref_cnt + h[e - LAT];
        ref2    = ref2 + h2[e - LAT];
      end
    end
    checks += 2;
    if (n_ovf == 0) failures++;
    if (n_restart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
