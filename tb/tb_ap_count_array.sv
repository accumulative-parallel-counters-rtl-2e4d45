// tb_ap_count_array: issues count instructions into a linear array of 4
// modules with 16 responders each, on random cycles, while the responder
// flags change every clock. Each module must add its own responders as
// they are when the instruction passes it, so the expected total of an
// instruction issued at edge s is the sum over modules k of the responders
// of module k at edge s + k. done must come exactly 4 clocks after start.
module tb_ap_count_array;
  localparam int M = 4, R = 16, CYC = 4000;
  logic            clk = 0, rst_n = 0, start = 0;
  logic [M*R-1:0]  resp = '0;
  logic            done;
  logic [7:0]      total;
  logic [M*R-1:0]  hist [CYC + M + 2];
  bit              issued [CYC + M + 2];
  int checks = 0, failures = 0, n_done = 0;

  ap_count_array dut (.clk(clk), .rst_n(rst_n), .start(start), .resp(resp), .done(done), .total(total));

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
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < CYC + M + 1; e++) begin
      @(negedge clk);
      // results of an instruction issued at edge e - M appear now
      if (e >= M) begin
        checks++;
        if (done != issued[e - M]) failures++;
        if (issued[e - M]) begin
          automatic int exp = 0;
          for (int k = 0; k < M; k++) exp += ones(64'(hist[e - M + k][k*R +: R]));
          n_done++;
          checks++;
          if (int'(total) != exp) begin
            failures++;
            if (failures < 10) $display("edge %0d: total=%0d exp=%0d", e, total, exp);
          end
        end
      end
      start     = (e < CYC) && ($urandom_range(0, 2) == 0);
      resp      = (e % 100 == 5) ? '1 : {$urandom, $urandom};
      issued[e] = start;
      hist[e]   = resp;
    end
    checks++;
    if (n_done == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
