// tb_apc: runs a modulo-2^6 and a modulo-61 accumulative parallel counter
// on random inputs with random enable and occasional clear, and compares
// count and wrap after every clock with a reference kept in the testbench.
module tb_apc;
  logic        clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [15:0] x = '0;
  logic [5:0]  cb, cm;
  logic        wb, wm;
  int checks = 0, failures = 0, rb = 0, rm = 0, n_wb = 0, n_wm = 0;
  bit          eb = 0, em = 0;

  apc dut_b (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .count(cb), .wrap(wb));
  apc #(.N(16), .Q(6), .P(61)) dut_m (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .count(cm), .wrap(wm));

  always #5 clk = ~clk;

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks += 2;
      if (int'(cb) != rb || wb != eb) failures++;
      if (int'(cm) != rm || wm != em) begin
        failures++;
        if (failures < 10) $display("cycle %0d mod: count=%0d exp=%0d", i, cm, rm);
      end
      if (wb) n_wb++;
      if (wm) n_wm++;
      x   = 16'($urandom);
      en  = ($urandom_range(0, 9) != 0);
      clr = ($urandom_range(0, 199) == 0);
      // reference for the coming clock edge
      if (clr) begin
        rb = 0; rm = 0; eb = 0; em = 0;
      end else if (en) begin
        eb = (rb + ones(64'(x))) >= 64;
        em = (rm + ones(64'(x))) >= 61;
        rb = (rb + ones(64'(x))) % 64;
        rm = (rm + ones(64'(x))) % 61;
      end
    end
    checks++;
    if (n_wb == 0 || n_wm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
