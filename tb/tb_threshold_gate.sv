// tb_threshold_gate: for every threshold 0..31 and random input patterns
// (including all-ones and all-zeros), fire must be 1 exactly when the
// number of 1s in x is at least the threshold.
module tb_threshold_gate;
  logic [15:0] x;
  logic [4:0]  th;
  logic        fire;
  int checks = 0, failures = 0, n_fire = 0;

  threshold_gate dut (.x(x), .thresh(th), .fire(fire));

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 32; t++) begin
      for (int i = 0; i < 500; i++) begin
        th = 5'(t);
        x  = (i == 0) ? '1 : (i == 1) ? '0 : 16'($urandom) & 16'($urandom | (i % 2 ? 0 : 32'hffff));
        #1;
        checks++;
        if (fire != (ones(64'(x)) >= t)) begin
          failures++;
          if (failures < 10) $display("x=%h th=%0d fire=%0d", x, th, fire);
        end
        if (fire) n_fire++;
      end
    end
    checks++;
    if (n_fire == 0 || n_fire == checks - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
