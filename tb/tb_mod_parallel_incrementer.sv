// tb_mod_parallel_incrementer: checks (16, 6; 61), (16, 6; 63) and
// (16, 6; 33) modular parallel incrementers: for every y below P and random
// x, z must equal (y + popcount(x)) mod P and wrap must say whether P was
// subtracted. The reference is computed in the testbench.
module tb_mod_parallel_incrementer;
  logic [15:0] x;
  logic [5:0]  y, y2, y3, z, z2, z3;
  logic        w, w2, w3;
  int checks = 0, failures = 0, n_wrap = 0;

  mod_parallel_incrementer dut (.x(x), .y(y), .z(z), .wrap(w));
  mod_parallel_incrementer #(.N(16), .Q(6), .P(63)) dut2 (.x(x), .y(y2), .z(z2), .wrap(w2));
  mod_parallel_incrementer #(.N(16), .Q(6), .P(33)) dut3 (.x(x), .y(y3), .z(z3), .wrap(w3));

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  task automatic chk(input int yy, input int p, input logic [5:0] zz, input logic ww);
    int s;
    s = yy + ones(64'(x));
    checks++;
    if (int'(zz) != s % p || ww != (s >= p)) begin
      failures++;
      if (failures < 10) $display("P=%0d y=%0d x=%h z=%0d wrap=%0d", p, yy, x, zz, ww);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int yy = 0; yy < 61; yy++) begin
        x  = (r == 0) ? '1 : 16'($urandom);
        y  = 6'(yy);
        y2 = 6'(yy);
        y3 = 6'(yy % 33);
        #1;
        chk(yy, 61, z, w);
        chk(yy, 63, z2, w2);
        chk(yy % 33, 33, z3, w3);
        if (w) n_wrap++;
      end
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
