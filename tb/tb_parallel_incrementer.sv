// tb_parallel_incrementer: checks the (16, 6) ripple-carry parallel
// incrementer, and a (12, 5) one, against y + popcount(x) computed in the
// testbench: z must be the sum modulo 2^Q and overflow its carry-out.
// Patterns are random, plus all-ones and all-zeros corners.
module tb_parallel_incrementer;
  logic [15:0] x;
  logic [5:0]  y, z;
  logic        ovf;
  logic [11:0] x2;
  logic [4:0]  y2, z2;
  logic        ovf2;
  int checks = 0, failures = 0;

  parallel_incrementer dut (.x(x), .y(y), .z(z), .overflow(ovf));
  parallel_incrementer #(.N(12), .Q(5)) dut2 (.x(x2), .y(y2), .z(z2), .overflow(ovf2));

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  task automatic check_now();
    int s, s2;
    #1;
    s  = int'(y) + ones(64'(x));
    s2 = int'(y2) + ones(64'(x2));
    checks += 2;
    if ({ovf, z} != 7'(s)) begin
      failures++;
      if (failures < 10) $display("mismatch x=%h y=%0d z=%0d ovf=%0d exp=%0d", x, y, z, ovf, s);
    end
    if ({ovf2, z2} != 6'(s2)) failures++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '1; y = '1; x2 = '1; y2 = '1; check_now();
    x = '0; y = '0; x2 = '0; y2 = '0; check_now();
    for (int i = 0; i < 20000; i++) begin
      x  = 16'($urandom);
      y  = 6'($urandom);
      x2 = 12'($urandom);
      y2 = 5'($urandom);
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
