// tb_csel_wide: the carry-select parallel incrementer at the large size the
// original design quotes for it, 2048 increment signals with q = 13 and q = 32 (the
// ends of the range where one level of carry select with a ripple
// incrementer is fastest). Random and dense/sparse input vectors and
// random y, including y near 2^q so the result overflows, are checked
// against y + popcount(x) computed in the testbench.
module tb_csel_wide;
  localparam int N = 2048;
  logic [N-1:0]  x;
  logic [12:0]   y13, z13;
  logic [31:0]   y32, z32;
  logic          o13, o32;
  int checks = 0, failures = 0, n_ovf = 0;

  parallel_incrementer_csel #(.N(N), .Q(13)) dut13 (.x(x), .y(y13), .z(z13), .overflow(o13));
  parallel_incrementer_csel #(.N(N), .Q(32)) dut32 (.x(x), .y(y32), .z(z32), .overflow(o32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ones, s13, s32;
    for (int i = 0; i < 400; i++) begin
      for (int w = 0; w < N / 32; w++) begin
        case (i % 4)
          0: x[w*32 +: 32] = $urandom;
          1: x[w*32 +: 32] = $urandom | $urandom;      // dense
          2: x[w*32 +: 32] = $urandom & $urandom & $urandom;  // sparse
          default: x[w*32 +: 32] = '1;
        endcase
      end
      y13 = (i % 3 == 0) ? 13'h1fff - 13'($urandom_range(0, 2047)) : 13'($urandom);
      y32 = (i % 3 == 0) ? 32'hffff_ffff - 32'($urandom_range(0, 2047)) : $urandom;
      #1;
      ones = 0;
      for (int b = 0; b < N; b++) ones += longint'(x[b]);
      s13 = longint'(y13) + ones;
      s32 = longint'(y32) + ones;
      if (s32 >= 64'h1_0000_0000) n_ovf++;
      checks += 2;
      if ({o13, z13} != 14'(s13)) begin
        failures++;
        if (failures < 10) $display("q=13: y=%0d ones=%0d z=%0d ovf=%0d", y13, ones, z13, o13);
      end
      if ({o32, z32} != 33'(s32)) failures++;
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
