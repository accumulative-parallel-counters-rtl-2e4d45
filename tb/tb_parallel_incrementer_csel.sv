// tb_parallel_incrementer_csel: checks the (16, 11) carry-select parallel
// incrementer against y + popcount(x) computed in the testbench, with
// random y and with y chosen so the low section carries into the high
// section and so the whole word overflows. Both carry-select paths must
// be taken.
module tb_parallel_incrementer_csel;
  logic [15:0] x;
  logic [10:0] y, z;
  logic        ovf;
  int checks = 0, failures = 0, n_sel = 0, n_ovf = 0;

  parallel_incrementer_csel dut (.x(x), .y(y), .z(z), .overflow(ovf));

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
    int s;
    for (int i = 0; i < 30000; i++) begin
      x = 16'($urandom);
      case (i % 3)
        0: y = 11'($urandom);
        1: y = {7'($urandom), 4'b1111 - 4'($urandom_range(0, 3))};
        default: y = 11'h7ff - 11'($urandom_range(0, 16));
      endcase
      #1;
      s = int'(y) + ones(64'(x));
      if ((int'(y) % 16) + ones(64'(x)) >= 16) n_sel++;
      if (s >= 2048) n_ovf++;
      checks++;
      if ({ovf, z} != 12'(s)) begin
        failures++;
        if (failures < 10) $display("mismatch x=%h y=%0d z=%0d ovf=%0d exp=%0d", x, y, z, ovf, s);
      end
    end
    checks += 2;
    if (n_sel == 0) failures++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
