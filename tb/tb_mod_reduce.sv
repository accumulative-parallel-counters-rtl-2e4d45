// tb_mod_reduce: checks the reduction circuit exhaustively for an 8-bit
// input with P = 37 (six conditional subtractions) and at random for the
// default 17-bit input with P = 65521, against v mod P.
module tb_mod_reduce;
  logic [7:0]  v1;
  logic [5:0]  r1;
  logic [16:0] v2;
  logic [15:0] r2;
  int checks = 0, failures = 0;

  mod_reduce #(.WI(8), .Q(6), .P(37), .NSUB(6)) dut1 (.v(v1), .r(r1));
  mod_reduce dut2 (.v(v2), .r(r2));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      v1 = 8'(v);
      #1;
      checks++;
      if (int'(r1) != v % 37) begin
        failures++;
        if (failures < 10) $display("v=%0d r=%0d", v, r1);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      v2 = (i < 100) ? 17'(65421 + i) : 17'($urandom_range(0, 2 * 65521 - 1));
      #1;
      checks++;
      if (int'(r2) != int'(v2) % 65521) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
