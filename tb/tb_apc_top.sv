// tb_apc_top: end-to-end test of apc_top at its default parameters. All
// counters receive the same random increment signals in bursts separated
// by idle gaps, with random enable, rare clears and random flushes. Every
// clock it checks:
//   the register APCs (mod 64 and mod 61) against the enabled total,
//   the delayed-readout APCs (mod 64, mod 65536, mod 61) against the total,
//   the carry-select incrementer and the threshold gate against x,
//   the systolic responder count against the responders it passed;
// and after each gap, the two-level pipelined APC against the total mod
// 65521. It counts how often each mechanism occurred and fails if one never
// did: wraparound of each counter, disabled cycles, clears, carries leaving
// the carry-save low part, carry select at readout, the 2^q - p correction,
// timer and flush transfers, the reduction subtracting p, carry-select and
// overflow in the incrementer, both threshold outcomes, count results.
module tb_apc_top;
  localparam int LAT = 6, PERIOD = 3, M = 4, R = 16;
  localparam int ROUNDS = 150;
  localparam int HMAX = ROUNDS * 320 + 100;

  logic        clk = 0, rst_n = 0, clr = 0, en = 0, flush = 0, ap_start = 0;
  logic [15:0] x = '0;
  logic [10:0] y_csel = '0;
  logic [4:0]  thresh = '0;
  logic [63:0] ap_resp = '0;
  logic [5:0]  cnt_bin, cnt_mod, cnt_delayed, cnt_delayed_mod;
  logic        wrap_bin, wrap_mod, wrap_delayed, ovf_csel, fire, ap_done;
  logic [15:0] cnt_split, cnt_two_level;
  logic [10:0] z_csel;
  logic [7:0]  ap_total;

  apc_top dut (.*);

  always #5 clk = ~clk;

  function automatic int ones(input logic [63:0] v);
    int k = 0;
    for (int i = 0; i < 64; i++) k += int'(v[i]);
    return k;
  endfunction

  int checks = 0, failures = 0;
  longint t_en = 0, t_all = 0, t_tl = 0;
  logic [63:0] rhist [HMAX];
  bit          ihist [HMAX];
  int e = 0;

  // mechanism counters
  int n_wrap_bin = 0, n_wrap_mod = 0, n_wrap_del = 0, n_idle = 0, n_clr = 0;
  int n_split_carry = 0, n_split_sel = 0, n_dmod_k = 0, n_timer = 0, n_flush = 0;
  int n_reduce = 0, n_csel = 0, n_csel_ovf = 0, n_fire = 0, n_nofire = 0, n_ap = 0;

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("edge %0d: %s", e, what);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_split.cy[5]) n_split_carry++;
    if (dut.u_split.c_low) n_split_sel++;
    if (dut.u_delayed_mod.madd != '0) n_dmod_k++;
    if (dut.u_two_level.xfer && !flush) n_timer++;
    if (dut.u_two_level.xfer && flush) n_flush++;
    if (dut.u_two_level.buf_valid && dut.u_two_level.v >= 17'(65521)) n_reduce++;
  end

  initial begin
    repeat (HMAX + 1000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: check outputs (state after the previous edge), then apply
  // new inputs and advance the reference models past the coming edge.
  task automatic step(input bit active);
    @(negedge clk);
    checks += 7;
    if (longint'(cnt_bin) != t_en % 64) fail("apc mod 64");
    if (longint'(cnt_mod) != t_en % 61) fail("apc mod 61");
    if (longint'(cnt_delayed) != t_all % 64) fail("apc_delayed");
    if (longint'(cnt_split) != t_all % 65536) fail("apc_delayed_split");
    if (longint'(cnt_delayed_mod) != t_all % 61) fail("apc_delayed_mod");
    if (wrap_bin) n_wrap_bin++;
    if (wrap_mod) n_wrap_mod++;
    if (wrap_delayed) n_wrap_del++;
    // combinational units, on the inputs of the previous step
    if ({ovf_csel, z_csel} != 12'(int'(y_csel) + ones(64'(x)))) fail("csel");
    if (fire != (ones(64'(x)) >= int'(thresh))) fail("threshold");
    if (fire) n_fire++; else n_nofire++;
    if ((int'(y_csel) % 16) + ones(64'(x)) >= 16) n_csel++;
    if (int'(y_csel) + ones(64'(x)) >= 2048) n_csel_ovf++;
    if (e >= M) begin
      if (ap_done != ihist[e - M]) fail("ap done");
      if (ihist[e - M]) begin
        automatic int exp = 0;
        for (int k = 0; k < M; k++) exp += ones(64'(rhist[e - M + k][k*R +: R]));
        n_ap++;
        if (int'(ap_total) != exp) fail("ap total");
      end
    end
    // new inputs
    x        = !active ? '0 : (e % 53 == 0) ? '1 : 16'($urandom);
    en       = ($urandom_range(0, 7) != 0);
    clr      = ($urandom_range(0, 2999) == 0);
    flush    = active && ($urandom_range(0, 19) == 0);
    y_csel   = ($urandom_range(0, 3) == 0) ? (11'h7ff - 11'($urandom_range(0, 15))) : 11'($urandom);
    thresh   = 5'($urandom_range(0, 20));
    ap_start = ($urandom_range(0, 2) == 0);
    ap_resp  = {$urandom, $urandom};
    ihist[e] = ap_start;
    rhist[e] = ap_resp;
    if (!en) n_idle++;
    if (clr) begin
      n_clr++;
      t_en  = 0;
      t_all = 0;
    end else begin
      if (en) t_en += ones(64'(x));
      t_all += ones(64'(x));
    end
    t_tl += ones(64'(x));
    e++;
  endtask

  initial begin
    repeat (LAT + 3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROUNDS; r++) begin
      automatic int len = $urandom_range(1, 300);
      repeat (len) step(1'b1);
      step(1'b0);
      repeat (LAT + PERIOD + 1) step(1'b0);
      checks++;
      if (longint'(cnt_two_level) != t_tl % 65521) begin
        failures++;
        if (failures < 20) $display("round %0d: two-level count=%0d exp=%0d", r, cnt_two_level, t_tl % 65521);
      end
    end
    $display("wraps bin/mod/delayed %0d/%0d/%0d, idle %0d, clears %0d", n_wrap_bin, n_wrap_mod, n_wrap_del, n_idle, n_clr);
    $display("split carries %0d, readout selects %0d, 2^q-p corrections %0d", n_split_carry, n_split_sel, n_dmod_k);
    $display("two-level transfers timer %0d flush %0d, reductions %0d", n_timer, n_flush, n_reduce);
    $display("csel selects %0d overflows %0d, fire %0d/%0d, ap counts %0d", n_csel, n_csel_ovf, n_fire, n_nofire, n_ap);
    checks += 16;
    if (n_wrap_bin == 0) fail("no wrap in apc mod 64");
    if (n_wrap_mod == 0) fail("no wrap in apc mod 61");
    if (n_wrap_del == 0) fail("no carry-save wrap");
    if (n_idle == 0) fail("no disabled cycle");
    if (n_clr == 0) fail("no clear");
    if (n_split_carry == 0) fail("no carry into the high counter");
    if (n_split_sel == 0) fail("no readout carry select");
    if (n_dmod_k == 0) fail("no 2^q-p correction");
    if (n_timer == 0) fail("no timer transfer");
    if (n_flush == 0) fail("no flush transfer");
    if (n_reduce == 0) fail("no reduction by p");
    if (n_csel == 0) fail("no carry-select");
    if (n_csel_ovf == 0) fail("no incrementer overflow");
    if (n_fire == 0) fail("never fired");
    if (n_nofire == 0) fail("always fired");
    if (n_ap == 0) fail("no responder count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
