// apc_top: the accumulative parallel counter designs side by side.
//
// All counters take the same N increment signals x every clock, so their
// results can be compared directly:
//   apc (P = 2^Q)        register + ripple-carry parallel incrementer
//   apc (P = P_MOD)      register + modular parallel incrementer
//   apc_delayed          carry-save internal count, readout adder
//   apc_delayed_split    carry-save low part, counter high part
//   apc_delayed_mod      carry-save modulo-P count, readout reduction
//   apc_two_level        bit-level pipelined internal counter, buffers,
//                        reduction into a Q-bit external register mod P
// Next to them stand the combinational units: a carry-select parallel
// incrementer (x plus its own additive input y_csel) and a threshold gate
// on x, and the systolic responder-count array with its own inputs.
// Widths and moduli are the defaults of the instantiated modules (N = 16,
// Q = 6 for the small counters, 16 bits for the split and two-level ones,
// P = 61 and 65521); they are fixed here so the top has a single parameter.
// Timing of each output is that of its module; rst_n resets them all, clr
// clears the non-pipelined counters, flush forces a transfer in the
// two-level counter. x must be 0 while rst_n is low (pipeline fill).
module apc_top #(
  parameter int unsigned N = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [N-1:0]  x,
  input  logic          flush,
  input  logic [10:0]   y_csel,
  input  logic [4:0]    thresh,
  input  logic          ap_start,
  input  logic [63:0]   ap_resp,
  output logic [5:0]    cnt_bin,
  output logic          wrap_bin,
  output logic [5:0]    cnt_mod,
  output logic          wrap_mod,
  output logic [5:0]    cnt_delayed,
  output logic          wrap_delayed,
  output logic [15:0]   cnt_split,
  output logic [5:0]    cnt_delayed_mod,
  output logic [15:0]   cnt_two_level,
  output logic [10:0]   z_csel,
  output logic          ovf_csel,
  output logic          fire,
  output logic          ap_done,
  output logic [7:0]    ap_total
);
  apc #(.N(N), .Q(6), .P(64)) u_apc_bin (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .count(cnt_bin), .wrap(wrap_bin)
  );
  apc #(.N(N), .Q(6), .P(61)) u_apc_mod (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .count(cnt_mod), .wrap(wrap_mod)
  );
  apc_delayed #(.N(N), .Q(6)) u_delayed (
    .clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(cnt_delayed), .wrap(wrap_delayed)
  );
  apc_delayed_split #(.N(N), .Q(16), .QL(6)) u_split (
    .clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(cnt_split)
  );
  apc_delayed_mod #(.N(N), .Q(6), .P(61)) u_delayed_mod (
    .clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .count(cnt_delayed_mod)
  );
  apc_two_level #(.N(N), .QI(6), .Q(16), .P(65521)) u_two_level (
    .clk(clk), .rst_n(rst_n), .x(x), .flush(flush), .count(cnt_two_level)
  );
  parallel_incrementer_csel #(.N(N), .Q(11)) u_csel (
    .x(x), .y(y_csel), .z(z_csel), .overflow(ovf_csel)
  );
  threshold_gate #(.N(N), .Q(6)) u_thr (
    .x(x), .thresh(thresh), .fire(fire)
  );
  ap_count_array #(.M(4), .R(16), .Q(8)) u_ap (
    .clk(clk), .rst_n(rst_n), .start(ap_start), .resp(ap_resp), .done(ap_done), .total(ap_total)
  );
endmodule
