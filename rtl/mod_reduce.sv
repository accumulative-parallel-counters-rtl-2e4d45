// mod_reduce: reduction circuit. r = v mod P for any v <= NSUB*P + P - 1.
//
// A chain of NSUB conditional subtractions: each stage subtracts P with a
// carry-propagate adder and keeps the difference when it is not negative,
// otherwise passes its input on. With the adder that forms v in front of
// it, this is the chain of carry-propagate adders the original design uses
// for readout of modular counters (two adders, i.e. NSUB = 1, in most
// cases). Purely combinational, NSUB adder-plus-mux delays.
module mod_reduce #(
  parameter int unsigned WI   = 17,
  parameter int unsigned Q    = 16,
  parameter int unsigned P    = 65521,
  parameter int unsigned NSUB = 1
) (
  input  logic [WI-1:0] v,
  output logic [Q-1:0]  r
);
  localparam logic [WI:0] PW = (WI+1)'(P);

  logic [WI:0] stage [NSUB+1];
  logic [WI:0] diff  [NSUB];

  assign stage[0] = {1'b0, v};
  for (genvar k = 0; k < NSUB; k++) begin : g_sub
    assign diff[k]    = stage[k] - PW;
    assign stage[k+1] = diff[k][WI] ? stage[k] : diff[k];
  end
  assign r = Q'(stage[NSUB]);

  initial assert (WI >= Q) else $error("mod_reduce: WI must be >= Q");
endmodule
