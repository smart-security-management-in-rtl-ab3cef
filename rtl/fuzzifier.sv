// fuzzifier: membership degrees of one analysis input in the eight input
// fuzzy subsets (rather low, low, very low, very very low, very very high,
// very high, high, rather high).
//
// The input range [0, S_max] is cut into five fifths, closed on the right:
// [0, S/5], ]S/5, 2S/5], ... ]4S/5, S]. Within a fifth every subset has a
// constant degree (a staircase membership function), taken from the
// membership table in sm_pkg. The fifth is found without a divider by
// comparing 5*s with k*S_max for k = 1..4. Values above S_max fall in the
// last fifth. Purely combinational; S_MAX is a parameter so each input
// channel gets its own constant comparators.
module fuzzifier
  import sm_pkg::*;
#(
  parameter value_t S_MAX = value_t'(10)
) (
  input  value_t s,       // input value (unsigned)
  output memb_t  memb     // degree of s in each subset, indexed by fset_t
);
  localparam int unsigned W = VAL_W + 3;

  logic [W-1:0] s5;
  logic [2:0]   bin;

  always_comb begin
    s5  = W'(s) * W'(5);
    bin = 3'd0;
    for (int k = 1; k <= 4; k++)
      if (s5 > W'(k) * W'(S_MAX)) bin = 3'(k);
  end

  always_comb
    for (int f = 0; f < N_FSETS; f++)
      memb[f] = membership(fset_t'(f), bin);

endmodule
