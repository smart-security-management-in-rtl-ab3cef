// fuzzy_inference: rule evaluation and aggregation of a Mamdani analysis for
// one output (misuse or anomaly level).
//
// Each rule has a premise of one or two terms "input IS subset", each term
// optionally negated (1 - degree), combined with AND (min) or OR (max), and
// concludes that the output is LOW or HIGH. Because every conclusion is
// either LOW or HIGH, the aggregated output set is fully described by two
// numbers: p_l, the largest premise degree among the LOW rules, and p_h,
// the largest among the HIGH rules. Those two values are the outputs; the
// defuzzifier turns them into a crisp level. Invalid rule slots are ignored.
// Purely combinational. The rule set is a parameter (one rule_t per slot).
module fuzzy_inference
  import sm_pkg::*;
#(
  parameter rule_set_t RULES = ML_RULES
) (
  input  memb_all_t memb,   // degrees of every input in every subset
  output degree_t   p_l,    // aggregated degree of the LOW conclusion
  output degree_t   p_h,    // aggregated degree of the HIGH conclusion
  output degree_t   pre [N_RULES]  // premise degree of each rule (observation)
);

  always_comb begin
    degree_t a, b, d;
    p_l = D_0;
    p_h = D_0;
    for (int r = 0; r < N_RULES; r++) begin
      a = memb[RULES[r].in_a][RULES[r].set_a];
      b = memb[RULES[r].in_b][RULES[r].set_b];
      if (RULES[r].neg_a) a = deg_not(a);
      if (RULES[r].neg_b) b = deg_not(b);
      case (RULES[r].op)
        OP_AND:  d = deg_min(a, b);
        OP_OR:   d = deg_max(a, b);
        default: d = a;
      endcase
      if (!RULES[r].valid) d = D_0;
      pre[r] = d;
      if (RULES[r].concl_high) p_h = deg_max(p_h, d);
      else                     p_l = deg_max(p_l, d);
    end
  end

endmodule
