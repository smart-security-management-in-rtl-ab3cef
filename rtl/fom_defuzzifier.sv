// fom_defuzzifier: first-of-max defuzzification of the aggregated output set
// max(min(p_l, LOW(y)), min(p_h, HIGH(y))) into a crisp level in hundredths.
//
// The output sets are LOW(y) = 1 on [0,0.2], 2/3 - 5/3*y on ]0.2,0.8], 0
// above, and HIGH(y) = 1 - LOW(y). If p_l >= p_h the supremum p_l is already
// reached at y = 0 (also when both are 0), so the result is 0. Otherwise the
// supremum p_h is first reached where HIGH(y) = p_h, i.e. at
// y = 0.2 + 0.6*p_h, which gives 0.35, 0.40, 0.50, 0.60, 0.65 and 0.80 for
// p_h = 1/4, 1/3, 1/2, 2/3, 3/4, 1. Purely combinational.
module fom_defuzzifier
  import sm_pkg::*;
(
  input  degree_t p_l,
  input  degree_t p_h,
  output level_t  level   // crisp level, hundredths
);

  always_comb begin
    if (p_l >= p_h) level = level_t'(0);
    else
      case (p_h)
        D_1_4:   level = level_t'(35);
        D_1_3:   level = level_t'(40);
        D_1_2:   level = level_t'(50);
        D_2_3:   level = level_t'(60);
        D_3_4:   level = level_t'(65);
        D_1:     level = level_t'(80);
        default: level = level_t'(0);
      endcase
  end

endmodule
