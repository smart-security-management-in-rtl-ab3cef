// tb_fom_defuzzifier: all 49 (p_l, p_h) pairs against a numerical
// first-of-max of the aggregated output set, and the printed First-of-Max
// table row p_l = 0.
module tb_fom_defuzzifier;
  import sm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  degree_t pl, ph;
  level_t  lv;

  fom_defuzzifier dut (.p_l(pl), .p_h(ph), .level(lv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int row0 [7] = '{0, 35, 40, 50, 60, 65, 80};
    for (int a = 0; a < 7; a++)
      for (int b = 0; b < 7; b++) begin
        real exp_v;
        pl = degree_t'(a); ph = degree_t'(b); #1;
        exp_v = ref_fom(deg_real(pl), deg_real(ph));
        checks++;
        if (!near(lv / 100.0, exp_v, 0.0015)) begin
          failures++;
          $display("FAIL pl=%0g ph=%0g got=%0d exp=%0g", deg_real(pl), deg_real(ph), lv, exp_v);
        end
        if (a == 0) begin
          checks++;
          if (int'(lv) != row0[b]) begin
            failures++;
            $display("FAIL table row0 ph=%0d got=%0d exp=%0d", b, lv, row0[b]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
