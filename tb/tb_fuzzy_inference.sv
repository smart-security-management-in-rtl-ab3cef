// tb_fuzzy_inference: random membership degrees for all inputs; every rule
// premise and the LOW/HIGH aggregates of both default rule sets are
// compared with a real-valued evaluation of the rules (min for AND, max
// for OR, 1-x for NOT).
module tb_fuzzy_inference;
  import sm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  memb_all_t memb;
  degree_t   ml_pl, ml_ph, al_pl, al_ph;
  degree_t   ml_pre [N_RULES];
  degree_t   al_pre [N_RULES];

  localparam rule_set_t NEG_RULES = '{
    '{valid: 1'b1, in_a: IN_CE, set_a: FS_LOW, neg_a: 1'b1, op: OP_AND,
      in_b: IN_PE, set_b: FS_HIGH, neg_b: 1'b0, concl_high: 1'b1},
    '{valid: 1'b1, in_a: IN_CO, set_a: FS_VERY_HIGH, neg_a: 1'b0, op: OP_OR,
      in_b: IN_NE, set_b: FS_RATHER_LOW, neg_b: 1'b1, concl_high: 1'b0},
    NO_RULE, NO_RULE, NO_RULE, NO_RULE
  };
  degree_t ng_pl, ng_ph;
  degree_t ng_pre [N_RULES];

  fuzzy_inference #(.RULES(ML_RULES))  u_ml (.memb, .p_l(ml_pl), .p_h(ml_ph), .pre(ml_pre));
  fuzzy_inference #(.RULES(AL_RULES))  u_al (.memb, .p_l(al_pl), .p_h(al_ph), .pre(al_pre));
  fuzzy_inference #(.RULES(NEG_RULES)) u_ng (.memb, .p_l(ng_pl), .p_h(ng_ph), .pre(ng_pre));

  function automatic real term(input_t i, fset_t f, logic neg);
    real v = deg_real(memb[i][f]);
    return neg ? 1.0 - v : v;
  endfunction

  task automatic check_set(rule_set_t rs, degree_t pl, degree_t ph, degree_t pre [N_RULES], string tag);
    real el = 0.0, eh = 0.0, p, a, b;
    for (int r = 0; r < N_RULES; r++) begin
      a = term(rs[r].in_a, rs[r].set_a, rs[r].neg_a);
      b = term(rs[r].in_b, rs[r].set_b, rs[r].neg_b);
      if (rs[r].op == OP_AND) p = rmin(a, b);
      else if (rs[r].op == OP_OR) p = rmax(a, b);
      else p = a;
      if (!rs[r].valid) p = 0.0;
      checks++;
      if (!near(deg_real(pre[r]), p, 1e-6)) begin
        failures++; $display("FAIL %s rule %0d got=%0g exp=%0g", tag, r, deg_real(pre[r]), p);
      end
      if (rs[r].concl_high) eh = rmax(eh, p); else el = rmax(el, p);
    end
    checks += 2;
    if (!near(deg_real(pl), el, 1e-6)) begin failures++; $display("FAIL %s p_l", tag); end
    if (!near(deg_real(ph), eh, 1e-6)) begin failures++; $display("FAIL %s p_h", tag); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N_INPUTS; i++)
        for (int f = 0; f < N_FSETS; f++)
          memb[i][f] = degree_t'($urandom_range(0, 6));
      #1;
      check_set(ML_RULES,  ml_pl, ml_ph, ml_pre, "ml");
      check_set(AL_RULES,  al_pl, al_ph, al_pre, "al");
      check_set(NEG_RULES, ng_pl, ng_ph, ng_pre, "neg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
