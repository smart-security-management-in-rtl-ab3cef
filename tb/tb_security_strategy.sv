// tb_security_strategy: random and directed input vectors through the whole
// decision. The reference fuzzifies with real-valued staircases, evaluates
// the default rule sets with min/max, defuzzifies by numerical first-of-max
// and applies the configuration and settings tables. The result must come
// exactly two cycles after 'start'.
module tb_security_strategy;
  import sm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  value_t [N_INPUTS-1:0] vals;
  logic    valid;
  level_t  ml, al;
  config_t cfg;
  cm_cfg_t cm;
  int      seen [4] = '{0, 0, 0, 0};

  security_strategy dut (.clk, .rst_n, .start, .vals, .valid, .ml, .al, .cfg, .cm);

  always #5 clk = ~clk;

  function automatic real ref_level(rule_set_t rs);
    real el = 0.0, eh = 0.0, a, b, p;
    for (int r = 0; r < N_RULES; r++) begin
      a = ref_memb(int'(rs[r].set_a), real'(vals[rs[r].in_a]), smax_of(int'(rs[r].in_a)));
      b = ref_memb(int'(rs[r].set_b), real'(vals[rs[r].in_b]), smax_of(int'(rs[r].in_b)));
      if (rs[r].neg_a) a = 1.0 - a;
      if (rs[r].neg_b) b = 1.0 - b;
      p = (rs[r].op == OP_AND) ? rmin(a, b) : (rs[r].op == OP_OR) ? rmax(a, b) : a;
      if (!rs[r].valid) p = 0.0;
      if (rs[r].concl_high) eh = rmax(eh, p); else el = rmax(el, p);
    end
    return ref_fom(el, eh);
  endfunction

  task automatic run_one();
    real eml, eal;
    int  ecfg, rl, r, d, n, mute, kill, lat;
    eml  = ref_level(ML_RULES);
    eal  = ref_level(AL_RULES);
    ecfg = ref_cfg(eml, eal);
    ref_cm(ecfg, rl, r, d, n, mute, kill);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    checks += 4;
    if (!near(ml / 100.0, eml, 0.0015)) begin failures++; $display("FAIL ml got=%0d exp=%0g", ml, eml); end
    if (!near(al / 100.0, eal, 0.0015)) begin failures++; $display("FAIL al got=%0d exp=%0g", al, eal); end
    if (int'(cfg) != ecfg) begin failures++; $display("FAIL cfg got=%0d exp=%0d", cfg, ecfg); end
    if (int'(cm.rl) != rl || int'(cm.rpg_r) != r || int'(cm.idi_d) != d || int'(cm.idi_n) != n ||
        int'(cm.mute_reset) != mute || int'(cm.kill) != kill) begin
      failures++; $display("FAIL cm");
    end
    seen[ecfg]++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vals = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // quiet card: Safe
    run_one();
    // sensitive data: Unsafe
    vals[IN_DS] = 10; run_one();
    // voltage and PIN errors, no light, no CE: Critical
    vals = '0; vals[IN_VS] = 9; vals[IN_PE] = 9; run_one();
    // light attack: Fatal
    vals = '0; vals[IN_LS] = 5; run_one();
    // random vectors, biased to small values so all fifths are visited
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N_INPUTS; i++) begin
        int unsigned mx;
        mx = int'(smax_of(i));
        vals[i] = value_t'($urandom_range(0, mx + mx / 5));
        if ($urandom_range(0, 2) == 0) vals[i] = '0;
      end
      run_one();
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL configuration %0d never selected", c); end
    end
    $display("configs seen: safe=%0d unsafe=%0d critical=%0d fatal=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
