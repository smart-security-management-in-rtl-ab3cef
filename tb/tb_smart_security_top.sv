// tb_smart_security_top: end-to-end run of the security monitor with a
// behavioural host, at the default parameters.
//
// The host model issues instructions while it is not held, honours the
// 'dummy' marking, and answers the monitor: every M_CFG is recorded and
// acknowledged with H_CFG_DONE, and every request waits for M_RESUME. The
// run plays the two scenarios used to illustrate the strategy, then drives
// the card through all four configurations:
//   quiet card -> Safe; sensitive data (DS high) -> Unsafe (random power
//   generators and dummy instructions on); a poor card reader that keeps
//   triggering the voltage sensor, then MAC errors; wrong PINs with
//   voltage glitches -> Critical (mute/reset); a laser attack seen by the
//   light sensor -> Fatal (kill).
// After every request the decision (levels, configuration, the settings in
// M_CFG and on the hardware countermeasures) is compared with a
// real-valued reference of the strategy, the request must complete in less
// than 100 cycles, and the host must have been held throughout. Each
// mechanism is counted and must occur at least once; every resume must
// follow exactly one "configured" interrupt from each hardware
// countermeasure.
module tb_smart_security_top;
  import sm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic h2m_push = 0, m2h_pop = 0, ls_trig = 0, vs_trig = 0, issue = 0;
  msg_t h2m_data = '0, m2h_data;
  logic h2m_full, m2h_empty, dummy, mute_reset, kill, host_hold;
  logic [9:0] rpg_noise, rpg_active;
  level_t ml, al;
  config_t cfg;

  smart_security_top dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ counters
  int n_cfg_seen [4] = '{0, 0, 0, 0};
  int n_msg_req = 0, n_sensor_req = 0, n_resume = 0, n_cfg_msg = 0;
  int n_dummy = 0, n_useful = 0, n_rpg_on = 0, n_mute = 0, n_kill = 0;
  int n_core_evt = 0, n_rng_evt = 0;
  int n_hold_cycles = 0, n_rule_fired [N_RULES];
  int max_resp = 0;

  // ---------------------------------------------------------- host model
  real     v [9];
  cm_cfg_t last_cm;
  logic    host_push_req = 0;
  msg_t    host_msg;

  // single driver of h2m_push: requests from the host program and
  // H_CFG_DONE answers from the responder
  int cfg_done_owed = 0;
  always @(negedge clk) begin
    h2m_push = 0;
    m2h_pop  = 0;
    if (!m2h_empty) begin
      m2h_pop = 1;
      if (m2h_data[31:28] == M_CFG) begin
        last_cm = cm_cfg_t'(m2h_data[16:0]);
        n_cfg_msg++;
        cfg_done_owed++;
      end else if (m2h_data[31:28] == M_RESUME) n_resume++;
    end
    if (!h2m_full) begin
      if (cfg_done_owed > 0) begin
        h2m_push = 1; h2m_data = {H_CFG_DONE, 28'd0}; cfg_done_owed--;
      end else if (host_push_req) begin
        h2m_push = 1; h2m_data = host_msg; host_push_req = 0;
      end
    end
    // the core issues instructions unless the monitor holds it
    issue = !host_hold && ($urandom_range(0, 3) != 0);
    if (issue) begin if (dummy) n_dummy++; else n_useful++; end
    if (host_hold) n_hold_cycles++;
    if (rpg_active != 0) n_rpg_on++;
  end

  // "configured" interrupts of the two hardware countermeasures, taken by
  // the monitor through its interrupt controller
  always @(posedge clk)
    if (rst_n && dut.irq_ack) begin
      if (dut.irq_ack_id == 3'd3) n_core_evt++;
      if (dut.irq_ack_id == 3'd4) n_rng_evt++;
    end

  // rule firing, sampled when the strategy registers its premises
  always @(posedge clk)
    if (dut.u_strat.start)
      for (int r = 0; r < N_RULES; r++)
        if (dut.u_strat.ml_pre[r] != D_0) n_rule_fired[r]++;

  task automatic wait_resume(int n_prev, int t0, string what);
    int c = 0;
    while (n_resume == n_prev && c < 1000) begin @(negedge clk); c++; end
    checks++;
    if (n_resume == n_prev) begin failures++; $display("FAIL %s: no resume", what); end
    if (c + t0 > max_resp) max_resp = c + t0;
    checks++;
    if (c + t0 >= 100) begin failures++; $display("FAIL %s: %0d cycles", what, c + t0); end
  endtask

  task automatic check_decision(string what);
    real eml, eal;
    int  ecfg, rl, r, d, n, mute, kl;
    eml  = ref_level(ML_RULES, v);
    eal  = ref_level(AL_RULES, v);
    ecfg = ref_cfg(eml, eal);
    ref_cm(ecfg, rl, r, d, n, mute, kl);
    repeat (2) @(negedge clk);
    checks += 6;
    if (!near(ml / 100.0, eml, 0.0015) || !near(al / 100.0, eal, 0.0015)) begin
      failures++; $display("FAIL %s: ml=%0d al=%0d expected %0g %0g", what, ml, al, eml, eal);
    end
    if (int'(cfg) != ecfg) begin failures++; $display("FAIL %s: cfg %0d expected %0d", what, cfg, ecfg); end
    if (int'(last_cm.rl) != rl || int'(last_cm.rpg_r) != r || int'(last_cm.idi_d) != d ||
        int'(last_cm.idi_n) != n) begin failures++; $display("FAIL %s: M_CFG settings", what); end
    if ($countones(rpg_active) != r) begin failures++; $display("FAIL %s: %0d generators on, expected %0d", what, $countones(rpg_active), r); end
    if (int'(mute_reset) != mute) begin failures++; $display("FAIL %s: mute_reset", what); end
    if (int'(kill) != kl) begin failures++; $display("FAIL %s: kill", what); end
    n_cfg_seen[ecfg]++;
    if (mute_reset) n_mute++;
    if (kill) n_kill++;
    $display("%-28s ML=%0.2f AL=%0.2f -> %s", what, ml / 100.0, al / 100.0, cfg.name());
  endtask

  // host software updates a countermeasure output / DS
  task automatic set_input(input_t idx, int val);
    int n_prev = n_resume;
    real mx = smax_of(int'(idx));
    @(negedge clk);
    host_msg = {H_SET_INPUT, idx, value_t'(val)};
    host_push_req = 1;
    v[int'(idx)] = (real'(val) > mx) ? mx : real'(val);
    n_msg_req++;
    wait_resume(n_prev, 0, "message request");
    check_decision($sformatf("set %s=%0d", idx.name(), val));
  endtask

  // a physical sensor fires
  task automatic sensor(bit light);
    int n_prev = n_resume;
    @(negedge clk);
    if (light) ls_trig = 1; else vs_trig = 1;
    @(negedge clk);
    ls_trig = 0; vs_trig = 0;
    if (light) v[1] = (v[1] >= 5.0) ? 5.0 : v[1] + 1.0;
    else       v[2] = (v[2] >= 10.0) ? 10.0 : v[2] + 1.0;
    n_sensor_req++;
    wait_resume(n_prev, 1, "sensor request");
    check_decision(light ? "light sensor" : "voltage sensor");
  endtask

  task automatic run_code(int cycles);
    repeat (cycles) @(negedge clk);
  endtask

  task automatic clear_all();
    for (int i = 0; i < 9; i++) set_input(input_t'(i), 0);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (v[i]) v[i] = 0.0;
    foreach (n_rule_fired[i]) n_rule_fired[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_code(20);
    checks += 2;
    if (kill || mute_reset || rpg_active != 0) begin failures++; $display("FAIL reset state"); end
    if (n_dummy != 0) begin failures++; $display("FAIL dummy n_prev any configuration"); end

    // quiet card
    set_input(IN_NE, 100);
    run_code(200);
    // sensitive data handled
    set_input(IN_DS, 10);
    run_code(400);
    set_input(IN_DS, 0);

    // poor reader: voltage sensor keeps firing, then MAC errors, then calm
    for (int k = 0; k < 6; k++) begin sensor(1'b0); run_code(50); end
    for (int e = 2000; e <= 8000; e += 3000) begin set_input(IN_ME, e); run_code(50); end
    clear_all();

    // wrong PINs with voltage glitches
    for (int k = 0; k < 9; k++) sensor(1'b0);
    set_input(IN_PE, 9);
    run_code(300);
    set_input(IN_CE, 7);
    clear_all();

    // laser attack during a long run of correct commands
    set_input(IN_NE, 1000);
    for (int k = 0; k < 3; k++) begin sensor(1'b1); run_code(100); end
    set_input(IN_NE, 0);
    set_input(IN_EFE, 8);
    for (int k = 0; k < 2; k++) begin sensor(1'b1); run_code(100); end
    // light attack combined with voltage glitches
    clear_all();
    for (int k = 0; k < 4; k++) sensor(1'b1);
    for (int k = 0; k < 4; k++) sensor(1'b0);
    run_code(100);

    // ----- mechanism coverage
    $display("requests: %0d by message, %0d by sensor; resumes %0d; M_CFG %0d; longest request %0d cycles",
             n_msg_req, n_sensor_req, n_resume, n_cfg_msg, max_resp);
    $display("configurations: safe=%0d unsafe=%0d critical=%0d fatal=%0d",
             n_cfg_seen[0], n_cfg_seen[1], n_cfg_seen[2], n_cfg_seen[3]);
    $display("instructions: useful=%0d dummy=%0d; rpg-on cycles=%0d; held cycles=%0d",
             n_useful, n_dummy, n_rpg_on, n_hold_cycles);
    $display("configured interrupts: core=%0d rng=%0d", n_core_evt, n_rng_evt);
    for (int r = 0; r < N_RULES; r++) $display("misuse rule R%0d fired %0d times", r, n_rule_fired[r]);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (n_cfg_seen[c] == 0) begin failures++; $display("FAIL configuration %0d never reached", c); end
    end
    checks += 9;
    if (n_msg_req == 0)    begin failures++; $display("FAIL no message request"); end
    if (n_sensor_req == 0) begin failures++; $display("FAIL no sensor request"); end
    if (n_resume != n_msg_req + n_sensor_req) begin failures++; $display("FAIL resumes %0d", n_resume); end
    if (n_cfg_msg != n_resume) begin failures++; $display("FAIL M_CFG count"); end
    if (n_dummy == 0)      begin failures++; $display("FAIL no dummy instruction"); end
    if (n_rpg_on == 0)     begin failures++; $display("FAIL random power generators never on"); end
    if (n_mute == 0)       begin failures++; $display("FAIL mute/reset never set"); end
    if (n_kill == 0)       begin failures++; $display("FAIL kill never set"); end
    if (n_hold_cycles == 0) begin failures++; $display("FAIL host never held"); end
    checks += 2;
    if (n_core_evt != n_resume) begin failures++; $display("FAIL core configured interrupts %0d", n_core_evt); end
    if (n_rng_evt != n_resume)  begin failures++; $display("FAIL rng configured interrupts %0d", n_rng_evt); end
    for (int r = 0; r < N_RULES; r++) begin
      checks++;
      if (ML_RULES[r].valid && n_rule_fired[r] == 0) begin failures++; $display("FAIL misuse rule R%0d never fired", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
