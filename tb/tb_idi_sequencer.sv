// tb_idi_sequencer: for every (D, N) of the two evaluation grids of the
// countermeasure (D in {2,3,4} x N in {0,4,8} at RL = 2, R = 3, and
// D in {0,4,8} x N in {2,3,4}) plus (1,1), issues instructions with random
// gaps and checks that dummy runs have at
// most N instructions and every length 1..N occurs, that useful stretches
// have the mean expected from runs of 1..D, that
// N = 0 never inserts a dummy, and that the long-run ratio of dummy to
// useful instructions is close to N/(D+1), the mean that gives the time
// factor 1 + N/(D+1) of the countermeasure. D = 0 behaves as D = 1. The
// measured time factor is printed for each point.
module tb_idi_sequencer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, issue = 0;
  logic [3:0] d = 4'd2, n = 4'd0;
  logic applied, dummy;

  idi_sequencer dut (.clk, .rst_n, .d, .n, .load, .applied, .issue, .dummy);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL D=%0d N=%0d %s", d, n, what); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int cfg_d [19] = '{2, 2, 2, 3, 3, 3, 4, 4, 4,  0, 0, 0, 4, 4, 4, 8, 8, 8,  1};
    static int cfg_n [19] = '{0, 4, 8, 0, 4, 8, 0, 4, 8,  2, 3, 4, 2, 3, 4, 2, 3, 4,  1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (cfg_d[k]) begin
      int useful, dummies, run, bad, seq, d_eff;
      int useful_seen [16], dummy_seen [16];
      logic last_dummy;
      real ratio, expect_r;
      useful = 0; dummies = 0; run = 0; bad = 0; seq = 0;
      d_eff = (cfg_d[k] == 0) ? 1 : cfg_d[k];
      foreach (useful_seen[i]) begin useful_seen[i] = 0; dummy_seen[i] = 0; end
      @(negedge clk);
      d = 4'(cfg_d[k]); n = 4'(cfg_n[k]); load = 1;
      @(negedge clk); load = 0;
      chk(applied, "applied one cycle after load");
      last_dummy = 1'b0;
      run = 0;
      // Runs are seen from outside: a dummy run of length 0 merges two
      // useful runs, so useful stretches between dummy runs are checked
      // through their mean, ((D+1)/2) / (N/(N+1)).
      for (int c = 0; c < 60000; c++) begin
        issue = ($urandom_range(0, 3) != 0);
        if (issue) begin
          if (dummy != last_dummy) begin
            if (seq > 0) begin
              if (last_dummy) begin
                if (run > cfg_n[k]) bad++;
                dummy_seen[run]++;
              end else useful_seen[0]++;
            end
            seq++;
            run = 0;
          end
          run++;
          if (dummy) dummies++; else useful++;
          last_dummy = dummy;
        end
        @(negedge clk);
      end
      issue = 0;
      chk(bad == 0, $sformatf("%0d runs out of range", bad));
      if (cfg_n[k] == 0) chk(dummies == 0, "dummy inserted with N=0");
      else begin
        for (int i = 1; i <= cfg_n[k]; i++) chk(dummy_seen[i] > 0, $sformatf("dummy run %0d never seen", i));
      end
      if (cfg_n[k] != 0) begin
        real mean_u, exp_u;
        mean_u = real'(useful) / real'(useful_seen[0]);
        exp_u  = (real'(d_eff) + 1.0) / 2.0 / (real'(cfg_n[k]) / (real'(cfg_n[k]) + 1.0));
        chk(mean_u > exp_u * 0.9 && mean_u < exp_u * 1.1,
            $sformatf("mean useful stretch %0g expected %0g", mean_u, exp_u));
      end
      ratio    = real'(dummies) / real'(useful);
      expect_r = real'(cfg_n[k]) / real'(d_eff + 1);
      chk(ratio > expect_r * 0.85 - 0.01 && ratio < expect_r * 1.15 + 0.01,
          $sformatf("dummy ratio %0g expected %0g", ratio, expect_r));
      $display("D=%0d N=%0d useful=%0d dummy=%0d time factor %0.3f, expected 1+N/(D+1) = %0.3f",
               cfg_d[k], cfg_n[k], useful, dummies, 1.0 + ratio, 1.0 + expect_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
