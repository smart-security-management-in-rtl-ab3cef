// tb_cm_config_table: the settings of each configuration, and the
// side-channel gain, time and energy factors recomputed from those settings
// with the countermeasure cost formulas, against the published values
// (Unsafe: 122.5, 4.0, 5.2; Critical: 1346.7, 7.8, 15.6; Safe: 1, 1, 1).
module tb_cm_config_table;
  import sm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  config_t cfg;
  cm_cfg_t cm;

  cm_config_table dut (.cfg, .cm);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cfg=%0d %s", cfg, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real sca_pub [3]  = '{1.0, 122.5, 1346.7};
    static real time_pub [3] = '{1.0, 4.0, 7.8};
    static real nrj_pub [3]  = '{1.0, 5.2, 15.6};
    for (int c = 0; c < 4; c++) begin
      int rl, r, d, n, mute, kill;
      cfg = config_t'(c); #1;
      ref_cm(c, rl, r, d, n, mute, kill);
      chk(cm.sensors_on == 1'b1, "sensors");
      chk(int'(cm.rl) == rl, "rl");
      chk(int'(cm.rpg_r) == r, "rpg");
      chk(int'(cm.idi_d) == d, "idi d");
      chk(int'(cm.idi_n) == n, "idi n");
      chk(int'(cm.mute_reset) == mute, "mute");
      chk(int'(cm.kill) == kill, "kill");
      if (c < 3) begin
        chk(near(f_sca(int'(cm.rl), int'(cm.rpg_r), int'(cm.idi_d), int'(cm.idi_n)), sca_pub[c], 0.06), "FSCA");
        chk(near(f_time(int'(cm.rl), int'(cm.idi_d), int'(cm.idi_n)), time_pub[c], 0.06), "FTime");
        chk(near(f_nrj(int'(cm.rl), int'(cm.rpg_r), int'(cm.idi_d), int'(cm.idi_n)), nrj_pub[c], 0.06), "FNRJ");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
