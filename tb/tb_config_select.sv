// tb_config_select: every (ML, AL) pair on a grid of hundredths that
// includes all bin edges, against the configuration table.
module tb_config_select;
  import sm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  level_t  ml, al;
  config_t cfg;

  config_select dut (.ml, .al, .cfg);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 100; a++)
      for (int m = 0; m <= 100; m++) begin
        ml = level_t'(m); al = level_t'(a); #1;
        checks++;
        if (int'(cfg) != ref_cfg(m / 100.0, a / 100.0)) begin
          failures++;
          if (failures < 10) $display("FAIL ml=%0d al=%0d got=%0d exp=%0d", m, a, cfg, ref_cfg(m / 100.0, a / 100.0));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
