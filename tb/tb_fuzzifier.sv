// tb_fuzzifier: sweeps inputs of three channels (S_max 10, 5 and 10^7)
// across their range and beyond, and compares every subset degree with the
// real-valued staircase reference, including the worked example of the
// specification (VS = 3 and VS = 7).
module tb_fuzzifier;
  import sm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  value_t s10, s5, sco;
  memb_t  m10, m5, mco;

  fuzzifier #(.S_MAX(value_t'(10)))         u10 (.s(s10), .memb(m10));
  fuzzifier #(.S_MAX(value_t'(5)))          u5  (.s(s5),  .memb(m5));
  fuzzifier #(.S_MAX(value_t'(10_000_000))) uco (.s(sco), .memb(mco));

  task automatic cmp(memb_t m, real s, real smax, string tag);
    for (int f = 0; f < 8; f++) begin
      checks++;
      if (!near(deg_real(m[f]), ref_memb(f, s, smax), 1e-6)) begin
        failures++;
        $display("FAIL %s s=%0g set=%0d got=%0g exp=%0g", tag, s, f, deg_real(m[f]), ref_memb(f, s, smax));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 12; v++) begin
      s10 = value_t'(v); s5 = value_t'(v);
      #1;
      cmp(m10, v, 10.0, "smax10");
      cmp(m5,  v, 5.0,  "smax5");
    end
    // worked example: VS = 3 -> rather high 1/4, very low 1/2
    s10 = 3; #1;
    checks += 2;
    if (m10[FS_RATHER_HIGH] != D_1_4) failures++;
    if (m10[FS_VERY_LOW]    != D_1_2) failures++;
    // VS = 7 -> high 2/3, very very low 0
    s10 = 7; #1;
    checks += 2;
    if (m10[FS_HIGH]          != D_2_3) failures++;
    if (m10[FS_VERY_VERY_LOW] != D_0)   failures++;
    // boundaries and random values of the 10^7 channel
    for (int k = 0; k <= 5; k++) begin
      sco = value_t'(k * 2_000_000); #1; cmp(mco, k * 2_000_000.0, 1.0e7, "co");
      sco = value_t'(k * 2_000_000 + 1); #1; cmp(mco, k * 2_000_000.0 + 1.0, 1.0e7, "co+1");
    end
    for (int k = 0; k < 200; k++) begin
      sco = value_t'($urandom_range(0, 12_000_000)); #1;
      cmp(mco, real'(sco), 1.0e7, "co_rand");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
