// tb_sensor_counters: random sensor triggers and software writes against a
// model that saturates LS at 5 and VS at 10 and clips written values to
// each input's maximum; checks the event echo to the interrupt controller.
module tb_sensor_counters;
  import sm_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ls_trig = 0, vs_trig = 0, wr_en = 0;
  input_t wr_idx = IN_DS;
  value_t wr_val = '0;
  value_t [N_INPUTS-1:0] vals;
  logic ls_evt, vs_evt;
  longint m [N_INPUTS];
  int sat_ls = 0;

  sensor_counters dut (.clk, .rst_n, .ls_trig, .vs_trig, .wr_en, .wr_idx, .wr_val, .vals, .ls_evt, .vs_evt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pls, pvs;
    foreach (m[i]) m[i] = 0;
    pls = 0; pvs = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N_INPUTS; i++) begin
        checks++;
        if (longint'(vals[i]) != m[i]) begin failures++; $display("FAIL t=%0d input %0d got %0d exp %0d", t, i, vals[i], m[i]); end
      end
      checks += 2;
      if (ls_evt != pls || vs_evt != pvs) begin failures++; $display("FAIL evt"); end
      if (m[1] == 5) sat_ls++;
      ls_trig = ($urandom_range(0, 9) == 0);
      vs_trig = ($urandom_range(0, 9) == 0);
      wr_en   = ($urandom_range(0, 5) == 0);
      wr_idx  = input_t'($urandom_range(0, 8));
      wr_val  = value_t'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 12_000_000) : $urandom_range(0, 12));
      @(posedge clk);
      pls = ls_trig; pvs = vs_trig;
      if (ls_trig) m[1] = (m[1] >= 5) ? 5 : m[1] + 1;
      if (vs_trig) m[2] = (m[2] >= 10) ? 10 : m[2] + 1;
      if (wr_en) m[int'(wr_idx)] = (real'(wr_val) > smax_of(int'(wr_idx))) ? longint'(smax_of(int'(wr_idx))) : longint'(wr_val);
    end
    checks++;
    if (sat_ls == 0) begin failures++; $display("FAIL LS never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
