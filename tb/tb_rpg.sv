// tb_rpg: for R = 0, 3, 10 (the values of the configurations) and a few
// others: exactly the first R generators run, 'applied' comes WARMUP
// cycles after 'load', running generators toggle with a balanced output
// and follow the 16-bit LFSR recurrence, stopped ones drive 0 and hold.
module tb_rpg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [3:0] r = '0;
  logic applied;
  logic [9:0] active, noise;

  rpg #(.R_MAX(10), .WARMUP(4)) dut (.clk, .rst_n, .r, .load, .applied, .active, .noise);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL r=%0d %s", r, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int rs [6] = '{3, 10, 0, 7, 15, 3};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(active == '0 && noise == '0, "idle after reset");
    foreach (rs[k]) begin
      int lat, ones [10];
      int eff;
      logic [15:0] prev [10];
      r = 4'(rs[k]); load = 1;
      @(negedge clk); load = 0;
      lat = 1;
      while (!applied && lat < 20) begin @(negedge clk); lat++; end
      chk(lat == 5, $sformatf("applied latency %0d", lat));
      eff = (rs[k] > 10) ? 10 : rs[k];
      for (int i = 0; i < 10; i++) chk(active[i] == (i < eff), $sformatf("active[%0d]", i));
      foreach (ones[i]) ones[i] = 0;
      for (int i = 0; i < 10; i++) prev[i] = dut.lfsr[i];
      for (int c = 0; c < 400; c++) begin
        @(negedge clk);
        for (int i = 0; i < 10; i++) begin
          logic [15:0] nx;
          nx = (i < eff) ? ({1'b0, prev[i][15:1]} ^ (prev[i][0] ? 16'hB400 : 16'h0)) : prev[i];
          chk(dut.lfsr[i] == nx, $sformatf("lfsr[%0d] step", i));
          chk(noise[i] == ((i < eff) ? nx[0] : 1'b0), $sformatf("noise[%0d]", i));
          prev[i] = dut.lfsr[i];
          ones[i] += noise[i];
        end
      end
      for (int i = 0; i < eff; i++) chk(ones[i] > 150 && ones[i] < 250, $sformatf("balance[%0d]=%0d", i, ones[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
