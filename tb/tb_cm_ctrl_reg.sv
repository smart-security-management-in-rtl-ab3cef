// tb_cm_ctrl_reg: reset value, write with one-cycle load strobe, ready low
// from the write until the countermeasure acknowledges, and a write that
// overrides a pending acknowledge.
module tb_cm_ctrl_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr = 0, applied = 0;
  logic [7:0] wr_data = '0, cfg;
  logic load, ready;

  cm_ctrl_reg #(.W(8), .RESET(8'h5A)) dut (.clk, .rst_n, .wr, .wr_data, .cfg, .load, .applied, .ready);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cfg == 8'h5A && ready && !load, "reset");
    for (int t = 0; t < 50; t++) begin
      logic [7:0] v;
      int wait_c;
      v = 8'($urandom);
      wait_c = $urandom_range(0, 5);
      wr = 1; wr_data = v;
      @(negedge clk);
      wr = 0;
      chk(cfg == v, "cfg");
      chk(load, "load strobe");
      chk(!ready, "not ready after write");
      @(negedge clk);
      chk(!load, "load one cycle");
      repeat (wait_c) begin @(negedge clk); chk(!ready, "still pending"); end
      applied = 1;
      if (t % 10 == 9) begin wr = 1; wr_data = ~v; end   // write wins over applied
      @(negedge clk);
      applied = 0;
      if (t % 10 == 9) begin
        wr = 0;
        chk(!ready && cfg == ~v, "write over applied");
        applied = 1; @(negedge clk); applied = 0;
      end
      chk(ready, "ready after applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
