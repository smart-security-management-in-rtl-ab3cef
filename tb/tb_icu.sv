// tb_icu: random source pulses, masks and acknowledges against a model of
// sticky pending bits with lowest-index priority.
module tb_icu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] src = '0, mask = '1, pending;
  logic ack = 0;
  logic [1:0] ack_id = '0, irq_id;
  logic irq;
  logic [2:0] mp;

  icu #(.N_SRC(3)) dut (.clk, .rst_n, .src, .mask, .ack, .ack_id, .irq, .irq_id, .pending);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] act;
    mp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      act = mp & mask;
      checks += 3;
      if (pending != mp) begin failures++; $display("FAIL pending %b vs %b", pending, mp); end
      if (irq != (act != 0)) begin failures++; $display("FAIL irq"); end
      if (act != 0 && irq_id != (act[0] ? 2'd0 : act[1] ? 2'd1 : 2'd2)) begin failures++; $display("FAIL id %0d act %b", irq_id, act); end
      src    = 3'($urandom_range(0, 7)) & {$urandom_range(0, 3) == 0, $urandom_range(0, 3) == 0, $urandom_range(0, 3) == 0};
      if ($urandom_range(0, 49) == 0) mask = 3'($urandom_range(0, 7));
      ack    = irq && ($urandom_range(0, 1) == 1);
      ack_id = irq_id;
      @(posedge clk);
      if (ack) mp[ack_id] = 1'b0;
      mp = mp | src;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
