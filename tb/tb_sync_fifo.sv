// tb_sync_fifo: random pushes and pops (never on full / empty) against a
// queue model; checks data order, full, empty and count, and that the
// FIFO fills completely.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [3:0] count;
  logic [31:0] q [$];
  int fills = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(8)) dut (.clk, .rst_n, .push, .wr_data, .full, .pop, .rd_data, .empty, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks += 3;
      if (count != 4'(q.size())) begin failures++; $display("FAIL count %0d vs %0d", count, q.size()); end
      if (empty != (q.size() == 0)) begin failures++; $display("FAIL empty"); end
      if (full != (q.size() == 8)) begin failures++; $display("FAIL full"); end
      if (!empty) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("FAIL data %h vs %h", rd_data, q[0]); end
      end
      if (full) fills++;
      push = !full && ($urandom_range(0, 99) < ((t / 500) % 2 != 0 ? 70 : 30));
      pop  = !empty && ($urandom_range(0, 99) < ((t / 500) % 2 != 0 ? 30 : 70));
      wr_data = $urandom;
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    checks++;
    if (fills == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
