// tb_monitor_ctrl: the controller between behavioural models of its
// neighbours: a host -> monitor FIFO (queue), a one-source-plus-sensors
// interrupt controller, a two-cycle strategy returning random settings, CM
// registers whose ready falls for a random time after each write, and a
// monitor -> host FIFO that is sometimes full. A host model sends
// requests, answers every M_CFG with H_CFG_DONE after a random delay and
// waits for M_RESUME. The interrupt model raises source 3 / 4 once when the
// core / RNG register becomes ready again after a write and honours the
// controller's mask. Checked for every request: the sensor write, one
// strategy start, one write of both registers, the settings in M_CFG,
// that M_RESUME waits for both registers and for H_CFG_DONE, host_hold,
// the mask, and that a request completes within 100 cycles.
module tb_monitor_ctrl;
  import sm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic       irq, irq_ack;
  logic [2:0] irq_id, irq_ack_id;
  logic [4:0] irq_mask;
  logic       h2m_empty, h2m_pop;
  msg_t       h2m_data;
  logic       set_en;
  input_t     set_idx;
  value_t     set_val;
  logic       strat_start, strat_valid;
  cm_cfg_t    strat_cm;
  logic       core_wr, rng_wr, core_ready, rng_ready;
  logic       core_evt = 0, rng_evt = 0;
  logic       m2h_full, m2h_push;
  msg_t       m2h_data;
  logic       host_hold, busy_done;

  monitor_ctrl dut (.*);

  always #5 clk = ~clk;

  // ----- neighbour models
  msg_t  h2m_q [$];
  logic  sens_pend = 0;
  int    strat_cnt = 0;
  int    core_busy = 0, rng_busy = 0;
  logic  full_now = 0;
  msg_t  m2h_q [$];

  assign h2m_empty  = (h2m_q.size() == 0);
  assign h2m_data   = h2m_empty ? '0 : h2m_q[0];
  wire [4:0] icu_act = {rng_evt, core_evt, 1'b0, sens_pend, !h2m_empty} & irq_mask;
  assign irq        = |icu_act;
  assign irq_id     = icu_act[0] ? 3'd0 : icu_act[1] ? 3'd1 : icu_act[3] ? 3'd3 : 3'd4;
  assign core_ready = (core_busy == 0);
  assign rng_ready  = (rng_busy == 0);
  assign m2h_full   = full_now;
  assign strat_valid = (strat_cnt == 1);
  assign strat_cm    = cm_given;

  // per-request bookkeeping
  int n_set, n_start, n_wr, n_cfg, n_resume;
  logic cfg_done_sent;
  cm_cfg_t cm_given;
  value_t  last_val;
  input_t  last_idx;

  always @(posedge clk) begin
    if (rst_n) begin
      if (h2m_pop) begin
        if (h2m_empty) begin failures++; $display("FAIL pop on empty"); end
        else void'(h2m_q.pop_front());
      end
      if (irq_ack && irq_ack_id == 3'd1) sens_pend <= 1'b0;
      if (irq_ack && irq_ack_id == 3'd3) core_evt <= 1'b0;
      if (irq_ack && irq_ack_id == 3'd4) rng_evt <= 1'b0;
      if (core_busy == 1 && !core_wr) core_evt <= 1'b1;
      if (rng_busy == 1 && !core_wr)  rng_evt <= 1'b1;
      if (irq_ack && !irq) begin failures++; $display("FAIL ack without irq"); end
      checks++;
      if (!(irq_mask == 5'b00111 || (irq_mask == 5'b11000 && host_hold && n_wr == 1))) begin
        failures++; $display("FAIL mask %b", irq_mask);
      end
      if (set_en) begin
        n_set++;
        if (set_idx != last_idx || set_val != last_val) begin failures++; $display("FAIL set %0d %0d", set_idx, set_val); end
      end
      if (strat_start) begin
        n_start++;
        if (n_set == 0 && last_idx != IN_LS) begin failures++; $display("FAIL start before set"); end
        strat_cnt <= 2;
        cm_given  <= cm_cfg_t'($urandom);
      end else if (strat_cnt > 0) strat_cnt <= strat_cnt - 1;
      if (core_wr != rng_wr) begin failures++; $display("FAIL register writes apart"); end
      if (core_wr) begin
        n_wr++;
        core_busy <= $urandom_range(1, 15);
        rng_busy  <= $urandom_range(1, 15);
      end else begin
        if (core_busy > 0) core_busy <= core_busy - 1;
        if (rng_busy > 0)  rng_busy  <= rng_busy - 1;
      end
      if (m2h_push) begin
        if (m2h_full) begin failures++; $display("FAIL push on full"); end
        m2h_q.push_back(m2h_data);
      end
      full_now <= ($urandom_range(0, 5) == 0);
    end
  end

  // ----- host model
  task automatic request(bit by_sensor);
    int cycles;
    bit got_cfg, got_resume;
    n_set = 0; n_start = 0; n_wr = 0; n_cfg = 0; n_resume = 0;
    @(negedge clk);
    if (by_sensor) begin
      last_idx = IN_LS;
      sens_pend = 1'b1;
    end else begin
      last_idx = input_t'($urandom_range(0, 8));
      last_val = value_t'($urandom_range(0, 1000));
      h2m_q.push_back({H_SET_INPUT, last_idx, last_val});
    end
    cycles = 0; got_cfg = 0; got_resume = 0;
    while (!got_resume && cycles < 400) begin
      @(negedge clk);
      cycles++;
      while (m2h_q.size() > 0) begin
        msg_t m = m2h_q.pop_front();
        if (m[31:28] == M_CFG) begin
          got_cfg = 1; n_cfg++;
          checks++;
          if (m[16:0] != cm_given) begin failures++; $display("FAIL M_CFG payload"); end
          fork begin
            repeat ($urandom_range(0, 10)) @(negedge clk);
            h2m_q.push_back({H_CFG_DONE, 28'd0});
            cfg_done_sent = 1;
          end join_none
        end else if (m[31:28] == M_RESUME) begin
          got_resume = 1; n_resume++;
          checks += 2;
          if (!cfg_done_sent || !got_cfg) begin failures++; $display("FAIL resume before CFG_DONE"); end
          if (!core_ready || !rng_ready) begin failures++; $display("FAIL resume before CM ready"); end
        end
      end
      if (cycles > 1 && !got_resume) begin
        checks++;
        if (!host_hold) begin failures++; $display("FAIL host_hold low during request"); end
      end
    end
    cfg_done_sent = 0;
    checks += 6;
    if (!got_resume) begin failures++; $display("FAIL no resume"); end
    if (n_set != (by_sensor ? 0 : 1)) begin failures++; $display("FAIL set count %0d", n_set); end
    if (n_start != 1) begin failures++; $display("FAIL start count %0d", n_start); end
    if (n_wr != 1) begin failures++; $display("FAIL write count %0d", n_wr); end
    if (n_cfg != 1) begin failures++; $display("FAIL cfg count %0d", n_cfg); end
    if (cycles >= 100) begin failures++; $display("FAIL request took %0d cycles", cycles); end
    @(negedge clk);
    checks++;
    if (host_hold) begin failures++; $display("FAIL host_hold after resume"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_done_sent = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (host_hold) begin failures++; $display("FAIL hold after reset"); end
    for (int t = 0; t < 300; t++) begin
      request($urandom_range(0, 3) == 0);
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    // a stray H_CFG_DONE outside a request is dropped
    h2m_q.push_back({H_CFG_DONE, 28'd0});
    repeat (4) @(negedge clk);
    checks += 2;
    if (h2m_q.size() != 0) begin failures++; $display("FAIL stray message kept"); end
    if (host_hold) begin failures++; $display("FAIL stray message started a request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
