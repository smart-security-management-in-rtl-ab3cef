// smart_security_top: security monitor and the hardware countermeasure
// interface of the host of a secure device (smart card).
//
// The device has two processors that share no hardware: the host runs the
// application and carries the countermeasures; the monitor only decides how
// strong those countermeasures must be. This module holds everything of
// that split except the two processors and their memories:
//   - two FIFOs, host -> monitor (events) and monitor -> host (orders),
//   - the interrupt controller (ICU) of the monitor, which collects the
//     host requests, the sensor triggers and the "configured" events of
//     the two hardware countermeasures,
//   - the sensor counters (LS, VS counted in hardware; the others written
//     from host messages),
//   - the security strategy (fuzzy misuse/anomaly analysis, configuration
//     choice) and the monitor controller, which in this design take the
//     place of the strategy software of the monitor processor,
//   - two CM control registers written only by the monitor: the core one
//     (IDI D/N, mute/reset, kill) and the RNG one (number of generators R),
//   - the host countermeasures they drive: the dummy-instruction sequencer
//     and the random power generator.
// The host processor connects through the FIFO ports, the sensor trigger
// inputs, the issue/dummy pair and the mute/reset and kill outputs.
//
// Protocol: the host pushes H_SET_INPUT messages and then waits for
// M_RESUME; meanwhile it receives M_CFG with the new settings, applies the
// software countermeasures (redundancy level) and pushes H_CFG_DONE. A
// sensor trigger starts the same sequence without a message. host_hold is
// high while the monitor is handling a request.
module smart_security_top
  import sm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned R_MAX      = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  // host -> monitor channel
  input  logic             h2m_push,
  input  msg_t             h2m_data,
  output logic             h2m_full,
  // monitor -> host channel
  input  logic             m2h_pop,
  output msg_t             m2h_data,
  output logic             m2h_empty,
  // physical sensors of the host
  input  logic             ls_trig,
  input  logic             vs_trig,
  // host core issue slots
  input  logic             issue,
  output logic             dummy,
  // hardware countermeasures and reactions
  output logic [R_MAX-1:0] rpg_noise,
  output logic [R_MAX-1:0] rpg_active,
  output logic             mute_reset,
  output logic             kill,
  output logic             host_hold,
  // observation of the last decision
  output level_t           ml,
  output level_t           al,
  output config_t          cfg
);

  // ------------------------------------------------------------ channels
  msg_t  h2m_rd;
  logic  h2m_empty, h2m_pop;
  logic  m2h_full, m2h_push;
  msg_t  m2h_wr;
  logic [$clog2(FIFO_DEPTH):0] h2m_count, m2h_count;

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_h2m (
    .clk, .rst_n, .push(h2m_push), .wr_data(h2m_data), .full(h2m_full),
    .pop(h2m_pop), .rd_data(h2m_rd), .empty(h2m_empty), .count(h2m_count)
  );

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_m2h (
    .clk, .rst_n, .push(m2h_push), .wr_data(m2h_wr), .full(m2h_full),
    .pop(m2h_pop), .rd_data(m2h_data), .empty(m2h_empty), .count(m2h_count)
  );

  // ------------------------------------------------------------- sensors
  value_t [N_INPUTS-1:0] vals;
  logic   ls_evt, vs_evt;
  logic   set_en;
  input_t set_idx;
  value_t set_val;

  sensor_counters u_sens (
    .clk, .rst_n, .ls_trig, .vs_trig, .wr_en(set_en), .wr_idx(set_idx),
    .wr_val(set_val), .vals, .ls_evt, .vs_evt
  );

  // ----------------------------------------------------------------- ICU
  // Sources: 0 host FIFO not empty, 1 light sensor, 2 voltage sensor,
  // 3 core countermeasures applied, 4 RNG countermeasure applied.
  logic       irq, irq_ack;
  logic [2:0] irq_id, irq_ack_id;
  logic [4:0] irq_mask, irq_pending;
  logic       core_applied, rng_applied;

  icu #(.N_SRC(5)) u_icu (
    .clk, .rst_n, .src({rng_applied, core_applied, vs_evt, ls_evt, !h2m_empty}),
    .mask(irq_mask), .ack(irq_ack), .ack_id(irq_ack_id), .irq, .irq_id,
    .pending(irq_pending)
  );

  // ------------------------------------------------------------ strategy
  logic    strat_start, strat_valid;
  cm_cfg_t strat_cm;

  security_strategy u_strat (
    .clk, .rst_n, .start(strat_start), .vals, .valid(strat_valid),
    .ml, .al, .cfg, .cm(strat_cm)
  );

  // ---------------------------------------------------------- controller
  logic core_wr, rng_wr, core_ready, rng_ready, resume_sent;

  monitor_ctrl u_ctrl (
    .clk, .rst_n,
    .irq, .irq_id, .irq_ack, .irq_ack_id, .irq_mask,
    .h2m_empty, .h2m_data(h2m_rd), .h2m_pop,
    .set_en, .set_idx, .set_val,
    .strat_start, .strat_valid, .strat_cm,
    .core_wr, .rng_wr,
    .m2h_full, .m2h_push, .m2h_data(m2h_wr),
    .host_hold, .busy_done(resume_sent)
  );

  // ------------------------------------------------ CM control registers
  typedef struct packed {
    logic [3:0] idi_d;
    logic [3:0] idi_n;
    logic       mute_reset;
    logic       kill;
  } core_cfg_t;

  localparam core_cfg_t CORE_RESET = '{idi_d: 4'd2, idi_n: 4'd0, mute_reset: 1'b0, kill: 1'b0};

  core_cfg_t core_cfg;
  logic      core_load;
  logic [3:0] rng_r;
  logic      rng_load;

  cm_ctrl_reg #(.W($bits(core_cfg_t)), .RESET(CORE_RESET)) u_core_reg (
    .clk, .rst_n, .wr(core_wr),
    .wr_data({strat_cm.idi_d, strat_cm.idi_n, strat_cm.mute_reset, strat_cm.kill}),
    .cfg(core_cfg), .load(core_load), .applied(core_applied), .ready(core_ready)
  );

  cm_ctrl_reg #(.W(4), .RESET(4'd0)) u_rng_reg (
    .clk, .rst_n, .wr(rng_wr), .wr_data(strat_cm.rpg_r),
    .cfg(rng_r), .load(rng_load), .applied(rng_applied), .ready(rng_ready)
  );

  // --------------------------------------------- host countermeasures
  idi_sequencer u_idi (
    .clk, .rst_n, .d(core_cfg.idi_d), .n(core_cfg.idi_n), .load(core_load),
    .applied(core_applied), .issue, .dummy
  );

  rpg #(.R_MAX(R_MAX)) u_rpg (
    .clk, .rst_n, .r(rng_r), .load(rng_load), .applied(rng_applied),
    .active(rpg_active), .noise(rpg_noise)
  );

  assign mute_reset = core_cfg.mute_reset;
  assign kill       = core_cfg.kill;

  // The host is released only when both control registers hold no pending
  // setting.
  a_resume_ready: assert property (@(posedge clk) disable iff (!rst_n)
    resume_sent |-> core_ready && rng_ready);

endmodule
