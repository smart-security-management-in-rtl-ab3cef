// monitor_ctrl: the monitor's handling of one host request, as a state
// machine.
//
// A request is either a message from the host in the host -> monitor FIFO
// (an updated countermeasure output or a new data-sensitivity level DS,
// opcode H_SET_INPUT) or a hardware sensor trigger signalled by the
// interrupt controller. For each request the controller
//   1. takes the event (pops the message and writes the value into the
//      sensor counters, or acknowledges the sensor interrupt),
//   2. runs the security strategy on the current inputs,
//   3. writes the new settings into the two hardware CM control registers
//      (core: IDI D/N, mute/reset, kill; RNG: R) and sends the whole
//      setting to the host software as an M_CFG message,
//   4. waits until both hardware countermeasures have signalled, through
//      the interrupt controller, that they run with the new setting, and the
//      host has answered H_CFG_DONE (software countermeasures such as the
//      redundancy level are configured),
//   5. sends M_RESUME.
// 'host_hold' is high from the request until the resume order is sent; the
// host is expected to wait for M_RESUME after each request. Messages other
// than H_CFG_DONE that arrive during step 4 stay in the FIFO for the next
// round. Unknown opcodes are dropped. ICU source numbering: 0 = host FIFO
// not empty, 1 = light sensor, 2 = voltage sensor, 3 = core countermeasures
// applied, 4 = RNG countermeasure applied. The controller drives the ICU
// mask: while waiting in step 4 only sources 3 and 4 are enabled, otherwise
// only sources 0..2, so a new request waits in the ICU until the current one
// is finished. Using the ICU for the "configured" events and the mask
// policy are this design's choices.
module monitor_ctrl
  import sm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // interrupt controller
  input  logic       irq,
  input  logic [2:0] irq_id,
  output logic       irq_ack,
  output logic [2:0] irq_ack_id,
  output logic [4:0] irq_mask,
  // host -> monitor FIFO
  input  logic    h2m_empty,
  input  msg_t    h2m_data,
  output logic    h2m_pop,
  // sensor counter writes
  output logic    set_en,
  output input_t  set_idx,
  output value_t  set_val,
  // security strategy
  output logic    strat_start,
  input  logic    strat_valid,
  input  cm_cfg_t strat_cm,
  // CM control registers
  output logic    core_wr,
  output logic    rng_wr,
  // monitor -> host FIFO
  input  logic    m2h_full,
  output logic    m2h_push,
  output msg_t    m2h_data,
  // status
  output logic    host_hold,
  output logic    busy_done   // pulses when M_RESUME is sent
);
  localparam logic [2:0] SRC_FIFO     = 3'd0;
  localparam logic [2:0] SRC_CORE_CM  = 3'd3;
  localparam logic [2:0] SRC_RNG_CM   = 3'd4;
  localparam logic [4:0] MASK_REQUEST = 5'b00111;
  localparam logic [4:0] MASK_CM      = 5'b11000;

  typedef enum logic [2:0] {
    S_IDLE, S_EVAL, S_WAIT_RES, S_CONFIG, S_SEND_CFG, S_WAIT_READY, S_RESUME
  } state_t;

  state_t state;
  logic   sw_done, core_done, rng_done;
  logic   core_now, rng_now;

  wire h_op_t h_op = h_op_t'(h2m_data[31:28]);

  always_comb begin
    irq_ack     = 1'b0;
    irq_ack_id  = irq_id;
    h2m_pop     = 1'b0;
    set_en      = 1'b0;
    set_idx     = input_t'(h2m_data[27:24]);
    set_val     = h2m_data[VAL_W-1:0];
    strat_start = (state == S_EVAL);
    core_wr     = (state == S_CONFIG);
    rng_wr      = (state == S_CONFIG);
    m2h_push    = 1'b0;
    m2h_data    = '0;
    busy_done   = 1'b0;
    irq_mask    = (state == S_WAIT_READY) ? MASK_CM : MASK_REQUEST;
    core_now    = 1'b0;
    rng_now     = 1'b0;
    case (state)
      S_IDLE:
        if (irq) begin
          irq_ack = 1'b1;
          if (irq_id == SRC_FIFO && !h2m_empty) begin
            h2m_pop = 1'b1;
            set_en  = (h_op == H_SET_INPUT);
          end
        end
      S_SEND_CFG:
        if (!m2h_full) begin
          m2h_push = 1'b1;
          m2h_data = {M_CFG, 11'd0, strat_cm};
        end
      S_WAIT_READY: begin
        if (!h2m_empty && h_op == H_CFG_DONE) h2m_pop = 1'b1;
        if (irq) begin
          irq_ack  = 1'b1;
          core_now = (irq_id == SRC_CORE_CM);
          rng_now  = (irq_id == SRC_RNG_CM);
        end
      end
      S_RESUME:
        if (!m2h_full) begin
          m2h_push  = 1'b1;
          m2h_data  = {M_RESUME, 28'd0};
          busy_done = 1'b1;
        end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_IDLE;
      sw_done   <= 1'b0;
      core_done <= 1'b0;
      rng_done  <= 1'b0;
    end else
      case (state)
        S_IDLE:
          if (irq) begin
            if (irq_id != SRC_FIFO) state <= S_EVAL;
            else if (!h2m_empty && h_op == H_SET_INPUT) state <= S_EVAL;
          end
        S_EVAL:     state <= S_WAIT_RES;
        S_WAIT_RES: if (strat_valid) state <= S_CONFIG;
        S_CONFIG: begin
          sw_done   <= 1'b0;
          core_done <= 1'b0;
          rng_done  <= 1'b0;
          state     <= S_SEND_CFG;
        end
        S_SEND_CFG: if (!m2h_full) state <= S_WAIT_READY;
        S_WAIT_READY: begin
          if (h2m_pop)  sw_done   <= 1'b1;
          if (core_now) core_done <= 1'b1;
          if (rng_now)  rng_done  <= 1'b1;
          if ((sw_done || h2m_pop) && (core_done || core_now) && (rng_done || rng_now))
            state <= S_RESUME;
        end
        S_RESUME:   if (!m2h_full) state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase

  assign host_hold = (state != S_IDLE);

endmodule
