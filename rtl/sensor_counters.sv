// sensor_counters: the countermeasure outputs that feed the analysis
// (light-sensor triggers LS, voltage-sensor triggers VS, corrupted
// execution flows EFE, corrupted executions CE, wrong PINs PE, methods run
// without error NE, MAC errors ME, cryptographic executions CO) plus the
// data-sensitivity level DS.
//
// LS and VS are counted in hardware: each trigger pulse adds one, saturating
// at the input's maximum, and is echoed one cycle later on ls_evt / vs_evt
// for the interrupt controller. The other values are maintained by the
// host software and arrive as (index, value) writes from the monitor
// controller; a written value is clipped to the input's maximum. A write
// has priority over a hardware trigger to the same counter in the same
// cycle. Values are available the cycle after the update.
module sensor_counters
  import sm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ls_trig,
  input  logic                  vs_trig,
  input  logic                  wr_en,
  input  input_t                wr_idx,
  input  value_t                wr_val,
  output value_t [N_INPUTS-1:0] vals,
  output logic                  ls_evt,
  output logic                  vs_evt
);

  function automatic value_t clip(value_t v, input_t i);
    return (v > input_max(i)) ? input_max(i) : v;
  endfunction

  function automatic value_t sat_inc(value_t v, input_t i);
    return (v >= input_max(i)) ? input_max(i) : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vals   <= '0;
      ls_evt <= 1'b0;
      vs_evt <= 1'b0;
    end else begin
      ls_evt <= ls_trig;
      vs_evt <= vs_trig;
      if (ls_trig) vals[IN_LS] <= sat_inc(vals[IN_LS], IN_LS);
      if (vs_trig) vals[IN_VS] <= sat_inc(vals[IN_VS], IN_VS);
      if (wr_en && (wr_idx < input_t'(N_INPUTS)))
        vals[wr_idx] <= clip(wr_val, wr_idx);
    end

endmodule
