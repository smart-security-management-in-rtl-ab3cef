// cm_config_table: countermeasure settings of each of the four
// configurations.
//
//   config    sensors RL  RPG R  IDI D  IDI N  mute/reset  kill
//   Safe      on      x1  0      2      0      no          no
//   Unsafe    on      x2  3      3      4      no          no
//   Critical  on      x3  10     4      8      yes         no
//   Fatal     -       -   -      -      -      -           yes
//
// Fatal only defines the kill reaction; this design keeps every other
// countermeasure at its Critical setting while the kill proceeds.
// Purely combinational.
module cm_config_table
  import sm_pkg::*;
(
  input  config_t cfg,
  output cm_cfg_t cm
);

  always_comb begin
    cm = '{sensors_on: 1'b1, rl: 2'd1, rpg_r: 4'd0, idi_d: 4'd2, idi_n: 4'd0,
           mute_reset: 1'b0, kill: 1'b0};
    case (cfg)
      CFG_UNSAFE: begin
        cm.rl = 2'd2; cm.rpg_r = 4'd3; cm.idi_d = 4'd3; cm.idi_n = 4'd4;
      end
      CFG_CRITICAL, CFG_FATAL: begin
        cm.rl = 2'd3; cm.rpg_r = 4'd10; cm.idi_d = 4'd4; cm.idi_n = 4'd8;
        cm.mute_reset = 1'b1;
        cm.kill       = (cfg == CFG_FATAL);
      end
      default: ;
    endcase
  end

endmodule
