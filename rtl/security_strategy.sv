// security_strategy: the complete security-strategy decision of the monitor.
//
// From the nine analysis inputs (DS and the countermeasure outputs) it
// computes the misuse level ML and the anomaly level AL with a Mamdani
// fuzzy analysis (fuzzify -> rule premises -> aggregation -> first-of-max
// defuzzification) and maps them to a configuration (Safe, Unsafe,
// Critical, Fatal) and its countermeasure settings.
//
// Two pipeline stages. On the cycle 'start' is high the inputs are
// fuzzified and both rule sets evaluated; p_l/p_h of both outputs are
// registered. In the next cycle the levels are defuzzified, the
// configuration looked up, and everything registered; 'valid' pulses with
// the result two cycles after 'start'. Results hold until the next decision.
// The rule sets are parameters; the defaults are the package rule sets.
module security_strategy
  import sm_pkg::*;
#(
  parameter rule_set_t ML_RULE_SET = ML_RULES,
  parameter rule_set_t AL_RULE_SET = AL_RULES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  value_t [N_INPUTS-1:0]     vals,    // indexed by input_t
  output logic                      valid,
  output level_t                    ml,
  output level_t                    al,
  output config_t                   cfg,
  output cm_cfg_t                   cm
);

  memb_all_t memb;
  for (genvar i = 0; i < N_INPUTS; i++) begin : g_fuzz
    fuzzifier #(.S_MAX(input_max(input_t'(i)))) u_fuzz (
      .s(vals[i]), .memb(memb[i])
    );
  end

  degree_t ml_pl, ml_ph, al_pl, al_ph;
  degree_t ml_pre [N_RULES];
  degree_t al_pre [N_RULES];

  fuzzy_inference #(.RULES(ML_RULE_SET)) u_ml_inf (
    .memb(memb), .p_l(ml_pl), .p_h(ml_ph), .pre(ml_pre)
  );
  fuzzy_inference #(.RULES(AL_RULE_SET)) u_al_inf (
    .memb(memb), .p_l(al_pl), .p_h(al_ph), .pre(al_pre)
  );

  // stage 1 registers
  degree_t ml_pl_q, ml_ph_q, al_pl_q, al_ph_q;
  logic    s1_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ml_pl_q <= D_0; ml_ph_q <= D_0; al_pl_q <= D_0; al_ph_q <= D_0;
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= start;
      if (start) begin
        ml_pl_q <= ml_pl; ml_ph_q <= ml_ph;
        al_pl_q <= al_pl; al_ph_q <= al_ph;
      end
    end

  level_t  ml_d, al_d;
  config_t cfg_d;
  cm_cfg_t cm_d;

  fom_defuzzifier u_ml_dfz (.p_l(ml_pl_q), .p_h(ml_ph_q), .level(ml_d));
  fom_defuzzifier u_al_dfz (.p_l(al_pl_q), .p_h(al_ph_q), .level(al_d));
  config_select   u_sel    (.ml(ml_d), .al(al_d), .cfg(cfg_d));
  cm_config_table u_tab    (.cfg(cfg_d), .cm(cm_d));

  // stage 2 registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      valid <= 1'b0;
      ml    <= '0;
      al    <= '0;
      cfg   <= CFG_SAFE;
      cm    <= '0;
    end else begin
      valid <= s1_valid;
      if (s1_valid) begin
        ml  <= ml_d;
        al  <= al_d;
        cfg <= cfg_d;
        cm  <= cm_d;
      end
    end

endmodule
