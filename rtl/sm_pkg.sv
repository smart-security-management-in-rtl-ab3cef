// sm_pkg: types and constants shared by the security-management blocks.
//
// Fuzzy degrees. With the discontinuous input membership functions and the
// min/max (Zadeh) operators, every degree of truth a rule premise can take
// is one of the seven values {0, 1/4, 1/3, 1/2, 2/3, 3/4, 1}. A degree is
// therefore stored as a 3-bit ordinal (degree_t) whose order is the order
// of the values, so AND/OR reduce to min/max of the codes and NOT maps
// code k to code 6-k. This encoding is exact; it is this design's choice.
//
// Crisp levels (misuse ML and anomaly AL, real values in [0,1]) are stored
// in hundredths (level_t, 0..100). Every value the first-of-max
// defuzzifier can produce and every threshold of the configuration table is
// a whole number of hundredths, so no rounding happens anywhere.
//
// Inputs of the analysis: the data-sensitivity level DS and the eight
// countermeasure outputs LS, VS, EFE, CE, PE, NE, ME, CO with the ranges of
// the sensor table. The range of DS is not given; 0..10 is assumed.
//
// FIFO message formats between host and monitor (this design's choice):
//   [31:28] opcode, [27:24] input index, [23:0] value (host -> monitor)
//   [31:28] opcode, [16:0]  cm_cfg_t                 (monitor -> host)
package sm_pkg;

  // ---------------------------------------------------------------- inputs
  localparam int unsigned N_INPUTS = 9;
  localparam int unsigned VAL_W    = 24;   // holds CO up to 10^7

  typedef enum logic [3:0] {
    IN_DS  = 4'd0,
    IN_LS  = 4'd1,
    IN_VS  = 4'd2,
    IN_EFE = 4'd3,
    IN_CE  = 4'd4,
    IN_PE  = 4'd5,
    IN_NE  = 4'd6,
    IN_ME  = 4'd7,
    IN_CO  = 4'd8
  } input_t;

  typedef logic [VAL_W-1:0] value_t;

  // Maximum value S_max of each input (sensor table; DS assumed).
  function automatic value_t input_max(input_t i);
    case (i)
      IN_DS:   return value_t'(10);
      IN_LS:   return value_t'(5);
      IN_VS:   return value_t'(10);
      IN_EFE:  return value_t'(10);
      IN_CE:   return value_t'(10);
      IN_PE:   return value_t'(10);
      IN_NE:   return value_t'(1_000);
      IN_ME:   return value_t'(10_000);
      IN_CO:   return value_t'(10_000_000);
      default: return value_t'(10);
    endcase
  endfunction

  // ---------------------------------------------------------- fuzzy degrees
  typedef enum logic [2:0] {
    D_0   = 3'd0,
    D_1_4 = 3'd1,
    D_1_3 = 3'd2,
    D_1_2 = 3'd3,
    D_2_3 = 3'd4,
    D_3_4 = 3'd5,
    D_1   = 3'd6
  } degree_t;

  // The eight input fuzzy subsets, in the column order of the membership
  // table: L- L-- L--- L---- H++++ H+++ H++ H+.
  typedef enum logic [2:0] {
    FS_RATHER_LOW     = 3'd0,
    FS_LOW            = 3'd1,
    FS_VERY_LOW       = 3'd2,
    FS_VERY_VERY_LOW  = 3'd3,
    FS_VERY_VERY_HIGH = 3'd4,
    FS_VERY_HIGH      = 3'd5,
    FS_HIGH           = 3'd6,
    FS_RATHER_HIGH    = 3'd7
  } fset_t;

  localparam int unsigned N_FSETS = 8;

  // Membership of each of the five fifths of [0, S_max] in each subset.
  function automatic degree_t membership(fset_t s, logic [2:0] bin);
    degree_t t [5];
    case (s)
      FS_RATHER_LOW:     t = '{D_1, D_3_4, D_1_2, D_1_4, D_0};
      FS_LOW:            t = '{D_1, D_2_3, D_1_3, D_0,   D_0};
      FS_VERY_LOW:       t = '{D_1, D_1_2, D_0,   D_0,   D_0};
      FS_VERY_VERY_LOW:  t = '{D_1, D_0,   D_0,   D_0,   D_0};
      FS_VERY_VERY_HIGH: t = '{D_0, D_0,   D_0,   D_0,   D_1};
      FS_VERY_HIGH:      t = '{D_0, D_0,   D_0,   D_1_2, D_1};
      FS_HIGH:           t = '{D_0, D_0,   D_1_3, D_2_3, D_1};
      default:           t = '{D_0, D_1_4, D_1_2, D_3_4, D_1};
    endcase
    return (bin > 3'd4) ? D_0 : t[bin];
  endfunction

  function automatic degree_t deg_not(degree_t d);
    return degree_t'(3'd6 - d);
  endfunction

  function automatic degree_t deg_min(degree_t a, degree_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic degree_t deg_max(degree_t a, degree_t b);
    return (a > b) ? a : b;
  endfunction

  // All memberships of all inputs, indexed [input][subset].
  typedef degree_t [N_FSETS-1:0] memb_t;
  typedef memb_t   [N_INPUTS-1:0] memb_all_t;

  // ------------------------------------------------------------------ rules
  typedef enum logic [1:0] {
    OP_NONE = 2'd0,   // premise is term A alone
    OP_AND  = 2'd1,   // min(A, B)
    OP_OR   = 2'd2    // max(A, B)
  } rule_op_t;

  typedef struct packed {
    logic     valid;
    input_t   in_a;
    fset_t    set_a;
    logic     neg_a;
    rule_op_t op;
    input_t   in_b;
    fset_t    set_b;
    logic     neg_b;
    logic     concl_high;   // 1: THEN ... is HIGH, 0: THEN ... is LOW
  } rule_t;

  localparam int unsigned N_RULES = 6;   // per output; 12 rules in all
  typedef rule_t [N_RULES-1:0] rule_set_t;

  localparam rule_t NO_RULE = '{valid: 1'b0, in_a: IN_DS, set_a: FS_LOW, neg_a: 1'b0,
                                op: OP_NONE, in_b: IN_DS, set_b: FS_LOW, neg_b: 1'b0,
                                concl_high: 1'b0};

  function automatic rule_t rule1(input_t a, fset_t sa, logic high);
    rule_t r = NO_RULE;
    r.valid = 1'b1; r.in_a = a; r.set_a = sa; r.concl_high = high;
    return r;
  endfunction

  function automatic rule_t rule2(input_t a, fset_t sa, rule_op_t op,
                                  input_t b, fset_t sb, logic high);
    rule_t r = rule1(a, sa, high);
    r.op = op; r.in_b = b; r.set_b = sb;
    return r;
  endfunction

  // Misuse rules. R0..R3 are the rules of the strategy; R4, R5 encode the
  // scenario statements that light-sensor triggers and MAC errors are
  // important evidence of an attack.
  localparam rule_set_t ML_RULES = '{
    0: rule1(IN_NE, FS_VERY_HIGH, 1'b0),                            // R0
    1: rule2(IN_VS, FS_RATHER_HIGH, OP_AND, IN_LS, FS_HIGH, 1'b1),  // R1
    2: rule1(IN_CE, FS_RATHER_HIGH, 1'b1),                          // R2
    3: rule2(IN_PE, FS_RATHER_HIGH, OP_OR, IN_VS, FS_HIGH, 1'b1),   // R3
    4: rule1(IN_LS, FS_HIGH, 1'b1),                                 // R4
    5: rule1(IN_ME, FS_RATHER_HIGH, 1'b1)                           // R5
  };

  // Anomaly rules (this design's own set). A high AL selects the milder
  // configurations, so benign evidence concludes HIGH and sensitive data or
  // suspicious evidence concludes LOW.
  localparam rule_set_t AL_RULES = '{
    0: rule2(IN_LS, FS_VERY_VERY_LOW, OP_AND, IN_CE, FS_VERY_VERY_LOW, 1'b1), // A0
    1: rule1(IN_DS, FS_HIGH, 1'b0),                                           // A1
    2: rule1(IN_ME, FS_RATHER_HIGH, 1'b0),                                    // A2
    3: rule1(IN_EFE, FS_RATHER_HIGH, 1'b0),                                   // A3
    4: rule1(IN_LS, FS_RATHER_HIGH, 1'b0),                                    // A4
    5: NO_RULE
  };

  // ----------------------------------------------------------------- levels
  typedef logic [6:0] level_t;   // hundredths, 0..100

  // ------------------------------------------------------- configurations
  typedef enum logic [1:0] {
    CFG_SAFE     = 2'd0,
    CFG_UNSAFE   = 2'd1,
    CFG_CRITICAL = 2'd2,
    CFG_FATAL    = 2'd3
  } config_t;

  typedef struct packed {
    logic       sensors_on;
    logic [1:0] rl;          // redundancy level 1..3
    logic [3:0] rpg_r;       // number of active random generators 0..10
    logic [3:0] idi_d;       // max consecutive useful instructions
    logic [3:0] idi_n;       // max consecutive dummy instructions
    logic       mute_reset;
    logic       kill;
  } cm_cfg_t;

  // ----------------------------------------------------------- messages
  localparam int unsigned MSG_W = 32;
  typedef logic [MSG_W-1:0] msg_t;

  typedef enum logic [3:0] {
    H_SET_INPUT = 4'd1,   // set input [27:24] to [23:0] and request a decision
    H_CFG_DONE  = 4'd2    // software countermeasures reconfigured and ready
  } h_op_t;

  typedef enum logic [3:0] {
    M_CFG    = 4'd1,      // new countermeasure configuration in [16:0]
    M_RESUME = 4'd2       // host may resume execution
  } m_op_t;

endpackage
