// controller: digital fuzzy logic controller for a heat-exchanger outlet
// temperature loop.
//
// Each sample carries a set point (reference), the measured outlet
// temperature (data_b) and the change of error (data_a), all 4-bit. The
// error reference - data_b is saturated to the signed 4-bit range and
// offset-coded (code = error + 8, so code 8 is zero error), giving the same
// unsigned universe as the other inputs. Two fuzzification stages turn
// error and change of error into term labels, each against its own
// membership word; the rule base combines the two labels into an output
// term; the defuzzifier turns that term into a crisp 4-bit control word,
// which is held in the output register with valid_out beside it.
//
//   valid_in ->[fuzzy_diff ]--\
//              [fuzzy_delta]--+-(fuzzy_input_valid)->[f_control]->[crisp]
//                                           ->[flop_outputs]   -> control
//                                           ->[flop_valid_out] -> valid_out
//
// Timing: fully pipelined, one sample per clock, four clocks from a
// valid_in sample to its control/valid_out. Synchronous active-high reset.
// fuzzy_in and fuzzy_out bring out the error label and the rule-base label
// for observation.
//
// The stage chain, instance names, port names and widths (4-bit data,
// 21-bit membership words, 3-bit labels) follow the published controller.
// Where the error is formed, its offset coding, what the two label outputs
// carry and the latency per stage are this design's choices.
module controller #(
  parameter int unsigned DATA_W  = fuzzy_pkg::DATA_W,
  parameter int unsigned NTERMS  = fuzzy_pkg::NTERMS,
  parameter int unsigned FIELD_W = fuzzy_pkg::FIELD_W,
  parameter int unsigned LABEL_W = fuzzy_pkg::LABEL_W
) (
  input  logic                      clock,
  input  logic                      reset,
  input  logic [DATA_W-1:0]         reference,
  input  logic [DATA_W-1:0]         data_b,
  input  logic [DATA_W-1:0]         data_a,
  input  logic                      valid_in,
  input  logic [NTERMS*FIELD_W-1:0] diff_membership,
  input  logic [NTERMS*FIELD_W-1:0] int_membership,
  input  logic [NTERMS*FIELD_W-1:0] perm_membership,
  output logic [DATA_W-1:0]         control,
  output logic                      valid_out,
  output logic [LABEL_W-1:0]        fuzzy_in,
  output logic [LABEL_W-1:0]        fuzzy_out
);

  localparam int signed E_MAX = (1 <<< (DATA_W - 1)) - 1;  //  7
  localparam int signed E_MIN = -(1 <<< (DATA_W - 1));     // -8

  // Error, saturated and offset-coded.
  logic [DATA_W-1:0] error_code;
  always_comb begin
    int signed e;
    e = int'(reference) - int'(data_b);
    if (e > E_MAX)      e = E_MAX;
    else if (e < E_MIN) e = E_MIN;
    error_code = DATA_W'(e - E_MIN);
  end

  logic               diff_valid, delta_valid, fuzzy_input_valid;
  logic [LABEL_W-1:0] diff_label, delta_label;
  logic               rule_valid;
  logic [LABEL_W-1:0] rule_label;
  logic               crisp_valid;
  logic [DATA_W-1:0]  crisp_value;

  fuzzification #(
    .DATA_W(DATA_W), .NTERMS(NTERMS), .FIELD_W(FIELD_W), .LABEL_W(LABEL_W)
  ) fuzzy_diff (
    .clock, .reset, .valid_in,
    .data_in   (error_code),
    .membership(diff_membership),
    .valid_out (diff_valid),
    .fuzzy_out (diff_label)
  );

  fuzzification #(
    .DATA_W(DATA_W), .NTERMS(NTERMS), .FIELD_W(FIELD_W), .LABEL_W(LABEL_W)
  ) fuzzy_delta (
    .clock, .reset, .valid_in,
    .data_in   (data_a),
    .membership(int_membership),
    .valid_out (delta_valid),
    .fuzzy_out (delta_label)
  );

  assign fuzzy_input_valid = diff_valid & delta_valid;

  // Both fuzzifiers share valid_in and latency, so their flags must agree;
  // a mismatch would mean a sample is paired with the wrong partner.
  valid_pair_agree: assert property (@(posedge clock) disable iff (reset)
    diff_valid == delta_valid)
    else $error("fuzzifier valid flags disagree");

  fuzzy_rulebase #(
    .NTERMS(NTERMS), .LABEL_W(LABEL_W)
  ) f_control (
    .clock, .reset,
    .valid_in     (fuzzy_input_valid),
    .diff_label   (diff_label),
    .delta_label  (delta_label),
    .valid_out    (rule_valid),
    .control_label(rule_label)
  );

  defuzzification #(
    .DATA_W(DATA_W), .NTERMS(NTERMS), .FIELD_W(FIELD_W), .LABEL_W(LABEL_W)
  ) crisp (
    .clock, .reset,
    .valid_in   (rule_valid),
    .fuzzy_input(rule_label),
    .membership (perm_membership),
    .valid_out  (crisp_valid),
    .crisp_out  (crisp_value)
  );

  flop_outputs #(.WIDTH(DATA_W)) flop_outputs_i (
    .clock, .reset,
    .enable(crisp_valid),
    .d     (crisp_value),
    .q     (control)
  );

  synchronizer flop_valid_out (
    .clock, .reset,
    .d(crisp_valid),
    .q(valid_out)
  );

  assign fuzzy_in  = diff_label;
  assign fuzzy_out = rule_label;

endmodule
