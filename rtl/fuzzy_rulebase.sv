// fuzzy_rulebase: the controller's knowledge base.
//
// Combines the error label and the change-of-error label into one output
// label with a 7x7 rule table. The table is the usual diagonal PD-type
// table: the output term lies as far from ZE as the error and change of
// error together, out = clamp(e + de - ZE, NB, PB). Read as rules:
// "if error is ZE and change is ZE then output is ZE", "if error is PS and
// change is PS then output is PM", and so on along each anti-diagonal.
//
// Interface: valid_in (the AND of both fuzzifiers' valid outputs in the
// controller) qualifies the two labels. Timing: one clock, registered
// output; synchronous active-high reset clears valid_out and the label.
// That a rule base joins the two fuzzified inputs follows the published
// controller; the rules themselves and the latency are this design's
// choice, as the published rule set is not given in a usable form.
module fuzzy_rulebase #(
  parameter int unsigned NTERMS  = fuzzy_pkg::NTERMS,
  parameter int unsigned LABEL_W = fuzzy_pkg::LABEL_W
) (
  input  logic               clock,
  input  logic               reset,
  input  logic               valid_in,
  input  logic [LABEL_W-1:0] diff_label,
  input  logic [LABEL_W-1:0] delta_label,
  output logic               valid_out,
  output logic [LABEL_W-1:0] control_label
);

  localparam int signed CENTRE = int'(NTERMS / 2);

  logic [LABEL_W-1:0] rule_out;

  always_comb begin
    int signed s;
    s = int'(diff_label) + int'(delta_label) - CENTRE;
    if (s < 0)                 rule_out = '0;
    else if (s > NTERMS - 1)   rule_out = LABEL_W'(NTERMS - 1);
    else                       rule_out = LABEL_W'(s);
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      valid_out     <= 1'b0;
      control_label <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) control_label <= rule_out;
    end
  end

endmodule
