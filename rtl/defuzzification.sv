// defuzzification: fuzzy output label to crisp control value.
//
// With one output term selected per sample, the centroid of that term's
// symmetric set is the midpoint of its interval in the output universe.
// The interval comes from the output membership word (term widths, see
// fuzzy_pkg): start = sum of the widths below the term, and the crisp
// value is start + width/2, rounded down and saturated to the 4-bit range.
//
// Interface: valid_in qualifies fuzzy_input. Timing: one clock, registered
// crisp_out and valid_out; synchronous active-high reset clears both.
// The block, its place after the rule base and its clock/reset/valid_in/
// membership/valid_out ports follow the published controller; the midpoint
// method is this design's reading of its centroid defuzzification.
module defuzzification #(
  parameter int unsigned DATA_W  = fuzzy_pkg::DATA_W,
  parameter int unsigned NTERMS  = fuzzy_pkg::NTERMS,
  parameter int unsigned FIELD_W = fuzzy_pkg::FIELD_W,
  parameter int unsigned LABEL_W = fuzzy_pkg::LABEL_W
) (
  input  logic                      clock,
  input  logic                      reset,
  input  logic                      valid_in,
  input  logic [LABEL_W-1:0]        fuzzy_input,
  input  logic [NTERMS*FIELD_W-1:0] membership,
  output logic                      valid_out,
  output logic [DATA_W-1:0]         crisp_out
);

  localparam int unsigned SUM_W = FIELD_W + $clog2(NTERMS) + 1;
  localparam logic [SUM_W-1:0] DATA_MAX = SUM_W'((1 << DATA_W) - 1);

  logic [SUM_W-1:0]   start;
  logic [FIELD_W-1:0] width;
  logic [SUM_W-1:0]   centre;
  logic [DATA_W-1:0]  crisp_next;

  always_comb begin
    start = '0;
    width = '0;
    for (int k = 0; k < NTERMS; k++) begin
      if (LABEL_W'(k) < fuzzy_input)
        start = start + SUM_W'(membership[k*FIELD_W +: FIELD_W]);
      if (LABEL_W'(k) == fuzzy_input)
        width = membership[k*FIELD_W +: FIELD_W];
    end
    centre = start + SUM_W'(width >> 1);
    crisp_next  = (centre > DATA_MAX) ? DATA_W'(DATA_MAX) : DATA_W'(centre);
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      valid_out <= 1'b0;
      crisp_out <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) crisp_out <= crisp_next;
    end
  end

endmodule
