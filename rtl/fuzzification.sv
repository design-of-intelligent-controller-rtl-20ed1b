// fuzzification: crisp value to fuzzy label.
//
// Finds which linguistic term of a partitioned universe holds the 4-bit
// crisp input and outputs that term's 3-bit label. The membership word
// gives the width of each term (see fuzzy_pkg); the terms sit end to end
// starting at 0, so term k covers [end(k-1), end(k)) with end(k) the running
// sum of widths 0..k. The first term whose end lies above the input wins;
// an input past the last end is given the top term. All comparisons are
// done in parallel on precomputed running sums.
//
// Interface: valid_in qualifies data_in. Timing: one clock; fuzzy_out and
// valid_out are registered, reset (synchronous, active high) clears both.
// The block's role, its name and its clock/reset/valid_in/membership/
// valid_out ports follow the published controller; the width-coded,
// crisp-partition membership and the one-clock latency are this design's
// choices.
module fuzzification #(
  parameter int unsigned DATA_W  = fuzzy_pkg::DATA_W,
  parameter int unsigned NTERMS  = fuzzy_pkg::NTERMS,
  parameter int unsigned FIELD_W = fuzzy_pkg::FIELD_W,
  parameter int unsigned LABEL_W = fuzzy_pkg::LABEL_W
) (
  input  logic                        clock,
  input  logic                        reset,
  input  logic                        valid_in,
  input  logic [DATA_W-1:0]           data_in,
  input  logic [NTERMS*FIELD_W-1:0]   membership,
  output logic                        valid_out,
  output logic [LABEL_W-1:0]          fuzzy_out
);

  // Wide enough for the sum of all widths.
  localparam int unsigned SUM_W = FIELD_W + $clog2(NTERMS) + 1;

  logic [SUM_W-1:0]   term_end [NTERMS];
  logic [LABEL_W-1:0] label;

  always_comb begin
    logic [SUM_W-1:0] acc;
    acc = '0;
    for (int k = 0; k < NTERMS; k++) begin
      acc         = acc + SUM_W'(membership[k*FIELD_W +: FIELD_W]);
      term_end[k] = acc;
    end
  end

  always_comb begin
    logic found;
    found = 1'b0;
    label = LABEL_W'(NTERMS - 1);
    for (int k = 0; k < NTERMS; k++) begin
      if (!found && (SUM_W'(data_in) < term_end[k])) begin
        label = LABEL_W'(k);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      valid_out <= 1'b0;
      fuzzy_out <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) fuzzy_out <= label;
    end
  end

endmodule
