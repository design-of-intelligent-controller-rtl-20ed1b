// synchronizer: valid flag stage of the controller.
//
// One reset flip-flop that delays the defuzzifier's valid flag by a clock,
// so valid_out rises together with the new value in the output register.
// Synchronous active-high reset clears it. The published controller has a
// one-bit block of this name driving valid_out; its single-stage form is
// this design's choice, as all of its inputs are already in the clock
// domain.
module synchronizer (
  input  logic clock,
  input  logic reset,
  input  logic d,
  output logic q
);

  always_ff @(posedge clock) begin
    if (reset) q <= 1'b0;
    else       q <= d;
  end

endmodule
