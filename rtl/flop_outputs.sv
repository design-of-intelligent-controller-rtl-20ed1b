// flop_outputs: output register of the controller.
//
// A WIDTH-bit register with synchronous active-high reset and a load
// enable. In the controller it holds the crisp control word: it loads when
// the defuzzifier presents a valid result and keeps the last value between
// samples, so the actuator sees a steady output. q follows d one clock
// after an enabled edge. The published controller places a library
// flip-flop here; the enable and reset are this design's choice.
module flop_outputs #(
  parameter int unsigned WIDTH = fuzzy_pkg::DATA_W
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             enable,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clock) begin
    if (reset)       q <= '0;
    else if (enable) q <= d;
  end

endmodule
