// flop_outputs_tb: self-checking test of the output register.
//
// Random data and enable for many clocks against a one-line model of an
// enabled register, plus reset in the middle of the run.
module flop_outputs_tb;
  import fuzzy_pkg::*;

  logic              clock = 1'b0;
  logic              reset;
  logic              enable;
  logic [DATA_W-1:0] d, q;
  logic [DATA_W-1:0] model;

  int checks = 0, failures = 0;

  flop_outputs dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; enable = 1'b0; d = '0; model = '0;
    repeat (2) @(posedge clock);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clock);
      reset  = (n == 1000);
      enable = 1'(($urandom % 3) != 0);
      d      = DATA_W'($urandom);
      if (reset)       model = '0;
      else if (enable) model = d;
      @(posedge clock); #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL n=%0d q=%0d exp=%0d", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
