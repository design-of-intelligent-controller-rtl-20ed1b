// fuzzy_rulebase_tb: self-checking test of the rule base.
//
// Applies all 49 pairs of error and change-of-error terms, plus the unused
// label code 7 on either input, and compares the output term with the
// rule table written out in full below (rows: error NB..PB, columns:
// change of error NB..PB). Checks the one-clock latency, that the output
// holds while valid_in is low, and reset.
module fuzzy_rulebase_tb;
  import fuzzy_pkg::*;

  logic               clock = 1'b0;
  logic               reset;
  logic               valid_in;
  logic [LABEL_W-1:0] diff_label, delta_label;
  logic               valid_out;
  logic [LABEL_W-1:0] control_label;

  int checks = 0, failures = 0;

  fuzzy_rulebase dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output term for each (error, change of error) pair.
  term_e rules [7][7] = '{
    //  NB  NM  NS  ZE  PS  PM  PB      <- change of error
    '{ NB, NB, NB, NB, NM, NS, ZE },  // error NB
    '{ NB, NB, NB, NM, NS, ZE, PS },  // error NM
    '{ NB, NB, NM, NS, ZE, PS, PM },  // error NS
    '{ NB, NM, NS, ZE, PS, PM, PB },  // error ZE
    '{ NM, NS, ZE, PS, PM, PB, PB },  // error PS
    '{ NS, ZE, PS, PM, PB, PB, PB },  // error PM
    '{ ZE, PS, PM, PB, PB, PB, PB }   // error PB
  };

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [LABEL_W-1:0] held;
    reset = 1'b1; valid_in = 1'b0; diff_label = '0; delta_label = '0;
    repeat (2) @(posedge clock); #1;
    check("reset clears valid", valid_out == 1'b0);
    check("reset clears label", control_label == '0);
    @(negedge clock); reset = 1'b0;

    for (int e = 0; e < 7; e++)
      for (int d = 0; d < 7; d++) begin
        @(negedge clock);
        diff_label = LABEL_W'(e); delta_label = LABEL_W'(d); valid_in = 1'b1;
        @(posedge clock); #1;
        check("valid after one clock", valid_out);
        check($sformatf("rule e=%0d de=%0d got %0d exp %0d", e, d, control_label, rules[e][d]),
              control_label == rules[e][d]);
      end

    // Unused code 7 saturates to PB against ZE or above.
    @(negedge clock); diff_label = 3'd7; delta_label = ZE;
    @(posedge clock); #1;
    check("code 7 error saturates", control_label == PB);
    @(negedge clock); diff_label = NB; delta_label = 3'd7;
    @(posedge clock); #1;
    check("code 7 change maps like one past PB", control_label == PS);

    held = control_label;
    @(negedge clock); valid_in = 1'b0; diff_label = PB; delta_label = PB;
    @(posedge clock); #1;
    check("valid drops", !valid_out);
    check("label holds", control_label == held);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
