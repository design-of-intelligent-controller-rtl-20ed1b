// defuzzification_tb: self-checking test of the defuzzifier.
//
// For the default output partition and for random ones, applies every
// label and compares the crisp value with the midpoint of the term's
// interval, found here by listing the codes the term covers and averaging
// the first and last (floor of (first + last + 1) / 2), a different route
// from the block's start + width/2. Terms of zero width give their start;
// results past 15 saturate. Checks the one-clock latency, hold while
// valid_in is low, and reset.
module defuzzification_tb;
  import fuzzy_pkg::*;

  logic               clock = 1'b0;
  logic               reset;
  logic               valid_in;
  logic [LABEL_W-1:0] fuzzy_input;
  logic [MEMB_W-1:0]  membership;
  logic               valid_out;
  logic [DATA_W-1:0]  crisp_out;

  int checks = 0, failures = 0;

  defuzzification dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_crisp(logic [MEMB_W-1:0] m, int label);
    int first = 0, last, r;
    if (label > NTERMS - 1) label = NTERMS;  // past every term
    for (int k = 0; k < label && k < NTERMS; k++) first += int'(m[3*k +: 3]);
    if (label >= NTERMS || m[3*label +: 3] == 0) r = first;
    else begin
      last = first + int'(m[3*label +: 3]) - 1;
      r = (first + last + 1) / 2;
    end
    return (r > 15) ? 15 : r;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic sample(logic [MEMB_W-1:0] m, int label);
    @(negedge clock);
    membership = m; fuzzy_input = LABEL_W'(label); valid_in = 1'b1;
    @(posedge clock); #1;
    check("valid after one clock", valid_out);
    check($sformatf("crisp m=%h l=%0d got %0d exp %0d", m, label, crisp_out, expect_crisp(m, label)),
          int'(crisp_out) == expect_crisp(m, label));
  endtask

  initial begin
    logic [DATA_W-1:0] held;
    reset = 1'b1; valid_in = 1'b0; fuzzy_input = '0; membership = MEMB_DEFAULT;
    repeat (2) @(posedge clock); #1;
    check("reset clears valid", !valid_out);
    check("reset clears output", crisp_out == '0);
    @(negedge clock); reset = 1'b0;

    for (int l = 0; l < 8; l++) sample(MEMB_DEFAULT, l);
    sample(MEMB_DEFAULT, ZE);
    check("ZE gives mid-scale 8", crisp_out == 4'd8);
    sample(MEMB_DEFAULT, NB);
    check("NB gives 1", crisp_out == 4'd1);

    held = crisp_out;
    @(negedge clock); valid_in = 1'b0; fuzzy_input = PB;
    @(posedge clock); #1;
    check("valid drops", !valid_out);
    check("output holds", crisp_out == held);

    for (int n = 0; n < 500; n++) begin
      logic [MEMB_W-1:0] m;
      m = MEMB_W'({$urandom, $urandom});
      for (int l = 0; l < 8; l++) sample(m, l);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
