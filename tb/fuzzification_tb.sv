// fuzzification_tb: self-checking test of the fuzzification stage.
//
// Drives every 4-bit input against the default symmetric partition and
// against random membership words (zero-width terms and partitions that
// stop short of or run past the 16-code universe included). The expected
// label comes from a lookup built by walking the universe code by code,
// which is a different method from the block's running-sum compare. Also
// checks the one-clock latency, that valid_out follows valid_in, that the
// label holds while valid_in is low, and reset.
module fuzzification_tb;
  import fuzzy_pkg::*;

  logic              clock = 1'b0;
  logic              reset;
  logic              valid_in;
  logic [DATA_W-1:0] data_in;
  logic [MEMB_W-1:0] membership;
  logic              valid_out;
  logic [LABEL_W-1:0] fuzzy_out;

  int checks = 0, failures = 0;

  fuzzification dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [LABEL_W-1:0] expect_label(logic [MEMB_W-1:0] m, int x);
    int map [64];
    int pos = 0;
    for (int k = 0; k < NTERMS; k++)
      for (int i = 0; i < int'(m[3*k +: 3]); i++) begin
        map[pos] = k;
        pos++;
      end
    if (x < pos) return LABEL_W'(map[x]);
    return LABEL_W'(NTERMS - 1);
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Apply one sample and check it one clock later.
  task automatic sample(logic [MEMB_W-1:0] m, int x);
    @(negedge clock);
    membership = m;
    data_in    = DATA_W'(x);
    valid_in   = 1'b1;
    @(posedge clock); #1;
    check("valid after one clock", valid_out == 1'b1);
    check($sformatf("label m=%h x=%0d got %0d exp %0d", m, x, fuzzy_out, expect_label(m, x)),
          fuzzy_out == expect_label(m, x));
  endtask

  initial begin
    logic [MEMB_W-1:0] m;
    logic [LABEL_W-1:0] held;
    reset = 1'b1; valid_in = 1'b0; data_in = '0; membership = MEMB_DEFAULT;
    repeat (2) @(posedge clock); #1;
    check("reset clears valid", valid_out == 1'b0);
    check("reset clears label", fuzzy_out == '0);
    @(negedge clock); reset = 1'b0;

    // Default partition: codes 6..9 are ZE, 0..1 NB, 14..15 PB.
    for (int x = 0; x < 16; x++) sample(MEMB_DEFAULT, x);
    sample(MEMB_DEFAULT, 8);
    check("code 8 is ZE", fuzzy_out == ZE);
    sample(MEMB_DEFAULT, 0);
    check("code 0 is NB", fuzzy_out == NB);
    sample(MEMB_DEFAULT, 15);
    check("code 15 is PB", fuzzy_out == PB);

    // Hold while valid_in is low.
    held = fuzzy_out;
    @(negedge clock); valid_in = 1'b0; data_in = 4'd7;
    @(posedge clock); #1;
    check("valid drops", valid_out == 1'b0);
    check("label holds", fuzzy_out == held);

    // Random partitions.
    for (int n = 0; n < 300; n++) begin
      m = MEMB_W'({$urandom, $urandom});
      for (int x = 0; x < 16; x++) sample(m, x);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
