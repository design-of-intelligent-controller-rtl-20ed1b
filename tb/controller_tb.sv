// controller_tb: end-to-end test of the fuzzy temperature controller at its
// default sizes.
//
// Streams samples through the pipeline, mostly back to back with random
// gaps, under the default symmetric partitions and under random
// membership words, and checks every output clock against a model that
// works sample by sample: saturate and offset the error, find each term by
// walking its universe code by code, look the pair up in the rule table
// written out in full, and take the midpoint of the output term. Checks:
// control, valid_out, fuzzy_in and fuzzy_out, the four-clock latency, one
// result per clock when samples arrive every clock, that control holds
// between results, and reset in mid-stream. Counts each mechanism it must
// reach (error saturation either way, rule clamping either way, each of
// the seven output terms, back-to-back samples, held output, reset while
// busy) and counts a failure for any never reached.
module controller_tb;
  import fuzzy_pkg::*;

  localparam int LATENCY = 4;

  logic               clock = 1'b0;
  logic               reset;
  logic [DATA_W-1:0]  reference, data_b, data_a;
  logic               valid_in;
  logic [MEMB_W-1:0]  diff_membership, int_membership, perm_membership;
  logic [DATA_W-1:0]  control;
  logic               valid_out;
  logic [LABEL_W-1:0] fuzzy_in, fuzzy_out;

  controller dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_sat_pos, n_sat_neg, n_clamp_lo, n_clamp_hi, n_b2b, n_hold, n_reset_busy;
  int n_term [7];

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  term_e rules [7][7] = '{
    '{ NB, NB, NB, NB, NM, NS, ZE },
    '{ NB, NB, NB, NM, NS, ZE, PS },
    '{ NB, NB, NM, NS, ZE, PS, PM },
    '{ NB, NM, NS, ZE, PS, PM, PB },
    '{ NM, NS, ZE, PS, PM, PB, PB },
    '{ NS, ZE, PS, PM, PB, PB, PB },
    '{ ZE, PS, PM, PB, PB, PB, PB }
  };

  function automatic int term_of(logic [MEMB_W-1:0] m, int x);
    int map [64];
    int pos = 0;
    for (int k = 0; k < 7; k++)
      for (int i = 0; i < int'(m[3*k +: 3]); i++) begin
        map[pos] = k;
        pos++;
      end
    return (x < pos) ? map[x] : 6;
  endfunction

  function automatic int midpoint(logic [MEMB_W-1:0] m, int t);
    int first = 0, r;
    for (int k = 0; k < t; k++) first += int'(m[3*k +: 3]);
    if (m[3*t +: 3] == 0) r = first;
    else r = (2 * first + int'(m[3*t +: 3]) - 1 + 1) / 2;
    return (r > 15) ? 15 : r;
  endfunction

  typedef struct {
    int control;
    int e_term;
    int out_term;
  } result_t;

  // Expected outputs, indexed by the clock they must appear on.
  result_t expect_q [$];
  int      due_q    [$];
  int      cyc = 0;
  int      last_control = 0;
  logic    prev_valid_in = 1'b0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Work out one sample's result and queue it.
  task automatic push_sample();
    int e, ecode, et, dt, s, ot;
    result_t r;
    e = int'(reference) - int'(data_b);
    if (e > 7)  begin e = 7;  n_sat_pos++; end
    if (e < -8) begin e = -8; n_sat_neg++; end
    ecode = e + 8;
    et = term_of(diff_membership, ecode);
    dt = term_of(int_membership, int'(data_a));
    s  = et + dt - 3;
    if (s < 0) n_clamp_lo++;
    if (s > 6) n_clamp_hi++;
    ot = rules[et][dt];
    n_term[ot]++;
    r.control  = midpoint(perm_membership, ot);
    r.e_term   = et;
    r.out_term = ot;
    expect_q.push_back(r);
    due_q.push_back(cyc + LATENCY);
  endtask

  // Drive one clock: a sample with probability p_valid.
  task automatic step(int p_valid);
    @(negedge clock);
    reference = DATA_W'($urandom);
    data_b    = DATA_W'($urandom);
    data_a    = DATA_W'($urandom);
    valid_in  = 1'(($urandom % 100) < p_valid);
    if (valid_in) begin
      if (prev_valid_in) n_b2b++;
      push_sample();
    end
    prev_valid_in = valid_in;
    @(posedge clock); #1;
    cyc++;
    if (due_q.size() > 0 && due_q[0] == cyc) begin
      result_t r;
      r = expect_q.pop_front();
      void'(due_q.pop_front());
      check("valid_out at latency", valid_out);
      check($sformatf("control got %0d exp %0d", control, r.control), int'(control) == r.control);
      last_control = r.control;
    end else begin
      check("no valid_out without a sample", !valid_out);
      check("control holds", int'(control) == last_control);
      n_hold++;
    end
  endtask

  // Clear everything, including the model's pipeline.
  task automatic do_reset(bit busy);
    if (busy && due_q.size() > 0) n_reset_busy++;
    @(negedge clock);
    reset = 1'b1; valid_in = 1'b0; prev_valid_in = 1'b0;
    @(posedge clock); @(posedge clock); #1;
    check("reset clears valid_out", !valid_out);
    check("reset clears control", control == '0);
    expect_q.delete(); due_q.delete();
    last_control = 0;
    @(negedge clock); reset = 1'b0;
  endtask

  initial begin
    reset = 1'b1; valid_in = 1'b0;
    reference = '0; data_b = '0; data_a = '0;
    diff_membership = MEMB_DEFAULT;
    int_membership  = MEMB_DEFAULT;
    perm_membership = MEMB_DEFAULT;
    n_sat_pos = 0; n_sat_neg = 0; n_clamp_lo = 0; n_clamp_hi = 0;
    n_b2b = 0; n_hold = 0; n_reset_busy = 0;
    foreach (n_term[i]) n_term[i] = 0;
    do_reset(1'b0);

    // A hand-worked sample: set point 10, measured 10 (zero error, code 8,
    // ZE), change code 8 (ZE): rule ZE, crisp mid-scale 8, four clocks on.
    @(negedge clock);
    reference = 4'd10; data_b = 4'd10; data_a = 4'd8; valid_in = 1'b1;
    @(negedge clock); valid_in = 1'b0;
    check("fuzzy_in is ZE one clock after the sample", fuzzy_in == ZE);
    @(posedge clock); #1;
    check("fuzzy_out is ZE two clocks after", fuzzy_out == ZE);
    @(posedge clock); #1;
    check("no result before four clocks", !valid_out);
    @(posedge clock); #1;
    check("result after four clocks", valid_out && control == 4'd8);
    last_control = 8;

    // Hand-worked: set point 15, measured 0 (error +15 saturates to +7,
    // code 15, PB), change code 15 (PB): PB, the midpoint of PB's codes
    // 14..15, rounded up to 15.
    @(negedge clock);
    reference = 4'd15; data_b = 4'd0; data_a = 4'd15; valid_in = 1'b1;
    @(negedge clock); valid_in = 1'b0;
    repeat (3) @(posedge clock); #1;
    check("PB/PB result", valid_out && control == 4'd15);
    last_control = 15;
    @(negedge clock);
    @(posedge clock); #1;

    // Label outputs against the model, sample by sample with gaps.
    for (int n = 0; n < 200; n++) begin
      int et, ot;
      @(negedge clock);
      reference = DATA_W'($urandom); data_b = DATA_W'($urandom);
      data_a = DATA_W'($urandom); valid_in = 1'b1;
      begin
        int e;
        e = int'(reference) - int'(data_b);
        e = (e > 7) ? 7 : (e < -8) ? -8 : e;
        et = term_of(diff_membership, e + 8);
        ot = rules[et][term_of(int_membership, int'(data_a))];
      end
      @(negedge clock); valid_in = 1'b0;
      check("fuzzy_in label", int'(fuzzy_in) == et);
      @(posedge clock); #1;
      check("fuzzy_out label", int'(fuzzy_out) == ot);
      repeat (3) @(posedge clock);
    end
    do_reset(1'b0);

    // Streams under the default partitions: full rate, then gappy.
    for (int n = 0; n < 2000; n++) step(100);
    for (int n = 0; n < 2000; n++) step(60);
    // Reset with samples in flight.
    for (int n = 0; n < 3; n++) step(100);
    do_reset(1'b1);

    // Random partitions.
    for (int p = 0; p < 50; p++) begin
      diff_membership = MEMB_W'({$urandom, $urandom});
      int_membership  = MEMB_W'({$urandom, $urandom});
      perm_membership = MEMB_W'({$urandom, $urandom});
      for (int n = 0; n < 200; n++) step(70);
      // Let the pipeline drain before the words change again.
      for (int n = 0; n < LATENCY; n++) step(0);
    end

    $display("mechanisms: sat_pos=%0d sat_neg=%0d clamp_lo=%0d clamp_hi=%0d b2b=%0d hold=%0d reset_busy=%0d",
             n_sat_pos, n_sat_neg, n_clamp_lo, n_clamp_hi, n_b2b, n_hold, n_reset_busy);
    $display("output terms: NB=%0d NM=%0d NS=%0d ZE=%0d PS=%0d PM=%0d PB=%0d",
             n_term[0], n_term[1], n_term[2], n_term[3], n_term[4], n_term[5], n_term[6]);
    check("error saturated high", n_sat_pos > 0);
    check("error saturated low", n_sat_neg > 0);
    check("rule clamped low", n_clamp_lo > 0);
    check("rule clamped high", n_clamp_hi > 0);
    check("back-to-back samples", n_b2b > 0);
    check("output held between results", n_hold > 0);
    check("reset with samples in flight", n_reset_busy > 0);
    foreach (n_term[i]) check($sformatf("output term %0d reached", i), n_term[i] > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
