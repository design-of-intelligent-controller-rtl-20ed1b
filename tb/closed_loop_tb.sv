// closed_loop_tb: the controller regulating the heat-exchanger model.
//
// The controller at its default sizes drives sthe_plant_model (first order
// plus dead time, 0.495 / (376 s + 1) e^(-62.73 s), sampled every 10 s).
// Each sample the bench forms the measured outlet temperature code
// (data_b), the change of error since the last sample, offset-coded
// around 8 (data_a), and presents them with the set point (reference); the
// control word that comes back four clocks later is the actuator command
// for the next interval. Three set-point conditions are run in turn, each
// for 400 samples (more than ten time constants): a warm-up from cold to
// a set point above the controller's zero-error operating point, a step
// down, and a step back up.
//
// Checks, per condition: every result arrives exactly four clocks after
// its sample; over the last 100 samples the outlet temperature code stays
// within one code of its final value (settled, no limit cycle wider than
// one code) and within two codes of the set point, which is the band a
// zero-error output term four codes wide allows (error codes 6..9 are
// ZE). Also counts how often the error saturated and how many distinct
// control words were used, and fails if the loop never saturated or never
// moved its output.
module closed_loop_tb;
  import fuzzy_pkg::*;

  localparam int SAMPLES  = 400;
  localparam int SETTLED  = 100;
  localparam int LATENCY  = 4;
  localparam int SETPOINT [3] = '{9, 5, 8};

  logic               clock = 1'b0;
  logic               reset;
  logic [DATA_W-1:0]  reference, data_b, data_a;
  logic               valid_in;
  logic [MEMB_W-1:0]  diff_membership, int_membership, perm_membership;
  logic [DATA_W-1:0]  control;
  logic               valid_out;
  logic [LABEL_W-1:0] fuzzy_in, fuzzy_out;

  logic               plant_step;
  logic [3:0]         temp_code;
  real                temp_c;

  controller dut (.*);

  sthe_plant_model plant (
    .clock, .sample(plant_step), .u_code(control), .temp_code, .temp_c
  );

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_sat = 0;
  bit used [16];

  initial begin
    repeat (40000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int e, e_prev, de, lat, n_used, final_code, lo, hi;
    reset = 1'b1; valid_in = 1'b0; plant_step = 1'b0;
    reference = '0; data_b = '0; data_a = 4'd8;
    diff_membership = MEMB_DEFAULT;
    int_membership  = MEMB_DEFAULT;
    perm_membership = MEMB_DEFAULT;
    repeat (2) @(posedge clock);
    @(negedge clock); reset = 1'b0;

    e_prev = 0;
    foreach (SETPOINT[c]) begin
      lo = 15; hi = 0;
      for (int k = 0; k < SAMPLES; k++) begin
        @(negedge clock);
        plant_step = 1'b0;
        e  = SETPOINT[c] - int'(temp_code);
        de = e - e_prev;
        e_prev = e;
        if (e > 7 || e < -8) n_sat++;
        reference = DATA_W'(SETPOINT[c]);
        data_b    = temp_code;
        data_a    = DATA_W'((de + 8 < 0) ? 0 : (de + 8 > 15) ? 15 : de + 8);
        valid_in  = 1'b1;
        @(negedge clock); valid_in = 1'b0;
        lat = 1;
        while (!valid_out && lat < 10) begin
          @(negedge clock);
          lat++;
        end
        check($sformatf("latency %0d", lat), lat == LATENCY);
        used[control] = 1'b1;
        // Apply the new command for the next interval.
        plant_step = 1'b1;
        @(negedge clock); plant_step = 1'b0;
        if (k >= SAMPLES - SETTLED) begin
          lo = (int'(temp_code) < lo) ? int'(temp_code) : lo;
          hi = (int'(temp_code) > hi) ? int'(temp_code) : hi;
        end
      end
      final_code = int'(temp_code);
      $display("set point %0d: outlet code %0d (%0.2f degC), band %0d..%0d, control %0d",
               SETPOINT[c], final_code, temp_c, lo, hi, control);
      check($sformatf("settled within one code (set point %0d)", SETPOINT[c]), hi - lo <= 1);
      check($sformatf("within two codes of set point %0d", SETPOINT[c]),
            final_code >= SETPOINT[c] - 2 && final_code <= SETPOINT[c] + 2);
    end

    n_used = 0;
    foreach (used[i]) n_used += int'(used[i]);
    $display("error saturated on %0d samples, %0d distinct control words", n_sat, n_used);
    check("error saturation reached", n_sat > 0);
    check("control output moved", n_used > 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
