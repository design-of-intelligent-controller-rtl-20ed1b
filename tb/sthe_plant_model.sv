// sthe_plant_model: behavioural model of the shell-and-tube heat exchanger
// for closed-loop simulation. Not synthesizable (real arithmetic).
//
// First order plus dead time: G(s) = KP / (TAU s + 1) e^(-TD s), with the
// identified values KP = 0.495 (degC per % of the manipulated variable),
// TAU = 376 s and TD = 62.73 s as defaults. It is stepped once per control
// sample of TS seconds with the exact zero-order-hold discretisation
//   y[k+1] = a y[k] + KP (1 - a) u[k - D],  a = exp(-TS/TAU), D = round(TD/TS).
// The 4-bit control code is read as 0..100 % of the actuator range
// (the 4..20 mA span), and the outlet temperature rise is reported as a
// 4-bit code of C_PER_CODE degC per step, saturating at 0 and 15. The
// degC-per-code scale and the code mapping are modelling choices.
//
// Interface: on each rising clock edge with sample high, the model takes
// u_code and advances one sample; temp_code and temp_c then hold the new
// outlet temperature (rise above the inlet, degC).
module sthe_plant_model #(
  parameter real TS         = 10.0,
  parameter real TAU        = 376.0,
  parameter real TD         = 62.73,
  parameter real KP         = 0.495,
  parameter real C_PER_CODE = 3.75
) (
  input  logic       clock,
  input  logic       sample,
  input  logic [3:0] u_code,
  output logic [3:0] temp_code,
  output real        temp_c
);

  localparam int D = int'(TD / TS);

  real a;
  real u_pct [D + 1];
  real y;

  initial begin
    a = $exp(-TS / TAU);
    y = 0.0;
    foreach (u_pct[i]) u_pct[i] = 0.0;
  end

  always @(posedge clock) begin
    if (sample) begin
      // Dead time: a shift line of D samples.
      for (int i = D; i > 0; i--) u_pct[i] = u_pct[i - 1];
      u_pct[0] = real'(u_code) * 100.0 / 15.0;
      y = a * y + KP * (1.0 - a) * u_pct[D];
    end
  end

  always_comb begin
    int c;
    c = int'(y / C_PER_CODE);
    temp_c    = y;
    temp_code = (c < 0) ? 4'd0 : (c > 15) ? 4'd15 : 4'(c);
  end

endmodule
