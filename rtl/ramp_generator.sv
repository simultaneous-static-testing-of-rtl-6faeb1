// ramp_generator: behavioural model of the analog ramp generator.
//
// Behavioural model, not synthesizable logic: the real part is an analog
// high-precision ramp circuit. The ramp is the test stimulus of the A/D
// converter and the moving voltage reference of the D/A converter test, so
// it is shared by both. Here the ramp is a staircase with one step of
// STEP_V per ramp_step clock, which is what a sampled converter sees of a
// continuous ramp. load restarts it at V_START. The output is computed from
// an integer step count, so no rounding error builds up along the ramp.
// SLOPE_ERR models a relative slope error of the real circuit (0 = ideal).
//
// The ramp circuit itself is an existing design that is not specified here;
// the staircase form and the slope-error parameter are modelling choices.
module ramp_generator #(
  parameter real V_START   = -1.0,
  parameter real STEP_V    = 2.0 / 256.0 / 8.0,
  parameter real SLOPE_ERR = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic ramp_step,
  output real  vramp
);

  int unsigned steps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         steps <= 0;
    else if (load)      steps <= 0;
    else if (ramp_step) steps <= steps + 1;
  end

  assign vramp = V_START + real'(steps) * STEP_V * (1.0 + SLOPE_ERR);

endmodule
