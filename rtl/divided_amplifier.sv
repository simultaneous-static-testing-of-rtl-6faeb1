// divided_amplifier: behavioural model of the divided difference amplifier.
//
// Behavioural model, not synthesizable logic. The difference amplifier of
// gain K is split into four sub-amplifiers, each designed for one 0.5 V
// slice of the -1 V .. 1 V range, because one amplifier with accurate gain
// over the whole range is hard to build. The one-hot select sel[3:0]
// (phi11..phi14) connects the inputs and the output of exactly one of them;
// the controller derives it from the present D/A converter test code.
// vout = K * (1 + GAIN_ERR[j]) * (vin_p - vin_n) + OFFSET_V[j] for the
// selected sub-amplifier j, 0 V when none is selected. The per-segment
// gain and offset errors are parameters (0 = ideal) so that a testbench can
// show their effect.
//
// The four 0.5 V input ranges and the select from the D/A code follow the
// described amplifier; the error parameters are modelling choices.
module divided_amplifier #(
  parameter real K           = 128.0,
  parameter real GAIN_ERR[4] = '{0.0, 0.0, 0.0, 0.0},
  parameter real OFFSET_V[4] = '{0.0, 0.0, 0.0, 0.0}
) (
  input  real        vin_p,
  input  real        vin_n,
  input  logic [3:0] sel,
  output real        vout
);

  always_comb begin
    vout = 0.0;
    for (int j = 0; j < 4; j++) begin
      if (sel[j]) vout = K * (1.0 + GAIN_ERR[j]) * (vin_p - vin_n) + OFFSET_V[j];
    end
  end

endmodule
