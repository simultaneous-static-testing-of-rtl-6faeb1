// autozero_comparator: behavioural model of a comparator with auto-zeroing.
//
// Behavioural model, not synthesizable logic. The comparator has an input
// offset OFFSET_V. During the auto-zero phase (phi21 high) it is connected
// in unity feedback and its offset is stored on the capacitor C_AZ; during
// the compare phase (phi22 high) C_AZ sits in series with the + input and
// cancels the offset. The output is high when vin_p exceeds vin_n after
// cancellation, and low outside the compare phase. AZ_RESIDUAL_V is the
// part of the offset that the capacitor fails to store (0 = ideal).
//
// The two phases and the place of C_AZ in series with the + input follow the
// described comparator; the offset and residual parameters are modelling
// choices.
module autozero_comparator #(
  parameter real OFFSET_V      = 0.0,
  parameter real AZ_RESIDUAL_V = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic phi21,
  input  logic phi22,
  input  real  vin_p,
  input  real  vin_n,
  output logic out
);

  real c_az;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     c_az <= 0.0;
    else if (phi21) c_az <= OFFSET_V - AZ_RESIDUAL_V;
  end

  assign out = phi22 && ((vin_p - vin_n + OFFSET_V - c_az) > 0.0);

endmodule
