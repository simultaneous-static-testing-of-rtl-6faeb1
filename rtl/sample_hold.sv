// sample_hold: behavioural model of the sample-and-hold circuit.
//
// Behavioural model, not synthesizable logic. The real circuit is a holding
// capacitor with a unity-gain buffer and a small compensation capacitor
// driven by the inverted switch clock, which cancels the charge the switch
// injects when it opens. Here the output takes vin on each clock edge where
// sample is high and holds it otherwise; HOLD_ERR_V is the residual
// feedthrough error left after compensation (0 = ideal).
//
// The compensated holding circuit is given only by its principle; the
// residual-error parameter is a modelling choice.
module sample_hold #(
  parameter real HOLD_ERR_V = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,
  input  real  vin,
  output real  vout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      vout <= 0.0;
    else if (sample) vout <= vin + HOLD_ERR_V;
  end

endmodule
