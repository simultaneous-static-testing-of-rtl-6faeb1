// dnl_hold_caps: behavioural model of the cross-switched holding capacitors.
//
// Behavioural model, not synthesizable logic. Two switches, phi1 and phi2,
// connect the D/A converter output to the capacitors C1 and C2. While a
// switch is closed its capacitor follows the converter output (updated on
// each clock edge); while it is open the capacitor keeps its voltage.
// Within one code the controller first closes phi2 (C2 takes the present
// output while C1 still holds the previous one), then phi1 (C1 takes the
// present output for the next code). vc2 - vc1 is thus V(i) - V(i-1) during
// the second half until the edge that closes phi1 has passed. FT_ERR_V is
// the charge-injection step a capacitor gets when its switch opens (0 =
// ideal compensation).
module dnl_hold_caps #(
  parameter real FT_ERR_V = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic phi1,
  input  logic phi2,
  input  real  vin,
  output real  vc1,
  output real  vc2
);

  logic phi1_q, phi2_q;
  real  c1, c2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1     <= 0.0;
      c2     <= 0.0;
      phi1_q <= 1'b0;
      phi2_q <= 1'b0;
    end else begin
      phi1_q <= phi1;
      phi2_q <= phi2;
      if (phi1) c1 <= vin;
      else if (phi1_q) c1 <= c1 + FT_ERR_V;
      if (phi2) c2 <= vin;
      else if (phi2_q) c2 <= c2 + FT_ERR_V;
    end
  end

  assign vc1 = c1;
  assign vc2 = c2;

endmodule
