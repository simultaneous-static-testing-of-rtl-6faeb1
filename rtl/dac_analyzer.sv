// dac_analyzer: analog response analyzer of the D/A converter test.
//
// Behavioural model, not synthesizable logic (it is built from the analog
// models below). Two paths run in parallel, one per static test:
//   INL: amplifier 1 forms K * (vramp - vdac). With the ramp delayed by one
//        LSB against the code, this is K * (V_ideal(i+1) - V_real(i)), which
//        is between K/2 and 3K/2 LSB exactly when |INL(i)| < 1/2 LSB.
//   DNL: the cross-switched capacitors hold V_real(i-1) (C1) and V_real(i)
//        (C2); amplifier 2 forms K * (V_real(i) - V_real(i-1)), which is
//        between K/2 and 3K/2 LSB exactly when |DNL(i)| < 1/2 LSB.
// Each amplifier output goes through its own S/H (sampled on sh_sample) to
// two auto-zeroed comparators against the references VREF_HI = 3K/2 LSB and
// VREF_LO = K/2 LSB: outd_*u is high when the held value is above VREF_HI
// (upper bound violated), outd_*l when it is below VREF_LO (lower bound
// violated). The references and the amplifier select are shared by both
// paths; amplifiers, S/H and comparators are not, because both paths work
// at the same time.
//
// Timing: results for code i are valid from the clock after sh_sample
// until the next sh_sample. The DNL result of the first code compares with
// whatever C1 held before the test and is to be ignored.
//
// The two paths, the gain and the two references follow the described
// analyzer; the output polarity (high = bound violated) and the divided
// amplifier in the DNL path as well as the INL path are this design's choices.
module dac_analyzer
  import bist_pkg::*;
#(
  parameter real K       = K_GAIN,
  parameter real VREF_HI = VREF_HI_V,
  parameter real VREF_LO = VREF_LO_V
) (
  input  logic       clk,
  input  logic       rst_n,
  input  real        vdac,
  input  real        vramp,
  input  logic       phi1,
  input  logic       phi2,
  input  logic [3:0] amp_sel,
  input  logic       sh_sample,
  input  logic       phi21,
  input  logic       phi22,
  output logic       outd_inlu,
  output logic       outd_inll,
  output logic       outd_dnlu,
  output logic       outd_dnll
);

  real vc1, vc2, vout1, vout2, vsh1, vsh2;

  divided_amplifier #(.K(K)) u_amp_inl (
    .vin_p(vramp), .vin_n(vdac), .sel(amp_sel), .vout(vout1));

  dnl_hold_caps u_caps (
    .clk, .rst_n, .phi1, .phi2, .vin(vdac), .vc1, .vc2);

  divided_amplifier #(.K(K)) u_amp_dnl (
    .vin_p(vc2), .vin_n(vc1), .sel(amp_sel), .vout(vout2));

  sample_hold u_sh_inl (.clk, .rst_n, .sample(sh_sample), .vin(vout1), .vout(vsh1));
  sample_hold u_sh_dnl (.clk, .rst_n, .sample(sh_sample), .vin(vout2), .vout(vsh2));

  autozero_comparator u_cmp_inlu (.clk, .rst_n, .phi21, .phi22,
    .vin_p(vsh1), .vin_n(VREF_HI), .out(outd_inlu));
  autozero_comparator u_cmp_inll (.clk, .rst_n, .phi21, .phi22,
    .vin_p(VREF_LO), .vin_n(vsh1), .out(outd_inll));
  autozero_comparator u_cmp_dnlu (.clk, .rst_n, .phi21, .phi22,
    .vin_p(vsh2), .vin_n(VREF_HI), .out(outd_dnlu));
  autozero_comparator u_cmp_dnll (.clk, .rst_n, .phi21, .phi22,
    .vin_p(VREF_LO), .vin_n(vsh2), .out(outd_dnll));

endmodule
