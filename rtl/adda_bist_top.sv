// adda_bist_top: built-in self-test that checks the static linearity of an
// A/D converter and a D/A converter at the same time.
//
// One analog ramp and one counter serve both converters. The ramp is the
// input of the A/D converter and, delayed by one LSB, the moving ideal
// level against which the D/A converter output is measured. The counter,
// advanced every half LSB of ramp travel, is the timing reference of the
// A/D converter's transitions and, shifted, the code sequence of the D/A
// converter. One pass of the ramp thus tests offset, gain, INL and DNL of
// both converters against +/- 1/2 LSB.
//
// Blocks: test_controller (sequencing), shared_counter, ramp_generator,
// transition_detector + adc_inl_detector + adc_dnl_detector (digital
// analyzer of the A/D converter), dac_analyzer (analog analyzer of the D/A
// converter, behavioural), and the two test-mode input multiplexers, which
// are the two assignments at the end. In normal mode (test_mode = 0) the
// converters get dac_normal_in and adc_normal_vin.
//
// Configuration: N and M are the converter resolutions; ADC_LOW_LSB and
// DAC_LOW_LSB place the bottom of each converter's full-scale range, in LSB
// above -1 V (1 LSB = 2 V / 2^8). The ramp starts at the lower of the two.
// The defaults are the case with equal 8-bit converters over -1 V .. 1 V;
// the other evaluated cases are N=8, M=7, DAC_LOW_LSB=64 / N=7, M=8,
// ADC_LOW_LSB=64 / N=7, M=7, ADC_LOW_LSB=128, DAC_LOW_LSB=64.
// SPL is the number of A/D samples per LSB of ramp travel and
// CLK_PER_SAMPLE the clocks per sample.
//
// Timing: a start pulse begins AZ_CLKS clocks of comparator auto-zeroing,
// then the ramp. A run takes AZ_CLKS + END_H * SPL/2 * CLK_PER_SAMPLE
// clocks, END_H being the half-LSB length of the longer of the two tests
// (514 for the defaults: 32,912 clocks, about 10.3 ms at 3.2 MHz). The
// A/D converter must present the code of the current ramp level in the
// clock where adc_sample is high; the D/A converter output must settle
// within half an LSB period. All result outputs are low for a
// converter that is within +/- 1/2 LSB everywhere, except that OUTD_DNL*
// of the first code is not meaningful.
//
// rst_n is an asynchronous reset; lint may call it "flopped as both
// synchronous and async" only because the controller's assertions use it
// in their disable condition as well.
//
// The sharing of one ramp and one counter, the three A/D outputs, the four D/A
// outputs and the per-configuration offsets follow the described method; the
// test_mode select, the result strobes and the status outputs are this
// design's additions.
module adda_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N              = 8,
  parameter int unsigned M              = 8,
  parameter int unsigned ADC_LOW_LSB    = 0,
  parameter int unsigned DAC_LOW_LSB    = 0,
  parameter int unsigned SPL            = 8,
  parameter int unsigned CLK_PER_SAMPLE = 16,
  parameter int unsigned AZ_CLKS        = 16,
  parameter real         K              = K_GAIN,
  parameter real         VREF_HI        = VREF_HI_V,
  parameter real         VREF_LO        = VREF_LO_V
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic         start,
  // normal-mode inputs
  input  logic [M-1:0] dac_normal_in,
  input  real          adc_normal_vin,
  // converters under test
  output logic [M-1:0] dac_in,
  input  real          dac_vout,
  output real          adc_vin,
  output logic         adc_sample,
  input  logic [N-1:0] adc_code,
  // results
  output logic         outa_oi,
  output logic         outa_f,
  output logic         outa_inl,
  output logic         outa_dnl,
  output logic         outd_inlu,
  output logic         outd_inll,
  output logic         outd_dnlu,
  output logic         outd_dnll,
  // observation and status
  output logic         adc_tran,
  output logic         dac_strobe,
  output logic         phi1,
  output logic         phi2,
  output logic         busy,
  output logic         test_start,
  output logic         test_end
);

  localparam int unsigned CNT_W   = cnt_width(N, M, ADC_LOW_LSB, DAC_LOW_LSB);
  localparam int unsigned RAMP0   = (ADC_LOW_LSB < DAC_LOW_LSB) ? ADC_LOW_LSB : DAC_LOW_LSB;
  localparam int unsigned A_OFF   = ADC_LOW_LSB - RAMP0;
  localparam real         V_START = V_FSR_LOW + real'(RAMP0) * LSB_V;

  logic [CNT_W-1:0] cnt;
  logic             cnt_load, cnt_inc, ramp_load, ramp_step, sample_tick;
  logic             phi21, phi22, adc_init, adc_active, adc_end;
  logic             dac_active, din_a, sh_sample, missing;
  logic [M-1:0]     dac_code;
  logic [3:0]       amp_sel;
  logic [N-1:0]     td, td_next;
  real              vramp;

  test_controller #(
    .N(N), .M(M), .ADC_LOW_LSB(ADC_LOW_LSB), .DAC_LOW_LSB(DAC_LOW_LSB),
    .SPL(SPL), .CLK_PER_SAMPLE(CLK_PER_SAMPLE), .AZ_CLKS(AZ_CLKS), .CNT_W(CNT_W)
  ) u_ctrl (
    .clk, .rst_n, .start(start && test_mode), .cnt,
    .cnt_load, .cnt_inc, .ramp_load, .ramp_step, .sample_tick,
    .busy, .test_start, .test_end, .phi21, .phi22,
    .adc_init, .adc_active, .adc_end,
    .dac_active, .dac_code, .din_a, .phi1, .phi2, .amp_sel, .sh_sample, .dac_strobe
  );

  shared_counter #(.W(CNT_W), .INIT(3)) u_cnt (
    .clk, .rst_n, .load(cnt_load), .inc(cnt_inc), .q(cnt));

  ramp_generator #(.V_START(V_START), .STEP_V(LSB_V / real'(SPL))) u_ramp (
    .clk, .rst_n, .load(ramp_load), .ramp_step, .vramp);

  transition_detector #(.N(N)) u_td (
    .clk, .rst_n, .init(adc_init), .sample_tick, .active(adc_active),
    .adc_code, .tran_pulse(adc_tran), .missing, .td, .td_next);

  adc_inl_detector #(.N(N), .CNT_W(CNT_W), .A_OFF(A_OFF)) u_inl (
    .clk, .rst_n, .init(adc_init), .sample_tick, .active(adc_active),
    .adc_end, .adc_code, .tran_pulse(adc_tran), .td_next, .cnt,
    .outa_oi, .outa_f, .outa_inl);

  adc_dnl_detector #(.SPL(SPL)) u_dnl (
    .clk, .rst_n, .init(adc_init), .sample_tick, .active(adc_active),
    .tran_pulse(adc_tran), .missing, .outa_dnl);

  dac_analyzer #(.K(K), .VREF_HI(VREF_HI), .VREF_LO(VREF_LO)) u_dac_an (
    .clk, .rst_n, .vdac(dac_vout), .vramp, .phi1, .phi2, .amp_sel,
    .sh_sample, .phi21, .phi22,
    .outd_inlu, .outd_inll, .outd_dnlu, .outd_dnll);

  // Test-mode multiplexers at the converter inputs.
  assign dac_in     = test_mode ? dac_code : dac_normal_in;
  assign adc_vin    = test_mode ? vramp : adc_normal_vin;
  assign adc_sample = sample_tick;

endmodule
