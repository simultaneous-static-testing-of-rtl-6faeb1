// tb_adda_bist_top: end-to-end test of the combined BIST in all four
// converter configurations at once, plus the mirror image of the partial
// overlap (case 5), in which the A/D range lies below the D/A range.
//
//   case 1: 8-bit A/D and 8-bit D/A, both -1 V .. 1 V
//   case 2: 8-bit A/D over -1 V .. 1 V, 7-bit D/A over -0.5 V .. 0.5 V
//   case 3: 7-bit A/D over -0.5 V .. 0.5 V, 8-bit D/A over -1 V .. 1 V
//   case 4: 7-bit A/D over 0 V .. 1 V, 7-bit D/A over -0.5 V .. 0.5 V
//   case 5: 7-bit A/D over -0.5 V .. 0.5 V, 7-bit D/A over 0 V .. 1 V
// Each case has its own BIST instance and its own converter models and
// checker (bist_env), which runs normal mode and two complete test runs with
// injected errors. Beyond the per-event checks of bist_env, this bench
// requires every mechanism to have happened in every case: transitions, each
// A/D error flag (INL, DNL, missing code, offset, final value), each D/A
// error flag (INL and DNL, upper and lower bound), cross switching of
// phi1/phi2, and use of every amplifier segment the D/A range covers.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_adda_bist_top;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NC = 5;
  localparam int CN [NC] = '{8, 8, 7, 7, 7};
  localparam int CM [NC] = '{8, 7, 8, 7, 7};
  localparam int CA [NC] = '{0, 0, 64, 128, 64};
  localparam int CD [NC] = '{0, 64, 0, 64, 128};
  localparam int CSEG [NC] = '{4, 2, 4, 2, 2};   // amplifier segments spanned by the D/A range

  logic [NC-1:0] done;
  int env_checks [NC], env_fail [NC];
  int c_tran [NC], c_inl [NC], c_dnl [NC], c_miss [NC], c_oi [NC], c_f [NC];
  int c_inlu [NC], c_inll [NC], c_dnlu [NC], c_dnll [NC];
  int c_phi1 [NC], c_phi2 [NC];
  logic [3:0] seg_seen [NC];

  for (genvar g = 0; g < NC; g++) begin : g_case
    localparam int N = CN[g];
    localparam int M = CM[g];
    logic         test_mode, start, adc_sample;
    logic [M-1:0] dac_normal_in, dac_in;
    real          adc_normal_vin, dac_vout, adc_vin;
    logic [N-1:0] adc_code;
    logic outa_oi, outa_f, outa_inl, outa_dnl, outd_inlu, outd_inll, outd_dnlu, outd_dnll;
    logic adc_tran, dac_strobe, phi1, phi2, busy, test_start, test_end;
    logic phi1_q, phi2_q;

    adda_bist_top #(.N(N), .M(M), .ADC_LOW_LSB(CA[g]), .DAC_LOW_LSB(CD[g])) dut (
      .clk, .rst_n, .test_mode, .start, .dac_normal_in, .adc_normal_vin,
      .dac_in, .dac_vout, .adc_vin, .adc_sample, .adc_code,
      .outa_oi, .outa_f, .outa_inl, .outa_dnl,
      .outd_inlu, .outd_inll, .outd_dnlu, .outd_dnll,
      .adc_tran, .dac_strobe, .phi1, .phi2, .busy, .test_start, .test_end);

    bist_env #(.N(N), .M(M), .ADC_LOW_LSB(CA[g]), .DAC_LOW_LSB(CD[g]), .SEED(11 + g)) env (
      .clk, .rst_n, .test_mode, .start, .dac_normal_in, .adc_normal_vin,
      .dac_in, .dac_vout, .adc_vin, .adc_sample, .adc_code,
      .outa_oi, .outa_f, .outa_inl, .outa_dnl,
      .outd_inlu, .outd_inll, .outd_dnlu, .outd_dnll,
      .adc_tran, .dac_strobe, .test_start, .test_end,
      .done(done[g]), .checks(env_checks[g]), .failures(env_fail[g]),
      .n_tran(c_tran[g]), .n_inl(c_inl[g]), .n_dnl(c_dnl[g]), .n_missing(c_miss[g]),
      .n_oi(c_oi[g]), .n_f(c_f[g]), .n_inlu(c_inlu[g]), .n_inll(c_inll[g]),
      .n_dnlu(c_dnlu[g]), .n_dnll(c_dnll[g]));

    initial begin
      c_phi1[g] = 0; c_phi2[g] = 0; seg_seen[g] = '0;
    end
    always @(posedge clk) begin
      phi1_q <= phi1;
      phi2_q <= phi2;
      if (phi1 && !phi1_q) c_phi1[g]++;
      if (phi2 && !phi2_q) c_phi2[g]++;
      if (dac_strobe) seg_seen[g] |= dut.u_ctrl.amp_sel;
    end
  end

  task automatic need(int count, string what, int g);
    checks++;
    if (count <= 0) begin
      failures++;
      $display("FAIL case %0d: %s never happened", g + 1, what);
    end
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    for (int g = 0; g < NC; g++) begin
      checks   += env_checks[g];
      failures += env_fail[g];
      need(c_tran[g], "A/D transition", g);
      need(c_inl[g],  "OUTA_INL", g);
      need(c_dnl[g],  "OUTA_DNL", g);
      need(c_miss[g], "missing code", g);
      need(c_oi[g],   "OUTA_OI", g);
      need(c_f[g],    "OUTA_F", g);
      need(c_inlu[g], "OUTD_INLU", g);
      need(c_inll[g], "OUTD_INLL", g);
      need(c_dnlu[g], "OUTD_DNLU", g);
      need(c_dnll[g], "OUTD_DNLL", g);
      need(c_phi1[g], "phi1", g);
      need(c_phi2[g], "phi2", g);
      need(($countones(seg_seen[g]) == CSEG[g]) ? 1 : 0, "use of every amplifier segment", g);
      $display("case %0d: transitions %0d, OUTA_INL %0d, OUTA_DNL %0d, missing %0d, OUTA_OI %0d, OUTA_F %0d, OUTD_INLU %0d, OUTD_INLL %0d, OUTD_DNLU %0d, OUTD_DNLL %0d, segments %b",
               g + 1, c_tran[g], c_inl[g], c_dnl[g], c_miss[g], c_oi[g], c_f[g],
               c_inlu[g], c_inll[g], c_dnlu[g], c_dnll[g], seg_seen[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: two runs of the longest case take about 66,000 clocks
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
