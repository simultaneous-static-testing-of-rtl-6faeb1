// tb_adda_bist_full: the BIST at its default configuration (8-bit A/D and
// 8-bit D/A converter, both over -1 V .. 1 V, 8 samples per LSB, 16 clocks
// per sample), driven through normal mode and two complete test runs by
// bist_env, which checks every transition, every D/A code, the final flags
// and the run length (32,912 clocks per run). Every error flag must have
// been raised at least once.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_adda_bist_full;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       test_mode, start, adc_sample, done;
  logic [7:0] dac_normal_in, dac_in, adc_code;
  real        adc_normal_vin, dac_vout, adc_vin;
  logic outa_oi, outa_f, outa_inl, outa_dnl, outd_inlu, outd_inll, outd_dnlu, outd_dnll;
  logic adc_tran, dac_strobe, phi1, phi2, busy, test_start, test_end;
  int   checks, failures, env_checks, env_fail;
  int   n_tran, n_inl, n_dnl, n_missing, n_oi, n_f, n_inlu, n_inll, n_dnlu, n_dnll;

  adda_bist_top dut (
    .clk, .rst_n, .test_mode, .start, .dac_normal_in, .adc_normal_vin,
    .dac_in, .dac_vout, .adc_vin, .adc_sample, .adc_code,
    .outa_oi, .outa_f, .outa_inl, .outa_dnl,
    .outd_inlu, .outd_inll, .outd_dnlu, .outd_dnll,
    .adc_tran, .dac_strobe, .phi1, .phi2, .busy, .test_start, .test_end);

  bist_env #(.SEED(5)) env (
    .clk, .rst_n, .test_mode, .start, .dac_normal_in, .adc_normal_vin,
    .dac_in, .dac_vout, .adc_vin, .adc_sample, .adc_code,
    .outa_oi, .outa_f, .outa_inl, .outa_dnl,
    .outd_inlu, .outd_inll, .outd_dnlu, .outd_dnll,
    .adc_tran, .dac_strobe, .test_start, .test_end,
    .done, .checks(env_checks), .failures(env_fail),
    .n_tran, .n_inl, .n_dnl, .n_missing, .n_oi, .n_f,
    .n_inlu, .n_inll, .n_dnlu, .n_dnll);

  task automatic need(int count, string what);
    checks++;
    if (count <= 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    checks   += env_checks;
    failures += env_fail;
    need(n_tran, "A/D transition");
    need(n_inl, "OUTA_INL");
    need(n_dnl, "OUTA_DNL");
    need(n_missing, "missing code");
    need(n_oi, "OUTA_OI");
    need(n_f, "OUTA_F");
    need(n_inlu, "OUTD_INLU");
    need(n_inll, "OUTD_INLL");
    need(n_dnlu, "OUTD_DNLU");
    need(n_dnll, "OUTD_DNLL");
    $display("transitions %0d, OUTA_INL %0d, OUTA_DNL %0d, OUTA_OI %0d, OUTA_F %0d, OUTD_INLU %0d, OUTD_INLL %0d, OUTD_DNLU %0d, OUTD_DNLL %0d",
             n_tran, n_inl, n_dnl, n_oi, n_f, n_inlu, n_inll, n_dnlu, n_dnll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
