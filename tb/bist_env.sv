// bist_env: converter models, stimulus and checker for adda_bist_top.
//
// The environment plays the two converters under test and the test
// operator. It holds
//   * an A/D converter model: output code = number of transition levels
//     T(k), k = 1 .. 2^N-1, at or below the input; T(k) = k + eA(k) LSB above
//     the converter's full-scale bottom;
//   * a D/A converter model: V(i) = bottom + (i + eD(i)) LSB.
// It first checks normal mode (inputs pass straight to the converters), then
// runs two complete BIST runs with different injected errors:
//   run 0: small random errors everywhere plus a few large INL errors, a
//          narrow code (DNL) and a missing code in the A/D converter, and
//          large positive and negative steps in the D/A converter;
//   run 1: an A/D converter with -1.3 LSB offset and its top five codes
//          never reached (offset and final-value errors), and a D/A
//          converter with +0.7 LSB offset on every code.
// For every run the expected flags are worked out from the error tables
// alone, by sampling the ideal ramp at SPL points per LSB and applying the
// +/-1/2 LSB limits; they are then compared with the BIST outputs at every
// transition, at every D/A code and at the end of the run. The run length
// in clocks and the ramp level at every D/A result are checked too. Counts
// of how often each kind of error was flagged are brought out so that the
// enclosing testbench can require each to have happened.
//
// The converter models and error patterns are this bench's own; the expected
// flags apply the described +/- 1/2 LSB limits.
module bist_env #(
  parameter int unsigned N              = 8,
  parameter int unsigned M              = 8,
  parameter int unsigned ADC_LOW_LSB    = 0,
  parameter int unsigned DAC_LOW_LSB    = 0,
  parameter int unsigned SPL            = 8,
  parameter int unsigned CLK_PER_SAMPLE = 16,
  parameter int unsigned AZ_CLKS        = 16,
  parameter int unsigned SEED           = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         test_mode,
  output logic         start,
  output logic [M-1:0] dac_normal_in,
  output real          adc_normal_vin,
  input  logic [M-1:0] dac_in,
  output real          dac_vout,
  input  real          adc_vin,
  input  logic         adc_sample,
  output logic [N-1:0] adc_code,
  input  logic         outa_oi,
  input  logic         outa_f,
  input  logic         outa_inl,
  input  logic         outa_dnl,
  input  logic         outd_inlu,
  input  logic         outd_inll,
  input  logic         outd_dnlu,
  input  logic         outd_dnll,
  input  logic         adc_tran,
  input  logic         dac_strobe,
  input  logic         test_start,
  input  logic         test_end,
  output logic         done,
  output int           checks,
  output int           failures,
  output int           n_tran,
  output int           n_inl,
  output int           n_dnl,
  output int           n_missing,
  output int           n_oi,
  output int           n_f,
  output int           n_inlu,
  output int           n_inll,
  output int           n_dnlu,
  output int           n_dnll
);

  localparam real LSB    = 2.0 / 256.0;
  localparam int  NA     = 1 << N;
  localparam int  ND     = 1 << M;
  localparam int  RAMP0  = (ADC_LOW_LSB < DAC_LOW_LSB) ? ADC_LOW_LSB : DAC_LOW_LSB;
  localparam int  A_OFF  = ADC_LOW_LSB - RAMP0;
  localparam int  D_OFF  = DAC_LOW_LSB - RAMP0;

  real ta [NA];        // A/D transition levels, LSB above its bottom (index 1..NA-1)
  real ed [ND];        // D/A output errors, LSB

  // expected A/D events, index = transition number
  int  xj   [NA * 2];  // sample number (from the A/D window start)
  int  xc   [NA * 2];  // code reached
  bit  xinl [NA * 2];
  bit  xdnl [NA * 2];
  int  xn;
  bit  xoi, xf;
  int  xmiss;

  // --------------------------------------------------------------- models
  function automatic int adc_of(real v);
    int c = 0;
    for (int k = 1; k < NA; k++)
      if (v >= -1.0 + (real'(ADC_LOW_LSB) + ta[k]) * LSB) c++;
    return c;
  endfunction

  function automatic int code_at(real t);   // t in LSB above A/D bottom
    int c = 0;
    for (int k = 1; k < NA; k++) if (t >= ta[k]) c++;
    return c;
  endfunction

  always_comb adc_code = N'(adc_of(adc_vin));
  always_comb dac_vout = -1.0 + (real'(DAC_LOW_LSB) + real'(dac_in) + ed[dac_in]) * LSB;

  // ------------------------------------------------------ error tables
  function automatic real small_err();
    return (real'($urandom_range(0, 30)) - 15.0) / 100.0;   // -0.15 .. 0.15
  endfunction

  task automatic set_errors(int run);
    for (int k = 1; k < NA; k++) ta[k] = real'(k) + small_err();
    for (int i = 0; i < ND; i++) ed[i] = small_err();
    if (run == 0) begin
      ta[NA / 8]         = real'(NA / 8) + 0.8;        // late transition: INL
      ta[NA / 4]         = real'(NA / 4) - 0.8;        // early transition: INL, DNL
      ta[NA / 2 + 3]     = real'(NA / 2 + 3) + 0.45;   // narrow code: DNL
      ta[NA / 2 + 4]     = real'(NA / 2 + 4) - 0.45;
      ta[3 * NA / 4]     = real'(3 * NA / 4 + 1) + 0.1; // code 3NA/4 missing
      ta[3 * NA / 4 + 1] = ta[3 * NA / 4];
      ed[ND / 8]         = 0.8;                        // INL low side, DNL up then down
      ed[ND / 2 + 5]     = -0.8;                       // INL high side
      ed[3 * ND / 4]     = 0.4;                        // DNL step +0.6 .. +0.7
      ed[3 * ND / 4 - 1] = -0.25;
      ed[3 * ND / 4 + 1] = 0.3;
    end else begin
      for (int k = 1; k < NA; k++) ta[k] = real'(k) - 1.3 + small_err() / 3.0;
      for (int k = NA - 5; k < NA; k++) ta[k] = real'(k) + 8.0;
      for (int i = 0; i < ND; i++) ed[i] = 0.7 + small_err() / 3.0;
    end
  endtask

  // Expected A/D results from the ideal ramp sampled SPL times per LSB.
  task automatic expect_adc();
    int   prev, last, c;
    real  t, tprev;
    bit   zprev;
    // last: code reached by the previous transition; a run starts from code 0
    xn = 0; xoi = 1'b1; xmiss = 0; zprev = 1'b0; prev = 0; last = 0; tprev = 0.0;
    for (int j = 0; j < NA * SPL; j++) begin
      t = real'(j) / real'(SPL);
      c = code_at(t);
      if (c == 0 && !zprev) xoi = !(t < 0.5);
      zprev = (c == 0);
      if (j > 0 && c != prev) begin
        xj[xn]   = j;
        xc[xn]   = c;
        xinl[xn] = !(t >= real'(c) - 0.5 && t < real'(c) + 0.5);
        xdnl[xn] = (c != last + 1) ||
                   (xn > 0 && !((t - tprev) > 0.5 && (t - tprev) < 1.5));
        if (c != last + 1) xmiss++;
        last  = c;
        tprev = t;
        xn++;
      end
      prev = c;
    end
    t  = real'(NA) - 1.0 / real'(SPL);
    xf = (code_at(t) >> 2) != ((NA >> 2) - 1);
  endtask

  // ------------------------------------------------------------ checking
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [N=%0d M=%0d] %s", N, M, what);
    end
  endtask

  bit running;
  int run_no;
  int sj;            // global sample number since the ramp start
  int tn;            // transitions seen in this run
  int dn;            // D/A results seen in this run
  bit pend_tran;
  int pend_j;

  always @(posedge clk) begin
    if (running) begin
      if (pend_tran) begin
        pend_tran = 1'b0;
        if (tn < xn) begin
          check(pend_j == xj[tn], $sformatf("run %0d transition %0d at sample %0d, expected %0d",
                                            run_no, tn, pend_j, xj[tn]));
          check(outa_inl == xinl[tn], $sformatf("run %0d OUTA_INL at transition to code %0d: %0b",
                                                run_no, xc[tn], outa_inl));
          check(outa_dnl == xdnl[tn], $sformatf("run %0d OUTA_DNL at transition to code %0d: %0b",
                                                run_no, xc[tn], outa_dnl));
        end else begin
          check(1'b0, $sformatf("run %0d unexpected transition %0d", run_no, tn));
        end
        n_inl += int'(outa_inl);
        n_dnl += int'(outa_dnl);
        tn++;
      end
      if (adc_sample) begin
        if (adc_tran) begin
          pend_tran = 1'b1;
          pend_j    = sj - A_OFF * SPL;
          n_tran++;
        end
        sj++;
      end
      if (dac_strobe) begin
        real vr;
        bit  e_inlu, e_inll, e_dnlu, e_dnll;
        vr = -1.0 + real'(DAC_LOW_LSB + dn + 1) * LSB;
        check(int'(dac_in) == dn, $sformatf("run %0d D/A code %0d, expected %0d", run_no, dac_in, dn));
        check(adc_vin > vr - 1e-9 && adc_vin < vr + 1e-9,
              $sformatf("run %0d ramp %f at D/A code %0d, expected %f", run_no, adc_vin, dn, vr));
        e_inlu = ed[dn] < -0.5;
        e_inll = ed[dn] > 0.5;
        check(outd_inlu == e_inlu, $sformatf("run %0d OUTD_INLU code %0d", run_no, dn));
        check(outd_inll == e_inll, $sformatf("run %0d OUTD_INLL code %0d", run_no, dn));
        n_inlu += int'(outd_inlu);
        n_inll += int'(outd_inll);
        if (dn > 0) begin
          e_dnlu = (ed[dn] - ed[dn-1]) > 0.5;
          e_dnll = (ed[dn] - ed[dn-1]) < -0.5;
          check(outd_dnlu == e_dnlu, $sformatf("run %0d OUTD_DNLU code %0d", run_no, dn));
          check(outd_dnll == e_dnll, $sformatf("run %0d OUTD_DNLL code %0d", run_no, dn));
          n_dnlu += int'(outd_dnlu);
          n_dnll += int'(outd_dnll);
        end
        dn++;
      end
    end
  end

  // Expected run length: auto-zero, then the longer of the two tests in
  // half-LSB steps of SPL/2 samples of CLK_PER_SAMPLE clocks.
  function automatic int expected_clocks();
    int a_end = 2 * A_OFF + 2 * NA;
    int d_end = 2 * D_OFF + 2 * ND + 1;
    int e     = (a_end > d_end) ? a_end : d_end;
    return AZ_CLKS + e * (SPL / 2) * CLK_PER_SAMPLE;
  endfunction

  initial begin
    int cyc;
    checks = 0; failures = 0; done = 1'b0; running = 1'b0;
    n_tran = 0; n_inl = 0; n_dnl = 0; n_missing = 0; n_oi = 0; n_f = 0;
    n_inlu = 0; n_inll = 0; n_dnlu = 0; n_dnll = 0;
    pend_tran = 1'b0; sj = 0; tn = 0; dn = 0; run_no = 0;
    void'($urandom(SEED));
    test_mode = 1'b0; start = 1'b0;
    dac_normal_in = '0; adc_normal_vin = 0.0;
    for (int k = 1; k < NA; k++) ta[k] = real'(k);
    for (int i = 0; i < ND; i++) ed[i] = 0.0;
    wait (rst_n);
    repeat (3) @(posedge clk);

    // normal mode: the multiplexers pass the normal inputs
    dac_normal_in  = M'(8'h5a);
    adc_normal_vin = 0.123;
    @(posedge clk);
    check(dac_in == M'(8'h5a), "normal mode D/A input");
    check(adc_vin == 0.123, "normal mode A/D input");
    start = 1'b1;                      // ignored outside test mode
    @(posedge clk);
    start = 1'b0;
    repeat (2) @(posedge clk);
    check(test_start == 1'b0 && dac_in == M'(8'h5a), "start ignored in normal mode");

    for (int run = 0; run < 2; run++) begin
      run_no = run;
      set_errors(run);
      expect_adc();
      n_missing += xmiss;
      test_mode = 1'b1;
      @(posedge clk);
      start = 1'b1;
      @(posedge clk);
      start = 1'b0;
      cyc = 1;
      while (!test_start) begin @(posedge clk); cyc++; end
      check(cyc == AZ_CLKS, $sformatf("auto-zero length %0d", cyc));
      @(posedge clk); cyc++;
      sj = 0; tn = 0; dn = 0; pend_tran = 1'b0;
      running = 1'b1;
      while (!test_end) begin @(posedge clk); cyc++; end
      @(posedge clk);
      @(posedge clk);
      running = 1'b0;
      check(cyc == expected_clocks(), $sformatf("run %0d length %0d clocks, expected %0d",
                                                run, cyc, expected_clocks()));
      check(tn == xn, $sformatf("run %0d transitions %0d, expected %0d", run, tn, xn));
      check(dn == ND, $sformatf("run %0d D/A results %0d, expected %0d", run, dn, ND));
      check(outa_oi == xoi, $sformatf("run %0d OUTA_OI %0b, expected %0b", run, outa_oi, xoi));
      check(outa_f == xf, $sformatf("run %0d OUTA_F %0b, expected %0b", run, outa_f, xf));
      n_oi += int'(outa_oi);
      n_f  += int'(outa_f);
      test_mode = 1'b0;
      repeat (4) @(posedge clk);
    end
    done = 1'b1;
  end

endmodule
