// tb_adc_inl_detector: the three result flip-flops under random stimulus,
// for a converter range starting at the ramp start (A_OFF = 0) and one
// starting 3 LSB later (A_OFF = 3). Every clock the outputs are compared
// with the stated rules:
//   OUTA_OI  set by init, then on each rise of "code is zero" inside the
//            window becomes 0 if {R2,R1} = 01, else 1;
//   OUTA_INL on each transition = ({TD1,TD0} after it) != {R2,R1};
//   OUTA_F   on adc_end = D[N-1:2] not all ones;
// where R = shared counter - 2*A_OFF. A directed sequence then checks the
// intended offset cases: zero inside the first half LSB passes, zero after
// it fails, never zero keeps the flag.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_adc_inl_detector;
  localparam int N = 4, CW = 6;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_off
    localparam int AOFF = 3 * g;
    logic init, sample_tick, active, adc_end, tran_pulse;
    logic [N-1:0] adc_code, td_next;
    logic [CW-1:0] cnt;
    logic outa_oi, outa_f, outa_inl;
    bit e_oi, e_f, e_inl, zq;

    adc_inl_detector #(.N(N), .CNT_W(CW), .A_OFF(AOFF)) dut (.*);

    task automatic drive_random();
      init        = ($urandom_range(0, 40) == 0);
      sample_tick = ($urandom_range(0, 1) == 0);
      active      = ($urandom_range(0, 5) != 0);
      adc_end     = ($urandom_range(0, 10) == 0);
      tran_pulse  = sample_tick && active && ($urandom_range(0, 2) == 0);
      adc_code    = ($urandom_range(0, 2) == 0) ? '0 : N'($urandom);
      td_next     = N'($urandom);
      cnt         = CW'($urandom);
    endtask

    // reference update for the clock edge that ends the current cycle
    task automatic step_ref();
      int r = (int'(cnt) - 2 * AOFF) & ((1 << CW) - 1);
      bit z = (adc_code == 0);
      if (init) begin
        e_oi = 1'b1; e_f = 1'b0; e_inl = 1'b0; zq = 1'b0;
      end else begin
        if (sample_tick && active) begin
          if (z && !zq) e_oi = (((r >> 1) & 3) != 1);
          zq = z;
          if (tran_pulse) e_inl = ((int'(td_next) & 3) != ((r >> 1) & 3));
        end
        if (adc_end) e_f = (int'(adc_code) >> 2) != ((1 << (N - 2)) - 1);
      end
    endtask

    task automatic set_idle();
      init = 0; sample_tick = 0; active = 0; adc_end = 0; tran_pulse = 0;
      adc_code = '0; td_next = '0; cnt = '0;
    endtask
  end

  // directed offset checks on the A_OFF = 0 instance; cnt starts at 3
  task automatic offset_case(int zero_at, bit expect_flag, string what);
    g_off[0].init = 1'b1;
    @(negedge clk);
    g_off[0].init = 1'b0;
    g_off[0].active = 1'b1;
    for (int s = 0; s < 8; s++) begin     // 4 samples per half LSB
      g_off[0].cnt         = 6'(3 + s / 4);
      g_off[0].sample_tick = 1'b1;
      g_off[0].adc_code    = (zero_at >= 0 && s >= zero_at && s < zero_at + 2) ? 4'd0 : 4'd1;
      @(negedge clk);
    end
    g_off[0].sample_tick = 1'b0;
    g_off[0].active = 1'b0;
    check(g_off[0].outa_oi == expect_flag, what);
  endtask

  initial begin
    g_off[0].set_idle(); g_off[1].set_idle();
    @(posedge clk); #1;
    rst_n = 1'b1;
    g_off[0].init = 1'b1; g_off[1].init = 1'b1;
    @(posedge clk);
    g_off[0].step_ref(); g_off[1].step_ref();
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      g_off[0].drive_random(); g_off[1].drive_random();
      @(posedge clk);
      g_off[0].step_ref(); g_off[1].step_ref();
      #1;
      check(g_off[0].outa_oi == g_off[0].e_oi && g_off[0].outa_f == g_off[0].e_f &&
            g_off[0].outa_inl == g_off[0].e_inl, $sformatf("A_OFF=0 clock %0d", i));
      check(g_off[1].outa_oi == g_off[1].e_oi && g_off[1].outa_f == g_off[1].e_f &&
            g_off[1].outa_inl == g_off[1].e_inl, $sformatf("A_OFF=3 clock %0d", i));
      @(negedge clk);
    end
    g_off[0].set_idle();
    @(negedge clk);
    offset_case(0, 1'b0, "zero at the first sample passes");
    offset_case(3, 1'b0, "zero within the first half LSB passes");
    offset_case(5, 1'b1, "zero after the first half LSB fails");
    offset_case(-1, 1'b1, "never zero fails");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
