// tb_test_controller: sequencing of one run in a small configuration
// (3-bit A/D converter, 2-bit D/A converter whose range starts 62 LSB above
// the ramp start so that its four codes straddle two amplifier segments,
// 4 samples per LSB, 3 clocks per sample, 4 auto-zero clocks).
// Every clock of the run is compared with values worked out here from the
// clock number: auto-zero phase, sample ticks, half-LSB ticks, A/D window
// and end, D/A code, DIN_a, phi1/phi2, S/H sampling and strobe, segment
// selects and the end of the run; a second start must restart the run.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_test_controller;
  import bist_pkg::*;

  localparam int N = 3, M = 2, AL = 0, DL = 62, SPL = 4, CPS = 3, AZ = 4;
  localparam int HALF  = SPL / 2;
  localparam int CW    = cnt_width(N, M, AL, DL);
  localparam int A_END = 1 << (N + 1);              // A/D window, half LSBs
  localparam int D_END = 2 * DL + 1 + (1 << (M + 1));
  localparam int END_H = (A_END > D_END) ? A_END : D_END;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CW-1:0] cnt;
  logic cnt_load, cnt_inc, ramp_load, ramp_step, sample_tick, busy, test_start, test_end;
  logic phi21, phi22, adc_init, adc_active, adc_end, dac_active, din_a, phi1, phi2;
  logic sh_sample, dac_strobe, sh_q;
  logic [M-1:0] dac_code;
  logic [3:0] amp_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_controller #(.N(N), .M(M), .ADC_LOW_LSB(AL), .DAC_LOW_LSB(DL), .SPL(SPL),
                    .CLK_PER_SAMPLE(CPS), .AZ_CLKS(AZ), .CNT_W(CW)) dut (.*);

  // the shared counter, modelled here
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= CW'(3);
    else if (cnt_load) cnt <= CW'(3);
    else if (cnt_inc) cnt <= cnt + 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_run(int run);
    int rc, s, h, x2, seg;
    bit e_tick, e_inc, e_aact, e_dact, e_dina, e_sh, e_end;
    int e_code;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int i = 0; i < AZ; i++) begin
      check(phi21 && !phi22 && busy, $sformatf("run %0d auto-zero clock %0d", run, i));
      check(test_start == (i == AZ - 1), $sformatf("run %0d test_start at auto-zero clock %0d", run, i));
      check(!sample_tick, "no sample tick during auto-zero");
      @(negedge clk);
    end
    sh_q = 1'b0;
    for (rc = 0; rc < END_H * HALF * CPS; rc++) begin
      s      = rc / CPS;
      h      = s / HALF;
      e_tick = (rc % CPS) == CPS - 1;
      e_inc  = e_tick && ((s + 1) % HALF == 0);
      e_end  = e_inc && ((s + 1) / HALF == END_H);
      e_aact = h < A_END;
      x2     = h - 2 * DL;                     // half LSBs above the D/A range bottom
      e_dact = (x2 >= 1) && (x2 < (1 << (M + 1)) + 1);
      e_code = e_dact ? (x2 - 1) / 2 : 0;
      e_dina = e_dact && ((x2 - 1) % 2 == 1);
      e_sh   = e_dina && (rc % (HALF * CPS) == 0);
      seg    = (e_code + DL) / 64;
      check(phi22 && !phi21 && busy, $sformatf("run clock %0d phases", rc));
      check(sample_tick == e_tick && ramp_step == e_tick, $sformatf("run clock %0d sample tick", rc));
      check(cnt_inc == e_inc, $sformatf("run clock %0d half tick", rc));
      check(adc_active == e_aact, $sformatf("run clock %0d A/D window", rc));
      check(adc_end == (e_inc && h + 1 == A_END), $sformatf("run clock %0d A/D end", rc));
      check(dac_active == e_dact && int'(dac_code) == e_code && din_a == e_dina,
            $sformatf("run clock %0d D/A code %0d/%0b expected %0d/%0b", rc, dac_code, din_a, e_code, e_dina));
      check(phi1 == e_dina && phi2 == (e_dact && !e_dina), $sformatf("run clock %0d phi1/phi2", rc));
      check(sh_sample == e_sh, $sformatf("run clock %0d S/H sample", rc));
      check(dac_strobe == sh_q, $sformatf("run clock %0d strobe", rc));
      check(amp_sel == (4'b0001 << seg), $sformatf("run clock %0d amplifier select", rc));
      check(test_end == e_end, $sformatf("run clock %0d test end", rc));
      sh_q = e_sh;
      @(negedge clk);
    end
    check(!busy && phi22 && !test_end && !sample_tick, $sformatf("run %0d done state", run));
  endtask

  initial begin
    @(posedge clk); #1;
    check(!busy && !phi21 && !phi22, "idle after reset");
    @(negedge clk); rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!busy && !sample_tick, "idle without start");
    one_run(0);
    repeat (5) @(negedge clk);
    one_run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
