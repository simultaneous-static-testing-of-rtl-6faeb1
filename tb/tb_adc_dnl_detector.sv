// tb_adc_dnl_detector: transitions at chosen distances (in samples, 4
// samples per LSB) with and without missing-code reports. A distance d
// passes only when 2 < d < 6; the first transition after init is not judged
// on distance; long gaps saturate the counter and fail. A random sweep of
// widths and skipped codes follows the directed cases.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_adc_dnl_detector;
  localparam int SPL = 4;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, sample_tick = 1'b0, active = 1'b0;
  logic tran_pulse = 1'b0, missing = 1'b0, outa_dnl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_dnl_detector #(.SPL(SPL)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // gap samples without transition (some without tick), then one transition
  task automatic gap_then_tran(int gap, bit miss, bit expect_flag, string what);
    for (int i = 0; i < gap - 1; i++) begin
      sample_tick = 1'b1; active = 1'b1;
      @(negedge clk);
      sample_tick = 1'b0;                 // idle clock between samples
      @(negedge clk);
    end
    sample_tick = 1'b1; active = 1'b1; tran_pulse = 1'b1; missing = miss;
    @(negedge clk);
    sample_tick = 1'b0; tran_pulse = 1'b0; missing = 1'b0;
    check(outa_dnl == expect_flag, $sformatf("%s (gap %0d)", what, gap));
    @(negedge clk);
  endtask

  initial begin
    @(posedge clk); #1;
    check(outa_dnl == 1'b0, "reset");
    rst_n = 1'b1;
    @(negedge clk); init = 1'b1; @(negedge clk); init = 1'b0;
    gap_then_tran(1, 1'b0, 1'b0, "first transition not judged");
    gap_then_tran(4, 1'b0, 1'b0, "1 LSB code");
    gap_then_tran(3, 1'b0, 1'b0, "3/4 LSB code");
    gap_then_tran(2, 1'b0, 1'b1, "1/2 LSB code");
    gap_then_tran(5, 1'b0, 1'b0, "5/4 LSB code");
    gap_then_tran(6, 1'b0, 1'b1, "3/2 LSB code");
    gap_then_tran(1, 1'b0, 1'b1, "1/4 LSB code");
    gap_then_tran(20, 1'b0, 1'b1, "very wide code");
    gap_then_tran(4, 1'b1, 1'b1, "missing code");
    gap_then_tran(4, 1'b0, 1'b0, "after missing code");
    // samples outside the window are not counted
    for (int i = 0; i < 10; i++) begin
      sample_tick = 1'b1; active = 1'b0; @(negedge clk);
    end
    sample_tick = 1'b0;
    gap_then_tran(4, 1'b0, 1'b0, "window closed in between");
    @(negedge clk); init = 1'b1; @(negedge clk); init = 1'b0;
    check(outa_dnl == 1'b0, "init clears");
    gap_then_tran(1, 1'b1, 1'b1, "first transition to a wrong code");
    gap_then_tran(2, 1'b0, 1'b1, "1/2 LSB after init");
    // random code widths 1..10 samples, sometimes with a skipped code
    for (int i = 0; i < 300; i++) begin
      automatic int g = $urandom_range(1, 10);
      automatic bit m = ($urandom_range(0, 7) == 0);
      gap_then_tran(g, m, m || !(g > SPL / 2 && g < 3 * SPL / 2), "random width");
    end
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
