// tb_transition_detector: random A/D code streams (mostly +1 steps, with
// holds, skipped codes and steps back) sampled at random ticks, with the
// test window opened and closed and the state re-initialised. tran_pulse,
// missing, td and td_next are compared every clock with a reference that
// remembers the previous in-window code and the code expected next.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_transition_detector;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, sample_tick = 1'b0, active = 1'b0;
  logic [N-1:0] adc_code = '0, td, td_next;
  logic tran_pulse, missing;
  int checks = 0, failures = 0;
  int n_tran = 0, n_miss = 0;

  always #5 clk = ~clk;

  transition_detector #(.N(N)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int  prev, expect_next, code;
    bit  primed, e_tran, e_miss;
    @(posedge clk); #1;
    check(td == N'(1), "td after reset");
    rst_n = 1'b1;
    for (int block = 0; block < 6; block++) begin
      @(negedge clk);
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      primed = 1'b0; prev = 0; expect_next = 1; code = 0;
      check(td == N'(1), "td after init");
      for (int i = 0; i < 200; i++) begin
        sample_tick = ($urandom_range(0, 2) == 0);
        active      = (i < 180);
        if (sample_tick) begin
          case ($urandom_range(0, 9))
            0, 1, 2, 3: code = code;
            4:          code = code + 2;
            5:          code = code - 1;
            default:    code = code + 1;
          endcase
          code = code & ((1 << N) - 1);
        end
        adc_code = N'(code);
        #1;
        e_tran = sample_tick && active && primed && (code != prev);
        e_miss = e_tran && (code != expect_next);
        check(tran_pulse == e_tran, $sformatf("block %0d sample %0d tran", block, i));
        check(missing == e_miss, $sformatf("block %0d sample %0d missing", block, i));
        check(int'(td_next) == ((code + 1) & ((1 << N) - 1)), "td_next");
        check(int'(td) == expect_next, $sformatf("block %0d sample %0d td %0d expected %0d", block, i, td, expect_next));
        n_tran += int'(e_tran);
        n_miss += int'(e_miss);
        if (sample_tick && active) begin
          if (e_tran) expect_next = (code + 1) & ((1 << N) - 1);
          prev   = code;
          primed = 1'b1;
        end
        @(negedge clk);
      end
    end
    check(n_tran > 50 && n_miss > 10, "transitions and missing codes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
