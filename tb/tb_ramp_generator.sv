// tb_ramp_generator: after load the ramp is V_START and rises by exactly
// STEP_V per ramp_step clock; clocks without ramp_step leave it unchanged;
// a second load restarts it. A second instance with a 1 % slope error must
// be off by 1 % of the travelled voltage.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_ramp_generator;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, ramp_step = 1'b0;
  real  vramp, vramp_err;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  ramp_generator #(.V_START(-0.5), .STEP_V(0.001)) dut (.*);
  ramp_generator #(.V_START(-0.5), .STEP_V(0.001), .SLOPE_ERR(0.01)) dut_err (
    .clk, .rst_n, .load, .ramp_step, .vramp(vramp_err));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  initial begin
    int n;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); load = 1'b1; @(negedge clk); load = 1'b0;
      check(near(vramp, -0.5), "start level");
      n = 0;
      for (int i = 0; i < 300; i++) begin
        ramp_step = ($urandom_range(0, 1) == 1);
        @(negedge clk);
        if (ramp_step) n++;
        check(near(vramp, -0.5 + 0.001 * n), $sformatf("level after %0d steps: %f", n, vramp));
        check(near(vramp_err, -0.5 + 0.00101 * n), "level with slope error");
      end
      ramp_step = 1'b0;
      check(n > 100, "ramp moved");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
