// tb_sample_hold: the output takes the input on a clock with sample high
// and holds it while the input moves; an instance with a residual
// feedthrough error adds that error to every held value.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_sample_hold;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  real  vin, vout, vout_e;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  sample_hold dut (.*);
  sample_hold #(.HOLD_ERR_V(-0.0005)) dut_e (.clk, .rst_n, .sample, .vin, .vout(vout_e));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  initial begin
    real held;
    vin = 0.3;
    @(posedge clk); #1;
    check(near(vout, 0.0), "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      vin = real'($urandom_range(0, 3000)) / 1000.0 - 1.5;
      held = vin;
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      check(near(vout, held), $sformatf("sampled %f got %f", held, vout));
      check(near(vout_e, held - 0.0005), "sampled with feedthrough error");
      for (int k = 0; k < 3; k++) begin
        vin = real'($urandom_range(0, 3000)) / 1000.0 - 1.5;
        @(negedge clk);
        check(near(vout, held), "holds while the input moves");
      end
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
