// tb_autozero_comparator: a comparator with a 40 mV input offset. Before
// auto-zeroing, inputs closer than the offset are decided wrongly; after an
// auto-zero phase (phi21) the compare phase (phi22) decides them correctly.
// With a residual of 10 mV only differences beyond 10 mV are decided
// correctly. Outside the compare phase the output is low.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_autozero_comparator;
  logic clk = 1'b0, rst_n = 1'b0, phi21 = 1'b0, phi22 = 1'b0;
  real  vin_p, vin_n;
  logic out, out_r;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  autozero_comparator #(.OFFSET_V(0.04)) dut (.*);
  autozero_comparator #(.OFFSET_V(0.04), .AZ_RESIDUAL_V(0.01)) dut_r (
    .clk, .rst_n, .phi21, .phi22, .vin_p, .vin_n, .out(out_r));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    vin_p = 0.0; vin_n = 0.0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    @(negedge clk);
    phi22 = 1'b1;
    vin_n = 0.5; vin_p = 0.48;           // -20 mV, offset +40 mV
    #1 check(out == 1'b1, "offset flips the decision before auto-zero");
    phi22 = 1'b0;
    #1 check(out == 1'b0, "low outside the compare phase");
    phi21 = 1'b1;
    repeat (2) @(negedge clk);
    phi21 = 1'b0; phi22 = 1'b1;
    for (int i = 0; i < 200; i++) begin
      automatic real d = (real'($urandom_range(0, 200)) - 100.0) / 1000.0;   // -0.1 .. 0.1 V
      if (d > -0.001 && d < 0.001) d = 0.002;
      vin_n = real'($urandom_range(0, 1000)) / 1000.0;
      vin_p = vin_n + d;
      #1;
      check(out == (d > 0.0), $sformatf("difference %f decided %b", d, out));
      if (d > 0.0105 || d < -0.0105)
        check(out_r == (d > 0.0), $sformatf("residual: difference %f decided %b", d, out_r));
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
