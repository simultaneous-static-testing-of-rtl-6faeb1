// tb_dnl_hold_caps: the cross-switching sequence of the DNL test. For each
// D/A code the first half closes phi2 and the second half phi1. The
// capacitor voltages must follow the operation table: during the first half
// C1 still holds the previous output while C2 takes the present one; after
// the second half C1 holds the present output. A second instance with a
// feedthrough error must be off by that error once a switch has opened.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_dnl_hold_caps;
  logic clk = 1'b0, rst_n = 1'b0, phi1 = 1'b0, phi2 = 1'b0;
  real  vin, vc1, vc2, vc1e, vc2e;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  dnl_hold_caps dut (.*);
  dnl_hold_caps #(.FT_ERR_V(0.002)) dut_ft (.clk, .rst_n, .phi1, .phi2, .vin, .vc1(vc1e), .vc2(vc2e));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  initial begin
    real v [8];
    vin = 0.0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) v[i] = -0.5 + 0.01 * i + real'($urandom_range(0, 100)) / 100000.0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      vin = v[i];
      phi2 = 1'b1; phi1 = 1'b0;                       // first half
      repeat (3) @(negedge clk);
      check(near(vc2, v[i]), $sformatf("code %0d: C2 holds the present output", i));
      if (i > 0) begin
        check(near(vc1, v[i-1]), $sformatf("code %0d: C1 still holds the previous output", i));
        check(near(vc1e, v[i-1] + 0.002), $sformatf("code %0d: feedthrough on C1", i));
      end
      phi2 = 1'b0; phi1 = 1'b1;                       // second half
      @(negedge clk);
      check(near(vc2, v[i]), $sformatf("code %0d: C2 keeps its voltage", i));
      check(near(vc2e, v[i] + 0.002), $sformatf("code %0d: feedthrough on C2", i));
      vin = 0.9;                                       // C2 is open: must not follow
      repeat (2) @(negedge clk);
      check(near(vc2, v[i]), $sformatf("code %0d: open C2 ignores the input", i));
      check(near(vc1, 0.9), $sformatf("code %0d: closed C1 follows the input", i));
      vin = v[i];
      @(negedge clk);
      check(near(vc1, v[i]), $sformatf("code %0d: C1 holds the present output", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
