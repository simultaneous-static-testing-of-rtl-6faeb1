// tb_divided_amplifier: each of the four sub-amplifiers, selected one at a
// time, must give K*(1+gain error)*(in+ - in-) + offset with its own error
// values; no selection gives 0 V. An ideal instance must give exactly K
// times the difference (1 V for a 1 LSB difference with K = 128).
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_divided_amplifier;
  localparam real GE [4] = '{0.01, -0.02, 0.03, -0.04};
  localparam real OF [4] = '{0.001, 0.002, -0.003, 0.0};
  real vin_p, vin_n, vout, vout_ideal;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  divided_amplifier #(.K(128.0), .GAIN_ERR(GE), .OFFSET_V(OF)) dut (.*);
  divided_amplifier #(.K(128.0)) dut_ideal (.vin_p, .vin_n, .sel, .vout(vout_ideal));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  initial begin
    for (int i = 0; i < 200; i++) begin
      automatic int j = $urandom_range(0, 3);
      vin_n = -1.0 + real'($urandom_range(0, 2000)) / 1000.0;
      vin_p = vin_n + (real'($urandom_range(0, 400)) - 200.0) / 10000.0;
      sel   = 4'b0001 << j;
      #1;
      check(near(vout, 128.0 * (1.0 + GE[j]) * (vin_p - vin_n) + OF[j]),
            $sformatf("segment %0d: %f", j, vout));
      check(near(vout_ideal, 128.0 * (vin_p - vin_n)), "ideal gain");
    end
    vin_n = 0.25; vin_p = 0.25 + 2.0 / 256.0; sel = 4'b0100;
    #1;
    check(near(vout_ideal, 1.0), "1 LSB gives 1 V");
    sel = 4'b0000;
    #1;
    check(near(vout, 0.0), "no segment selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
