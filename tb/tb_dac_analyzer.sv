// tb_dac_analyzer: the analog analyzer of the D/A converter test, driven
// with the phase sequence of the controller for 64 codes of a D/A output
// V(i) = -1 V + (i + e(i)) LSB and a ramp at V_ideal(i+1) = -1 V + (i+1) LSB
// at the sampling instant. The injected errors e(i) are small (within
// +/-0.15 LSB) except for a few codes at +/-0.8 LSB and a +0.65 LSB step.
// The four outputs must equal the +/-1/2 LSB rules on INL(i) = e(i) and
// DNL(i) = e(i) - e(i-1), for i > 0 on DNL. Auto-zeroing runs first.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_dac_analyzer;
  localparam real LSB = 2.0 / 256.0;
  localparam int  NC  = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic phi1 = 1'b0, phi2 = 1'b0, sh_sample = 1'b0, phi21 = 1'b0, phi22 = 1'b0;
  logic [3:0] amp_sel = 4'b0001;
  real  vdac, vramp;
  logic outd_inlu, outd_inll, outd_dnlu, outd_dnll;
  int   checks = 0, failures = 0;
  int   n_u = 0, n_l = 0, n_du = 0, n_dl = 0;
  always #5 clk = ~clk;

  dac_analyzer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real e [NC];
    for (int i = 0; i < NC; i++) e[i] = (real'($urandom_range(0, 30)) - 15.0) / 100.0;
    e[10] = 0.8;  e[30] = -0.8;  e[45] = 0.45; e[44] = -0.2; e[46] = 0.3;
    vdac = -1.0; vramp = -1.0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    @(negedge clk);
    phi21 = 1'b1;
    repeat (4) @(negedge clk);
    phi21 = 1'b0; phi22 = 1'b1;
    for (int i = 0; i < NC; i++) begin
      vdac    = -1.0 + (real'(i) + e[i]) * LSB;
      amp_sel = 4'b0001 << ((i + 96) / 64);           // codes placed from -0.25 V
      vdac    = vdac + 96.0 * LSB;
      phi2 = 1'b1; phi1 = 1'b0;
      vramp = -1.0 + (real'(i) + 96.0 + 0.6) * LSB;   // ramp still below the sampling point
      repeat (3) @(negedge clk);
      phi2 = 1'b0; phi1 = 1'b1; sh_sample = 1'b1;
      vramp = -1.0 + (real'(i) + 96.0 + 1.0) * LSB;   // V_ideal(i+1)
      @(negedge clk);
      sh_sample = 1'b0;
      vramp = -1.0 + (real'(i) + 96.0 + 1.2) * LSB;   // ramp moves on; result must hold
      check(outd_inlu == (e[i] < -0.5), $sformatf("code %0d INLU", i));
      check(outd_inll == (e[i] > 0.5), $sformatf("code %0d INLL", i));
      n_u += int'(outd_inlu); n_l += int'(outd_inll);
      if (i > 0) begin
        check(outd_dnlu == (e[i] - e[i-1] > 0.5), $sformatf("code %0d DNLU", i));
        check(outd_dnll == (e[i] - e[i-1] < -0.5), $sformatf("code %0d DNLL", i));
        n_du += int'(outd_dnlu); n_dl += int'(outd_dnll);
      end
      repeat (2) @(negedge clk);
    end
    check(n_u == 1 && n_l == 1 && n_du == 3 && n_dl == 2,
          $sformatf("flag counts %0d %0d %0d %0d", n_u, n_l, n_du, n_dl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
