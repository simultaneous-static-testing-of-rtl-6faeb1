// adc_inl_detector: offset, final-value and INL checks of the A/D converter.
//
// Three flip-flops give the three outputs:
//   outa_oi  (D-FF1) offset and initial value. The flag is set when the test
//            is initialised and cleared by the first sample at which the
//            code is all zeros, provided the reference bits {R2,R1} are
//            still 01, i.e. within the first 1/2 LSB of the ramp. A later
//            return to code 0 sets it again. A converter whose output is
//            not zero in time (offset beyond 1/2 LSB) or never zero keeps
//            the flag high.
//   outa_f   (D-FF2) final value. At the end of the A/D test window it takes
//            the NAND of the code bits D[N-1:2]; the two low bits are
//            already covered by the INL comparison.
//   outa_inl (D-FF3) INL. At every transition it takes
//            (TD1 xor R2) or (TD0 xor R1), where {TD1,TD0} are the low bits
//            of the transition count after this transition (the reached
//            code plus one) and {R2,R1} the
//            reference bits. The reference advances every 1/2 LSB starting
//            from 011, so the transition to code k must arrive while the
//            count is 2k+2 or 2k+3, that is within k -/+ 1/2 LSB of ramp
//            travel.
// The reference is the shared counter minus 2*A_OFF: the adjustment that
// lets one counter serve an A/D converter whose range starts A_OFF LSB above
// the ramp start.
//
// Timing: all three registers change on a clock edge where sample_tick (for
// oi and inl) or adc_end (for f) is high; the outputs are held in between.
// The structure and gate functions follow the described detector; the
// set-at-init form of D-FF1 is this design's way of catching a converter
// that never outputs zero.
module adc_inl_detector #(
  parameter int unsigned N     = 8,
  parameter int unsigned CNT_W = 11,
  parameter int unsigned A_OFF = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             sample_tick,
  input  logic             active,
  input  logic             adc_end,
  input  logic [N-1:0]     adc_code,
  input  logic             tran_pulse,
  input  logic [N-1:0]     td_next,
  input  logic [CNT_W-1:0] cnt,
  output logic             outa_oi,
  output logic             outa_f,
  output logic             outa_inl
);

  logic [CNT_W-1:0] r;
  logic             zero, zero_q, win01;

  assign r     = cnt - CNT_W'(2 * A_OFF);
  assign zero  = (adc_code == '0);
  assign win01 = (r[2:1] == 2'b01);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outa_oi  <= 1'b0;
      outa_f   <= 1'b0;
      outa_inl <= 1'b0;
      zero_q   <= 1'b0;
    end else if (init) begin
      outa_oi  <= 1'b1;
      outa_f   <= 1'b0;
      outa_inl <= 1'b0;
      zero_q   <= 1'b0;
    end else begin
      if (sample_tick && active) begin
        zero_q <= zero;
        if (zero && !zero_q) outa_oi <= ~(win01 & zero);
        if (tran_pulse) outa_inl <= (td_next[1] ^ r[2]) | (td_next[0] ^ r[1]);
      end
      if (adc_end) outa_f <= ~(&adc_code[N-1:2]);
    end
  end

endmodule
