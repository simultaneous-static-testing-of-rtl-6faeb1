// transition_detector: finds the code transitions of the A/D converter.
//
// On every sample tick inside the A/D test window the present output code
// is compared with the code of the previous sample; a difference is a
// transition and raises tran_pulse (the "tran" signal) for that clock. The n-bit count td holds the
// number of transitions seen so far plus one: it is loaded with 1 so that
// its two low bits {TD1, TD0} line up with the reference bits {R2, R1} of
// the shared counter, which also start at 01. Because td then equals the
// code the converter must move to on its next transition, a transition to
// any other code (a skipped or missing code, or a step backwards) is
// reported on missing together with tran_pulse.
//
// The first sample of the window only loads the previous-code register, so
// a converter that does not start at code 0 shows up as an offset error,
// not as a transition.
//
// Timing: tran_pulse, missing and td_next are combinational and valid in the
// sample_tick clock; td advances on that clock's edge. init (one clock,
// before the window opens) clears the state.
//
// The code comparison and the n-bit count follow the described detector;
// resynchronising the count to code + 1 after a skip and the separate missing
// output are this design's choices.
module transition_detector #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         sample_tick,
  input  logic         active,
  input  logic [N-1:0] adc_code,
  output logic         tran_pulse,
  output logic         missing,
  output logic [N-1:0] td,        // code expected at the next transition
  output logic [N-1:0] td_next    // value of td after this transition
);

  logic [N-1:0] prev_code;
  logic         primed;

  assign tran_pulse    = sample_tick && active && primed && (adc_code != prev_code);
  assign missing = tran_pulse && (adc_code != td);
  assign td_next = adc_code + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_code <= '0;
      primed    <= 1'b0;
      td        <= N'(1);
    end else if (init) begin
      prev_code <= '0;
      primed    <= 1'b0;
      td        <= N'(1);
    end else if (sample_tick && active) begin
      prev_code <= adc_code;
      primed    <= 1'b1;
      if (tran_pulse) td <= td_next;
    end
  end

endmodule
