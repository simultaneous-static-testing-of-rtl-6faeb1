// adc_dnl_detector: DNL and missing-code check of the A/D converter.
//
// A counter measures, in sample ticks, the time between two consecutive
// transitions. With SPL samples per LSB of ramp travel, a code width w
// passes when 1/2 LSB < w < 3/2 LSB, i.e. SPL/2 < count < 3*SPL/2. At each
// transition outa_dnl takes the result, or 1 when the transition detector
// reports a skipped code. The distance from the start of the window to the
// first transition is not a code width and is not judged (only a skipped
// code is reported there). The counter saturates at 3*SPL/2.
//
// Timing: outa_dnl changes on the edge of a sample_tick clock in which tran_pulse
// is high and holds until the next transition. init clears the state.
// The measurement follows the described method; counting in sample ticks
// and the saturating counter are this design's choices.
module adc_dnl_detector #(
  parameter int unsigned SPL = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic sample_tick,
  input  logic active,
  input  logic tran_pulse,
  input  logic missing,
  output logic outa_dnl
);

  localparam int unsigned LIM = 3 * SPL / 2;
  localparam int unsigned DW  = $clog2(LIM + 1);

  logic [DW-1:0] gap_cnt;
  logic          seen_first;
  logic          width_bad;

  assign width_bad = (gap_cnt <= DW'(SPL / 2)) || (gap_cnt >= DW'(LIM));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap_cnt       <= '0;
      seen_first <= 1'b0;
      outa_dnl   <= 1'b0;
    end else if (init) begin
      gap_cnt       <= '0;
      seen_first <= 1'b0;
      outa_dnl   <= 1'b0;
    end else if (sample_tick && active) begin
      if (tran_pulse) begin
        outa_dnl   <= missing || (seen_first && width_bad);
        seen_first <= 1'b1;
        gap_cnt       <= DW'(1);
      end else if (gap_cnt != DW'(LIM)) begin
        gap_cnt <= gap_cnt + 1'b1;
      end
    end
  end

endmodule
