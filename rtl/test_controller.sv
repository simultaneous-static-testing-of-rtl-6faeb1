// test_controller: sequencer of the combined A/D and D/A converter BIST.
//
// One run, started by a pulse on start, goes through three phases:
//   1. auto-zero (AZ_CLKS clocks): phi21 is high so the comparators of the
//      D/A converter analyzer store their offsets; the ramp and the shared
//      counter are reloaded.
//   2. run: a prescaler gives one sample tick every CLK_PER_SAMPLE clocks
//      (3.2 MHz / 200 kHz = 16 in the evaluated setup). The ramp moves by
//      1/SPL LSB per sample tick and the shared counter advances every SPL/2
//      ticks, i.e. once per half LSB. Both converter tests are timed from
//      that one counter:
//        * the A/D converter test covers the 2^N LSB of its full-scale range,
//          starting A_OFF LSB after the ramp start; adc_end marks its end;
//        * the D/A converter code is (h - 2*D_OFF - 1) / 2, with h the number
//          of half-LSB steps since the ramp start and the dropped bit DIN_a
//          splitting each code into two halves. Code i is therefore applied
//          while the ramp is between i+1/2 and i+3/2 LSB above the D/A
//          converter's full-scale bottom; this is the one-LSB delay that
//          turns the ramp into V_ideal(i+1).
//      During the first half of a code phi2 is closed (C2 follows the
//      present output) and during the second half phi1 is closed (C1 takes
//      it for the next code). At the first clock of the second half the
//      ramp is exactly i+1 LSB, and sh_sample makes both S/H circuits take
//      their amplifier outputs; dac_strobe one clock later marks the
//      comparator outputs of code i as valid.
//   3. done: test_end pulses once, phi22 stays high so results hold.
// The amplifier segment selects phi11..phi14 (amp_sel[0..3]) follow the
// voltage range of the present D/A converter code, 0.5 V per segment.
//
// The phases, the sharing of one counter and ramp, the offsets per case and
// the phi1/phi2 order follow the described method; the prescaler, the
// number of samples per LSB, the auto-zero length and the exact clock at
// which the S/H samples are choices of this design.
//
// rst_n is an asynchronous reset; lint may call it "flopped as both
// synchronous and async" only because the assertions use it in their
// disable condition as well.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned N              = 8,
  parameter int unsigned M              = 8,
  parameter int unsigned ADC_LOW_LSB    = 0,
  parameter int unsigned DAC_LOW_LSB    = 0,
  parameter int unsigned SPL            = 8,
  parameter int unsigned CLK_PER_SAMPLE = 16,
  parameter int unsigned AZ_CLKS        = 16,
  parameter int unsigned CNT_W          = cnt_width(N, M, ADC_LOW_LSB, DAC_LOW_LSB)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] cnt,          // shared counter value
  output logic             cnt_load,
  output logic             cnt_inc,      // half-LSB tick
  output logic             ramp_load,
  output logic             ramp_step,
  output logic             sample_tick,  // converters sample now
  output logic             busy,
  output logic             test_start,   // pulse: ramp starts
  output logic             test_end,     // pulse: run finished
  output logic             phi21,        // comparator auto-zero
  output logic             phi22,        // comparator compare
  output logic             adc_init,     // clear the A/D test state
  output logic             adc_active,   // sample lies in the A/D test window
  output logic             adc_end,      // A/D test ends at this edge
  output logic             dac_active,
  output logic [M-1:0]     dac_code,
  output logic             din_a,
  output logic             phi1,
  output logic             phi2,
  output logic [3:0]       amp_sel,      // phi11..phi14
  output logic             sh_sample,
  output logic             dac_strobe
);

  localparam int unsigned RAMP0     = (ADC_LOW_LSB < DAC_LOW_LSB) ? ADC_LOW_LSB : DAC_LOW_LSB;
  localparam int          A_OFF     = int'(ADC_LOW_LSB - RAMP0);
  localparam int          D_OFF     = int'(DAC_LOW_LSB - RAMP0);
  localparam int          ADC_H_BEG = 2 * A_OFF;
  localparam int          ADC_H_END = 2 * A_OFF + (1 << (N + 1));
  localparam int          DAC_H_END = 2 * D_OFF + 1 + (1 << (M + 1));
  localparam int          END_H     = (ADC_H_END > DAC_H_END) ? ADC_H_END : DAC_H_END;
  localparam int          CNT_INIT  = 3;
  localparam int unsigned HALF      = SPL / 2;
  localparam int unsigned DIV_W     = (CLK_PER_SAMPLE > 1) ? $clog2(CLK_PER_SAMPLE) : 1;
  localparam int unsigned SUB_W     = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int unsigned AZ_W      = (AZ_CLKS > 1) ? $clog2(AZ_CLKS) : 1;

  ctrl_state_e      state;
  logic [DIV_W-1:0] div;
  logic [SUB_W-1:0] sub;
  logic [AZ_W-1:0]  az_cnt;
  logic             az_last;
  logic             half_q;
  int               h, dfull;
  int unsigned      seg;

  assign az_last = (az_cnt == AZ_W'(AZ_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      div    <= '0;
      sub    <= '0;
      az_cnt <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: if (start) begin
          state  <= ST_AUTOZERO;
          az_cnt <= '0;
        end
        ST_AUTOZERO: begin
          az_cnt <= az_cnt + 1'b1;
          if (az_last) begin
            state <= ST_RUN;
            div   <= '0;
            sub   <= '0;
          end
        end
        ST_RUN: begin
          if (sample_tick) begin
            div <= '0;
            sub <= (sub == SUB_W'(HALF - 1)) ? '0 : sub + 1'b1;
          end else begin
            div <= div + 1'b1;
          end
          if (cnt_inc && (h + 1 == END_H)) state <= ST_DONE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    h           = int'(cnt) - CNT_INIT;
    dfull       = h - 2 * D_OFF - 1;
    busy        = (state == ST_AUTOZERO) || (state == ST_RUN);
    cnt_load    = ((state == ST_IDLE) || (state == ST_DONE)) && start;
    ramp_load   = cnt_load;
    adc_init    = cnt_load;
    sample_tick = (state == ST_RUN) && (div == DIV_W'(CLK_PER_SAMPLE - 1));
    cnt_inc     = sample_tick && (sub == SUB_W'(HALF - 1));
    ramp_step   = sample_tick;
    test_start  = (state == ST_AUTOZERO) && az_last;
    test_end    = (state == ST_RUN) && cnt_inc && (h + 1 == END_H);
    phi21       = (state == ST_AUTOZERO);
    phi22       = (state == ST_RUN) || (state == ST_DONE);

    adc_active  = (state == ST_RUN) && (h >= ADC_H_BEG) && (h < ADC_H_END);
    adc_end     = (state == ST_RUN) && cnt_inc && (h + 1 == ADC_H_END);

    dac_active  = (state == ST_RUN) && (dfull >= 0) && (dfull < (1 << (M + 1)));
    dac_code    = dac_active ? M'(dfull >>> 1) : '0;
    din_a       = dac_active && dfull[0];
    phi2        = dac_active && !din_a;
    phi1        = dac_active && din_a;
    seg         = (int'(dac_code) + DAC_LOW_LSB) / SEG_LSB;
    if (seg > 3) seg = 3;
    amp_sel     = 4'b0001 << seg;
    sh_sample   = half_q && phi1;
  end

  // half_q marks the first clock after a half-LSB step.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_q     <= 1'b0;
      dac_strobe <= 1'b0;
    end else begin
      half_q     <= cnt_inc;
      dac_strobe <= sh_sample;
    end
  end

  // The cross-switching phases never overlap and exactly one sub-amplifier
  // is selected.
  a_phi_nonoverlap: assert property (@(posedge clk) disable iff (!rst_n) !(phi1 && phi2));
  a_amp_onehot:     assert property (@(posedge clk) disable iff (!rst_n) $onehot(amp_sel));

  if ((SPL < 2) || (SPL % 2 != 0)) begin : g_bad_spl
    $error("SPL must be even and at least 2");
  end

endmodule
