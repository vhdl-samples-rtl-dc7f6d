// adc_state: next-state logic, DCLK generator and control decode of the
// IP8320 acquisition sequencer.
//
// The sequencer is a 23-state "mock-Gray" machine; its 5-bit state register
// sits outside this block (see acq_ctrl), which only computes the next state
// from the current one. The sequence is 00,01,03,02,06,07,05,04,0C,0D,0F,0E,
// 0A,0B,09,08,18,19,1B,13,17,15,11 and back to 00: one bit changes per step
// except 11h -> 00h, where no control output depends on the two bits, so the
// decoded controls below are glitch free without further registering. State 00
// is left only while strtena is high; a sequence once started runs to its end.
//
// Decoded controls (from the current state):
//   shftena : states 02 .. 1B (16 states), shift one serial bit per DCLK
//   regena  : state 13, move the 16 shifted bits into the result registers
//   n_cs    : ADC chip select, high in state 13 (recycles the ADCs) and
//             whenever strtena is low (ADCs in shutdown)
//
// DCLK: clk5m (5 MHz) is divided by 2 to 2.5 MHz, then twice more to 625 kHz
// by a ripple chain of toggle flip-flops, all cleared by reset. DCLK is the
// 2.5 MHz clock, or the 625 kHz one when slowclkena is set, and is held low
// during reset or while strtena is low. One acquisition takes 23 DCLK
// periods: 9.2 us (108,696 samples/s per channel) or 36.8 us.
// All of this follows the published model of the sequencer; the enum state
// type and port names in SystemVerilog form are this implementation's.
module adc_state
  import ip8320_pkg::*;
(
  input  logic       clk5m,      // 5 MHz oscillator
  input  logic       n_reset,    // asynchronous reset, active low
  input  logic       strtena,    // conversions enabled
  input  logic       slowclkena, // 1 = 625 kHz DCLK
  input  acq_state_e current,    // current state, from the state register
  output logic       dclk,       // ADC and data capture clock
  output acq_state_e nextd,      // next state, to the state register
  output logic       n_cs,       // common ADC chip select, active low
  output logic       shftena,    // shift register enable
  output logic       regena      // result register enable
);

  logic clk2m5, clk1m25, clk625k;

  always_comb begin
    unique case (current)
      S00:     nextd = strtena ? S01 : S00;
      S01:     nextd = S03;
      S03:     nextd = S02;
      S02:     nextd = S06;
      S06:     nextd = S07;
      S07:     nextd = S05;
      S05:     nextd = S04;
      S04:     nextd = S0C;
      S0C:     nextd = S0D;
      S0D:     nextd = S0F;
      S0F:     nextd = S0E;
      S0E:     nextd = S0A;
      S0A:     nextd = S0B;
      S0B:     nextd = S09;
      S09:     nextd = S08;
      S08:     nextd = S18;
      S18:     nextd = S19;
      S19:     nextd = S1B;
      S1B:     nextd = S13;
      S13:     nextd = S17;
      S17:     nextd = S15;
      S15:     nextd = S11;
      default: nextd = S00;  // 11h, and every unused code, return to 00h
    endcase
  end

  assign regena  = (current == S13);
  assign n_cs    = (current == S13) || !strtena;
  assign shftena = !(current inside {S13, S17, S15, S11, S00, S01, S03});

  // Clock prescaler: ripple chain of toggle flip-flops.
  always_ff @(posedge clk5m or negedge n_reset)
    if (!n_reset) clk2m5 <= 1'b0;
    else          clk2m5 <= !clk2m5;

  always_ff @(posedge clk2m5 or negedge n_reset)
    if (!n_reset) clk1m25 <= 1'b0;
    else          clk1m25 <= !clk1m25;

  always_ff @(posedge clk1m25 or negedge n_reset)
    if (!n_reset) clk625k <= 1'b0;
    else          clk625k <= !clk625k;

  always_comb begin
    if (!n_reset || !strtena) dclk = 1'b0;
    else if (slowclkena)      dclk = clk625k;
    else                      dclk = clk2m5;
  end

endmodule
