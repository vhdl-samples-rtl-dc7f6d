// acq_ctrl: the IP8320 ADC acquisition controller, i.e. the 5-bit state
// register closed around the sequencer logic of adc_state.
//
// The register is clocked by the rising edge of DCLK and loads the next state
// computed by adc_state, so the machine steps once per DCLK period through
// its 23 states. shftena, regena and n_cs are decoded straight from the
// registered state. A full acquisition therefore repeats every 23 DCLK
// periods: 46 clk5m periods at the 2.5 MHz rate, 184 at the 625 kHz rate.
//
// Reset: the register is cleared asynchronously by n_reset, and also while
// strtena is low. The published description says both that a driven-low
// n_ipstrobe stops conversions "and the state machine is reset to zero" and
// that a started sequence completes even if the start enable drops; since
// DCLK itself is gated off by a low strtena, a sequence cannot complete then,
// and this design follows the first statement. The register being a separate
// 5-bit register clocked by DCLK follows the description; clocking on the
// rising edge is this design's choice.
module acq_ctrl
  import ip8320_pkg::*;
(
  input  logic       clk5m,      // 5 MHz oscillator
  input  logic       n_reset,    // asynchronous reset, active low
  input  logic       strtena,    // conversions enabled
  input  logic       slowclkena, // 1 = 625 kHz DCLK
  output logic       dclk,       // ADC and capture clock
  output logic       n_cs,       // common ADC chip select, active low
  output logic       shftena,    // shift register enable (DCLK domain)
  output logic       regena,     // result register enable (DCLK domain)
  output acq_state_e state       // current sequencer state
);

  acq_state_e nextd;
  logic       clr_n;

  assign clr_n = n_reset && strtena;

  adc_state u_state (
    .clk5m, .n_reset, .strtena, .slowclkena,
    .current (state),
    .dclk, .nextd, .n_cs, .shftena, .regena
  );

  always_ff @(posedge dclk or negedge clr_n)
    if (!clr_n) state <= S00;
    else        state <= nextd;

endmodule
