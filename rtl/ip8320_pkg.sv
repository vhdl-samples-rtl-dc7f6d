// ip8320_pkg: constants and types shared by the IP8320 48-channel ADC module.
//
// The IP8320 is an IndustryPack (IP) module with 48 simultaneously sampled
// 16-bit serial ADCs. This package holds the channel count, the word width,
// the address of the control register in I/O space, the encoding of the
// 23-state acquisition sequencer and the layout of the control register.
// The sequencer codes, the 3Fh control address, the bit positions of the four
// control bits and the 24-channel half boundary follow the design description;
// the type names are this implementation's own.
package ip8320_pkg;

  localparam int unsigned NUM_CH    = 48;   // ADC channels on the module
  localparam int unsigned ADC_BITS  = 16;   // bits per conversion result
  localparam int unsigned HALF_CH   = 24;   // channels per half of the data path
  localparam logic [6:1]  CTRL_ADDR = 6'h3F; // a[6..1] of the control register

  // The 23 states of the acquisition sequencer, in "mock-Gray" order: one
  // bit changes per step except for the 11h -> 00h return.
  typedef enum logic [4:0] {
    S00 = 5'h00, S01 = 5'h01, S03 = 5'h03, S02 = 5'h02, S06 = 5'h06,
    S07 = 5'h07, S05 = 5'h05, S04 = 5'h04, S0C = 5'h0C, S0D = 5'h0D,
    S0F = 5'h0F, S0E = 5'h0E, S0A = 5'h0A, S0B = 5'h0B, S09 = 5'h09,
    S08 = 5'h08, S18 = 5'h18, S19 = 5'h19, S1B = 5'h1B, S13 = 5'h13,
    S17 = 5'h17, S15 = 5'h15, S11 = 5'h11
  } acq_state_e;

  localparam int unsigned SEQ_LEN = 23;     // states per acquisition

  // Control register at I/O 3Fh, d[3..0]; all bits reset to zero.
  typedef struct packed {
    logic slowclkena;  // d3: DCLK 625 kHz instead of 2.5 MHz
    logic ctrlinena;   // d2: n_ipstrobe low (driven by others) stops conversions
    logic statoutena;  // d1: pulse n_ipstrobe low while new results register
    logic ackallena;   // d0: acknowledge every transfer, legal or not
  } ctrl_bits_t;

endpackage
