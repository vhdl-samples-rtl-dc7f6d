// ip8320: 48-channel, 16-bit, simultaneously sampling ADC IndustryPack module.
//
// 48 serial ADCs share one chip select and one data clock (DCLK) and convert
// together. The acquisition controller (acq_ctrl) steps a 23-state sequence
// per conversion: it shifts 16 bits from every ADC into per-channel shift
// registers, posts all 48 words at once into result registers (regena), then
// recycles the ADCs by raising n_cs for one state. By default conversions run
// continuously from power-up at 2.5 MHz DCLK, a new set every 9.2 us.
//
// The carrier reads results over the IndustryPack bus, clocked at 8 MHz,
// with no wait states (ipctrl): I/O and memory locations 00h..2Fh return
// channels 0..47, I/O and memory 3Fh the control bits, other I/O and low
// memory locations zero; ID space returns the ID bytes (id_rom). Memory
// transfers need a zero extended address on d[15..0] (memzero_cmp).
//
// The control register at I/O 3Fh selects a 4x slower DCLK (d3), lets an
// external low on n_ipstrobe stop conversions (d2), pulses n_ipstrobe low
// while new results are posted (d1), and acknowledges every transfer (d0).
// The strobe covers state 13h; the result registers load on the DCLK edge
// that ends it, so a new set is readable from the rising edge of the strobe
// (the original treats the falling edge as the posting mark; this design
// follows its register-load timing).
//
// Clocks: clk8m (carrier) and clk5m (oscillator) are unrelated; DCLK is
// derived from clk5m. Results cross to clk8m through the data path's read
// register. The bus drivers and the open-drain n_ipstrobe driver are outside:
// d_out is driven onto d[15..0] while ack is high, and the n_ipstrobe pin is
// pulled low while strbout is high.
// The partition into these blocks follows the description of the module;
// the port names of the bundle and the data bus split into d_in and d_out
// are this design's.
module ip8320
  import ip8320_pkg::*;
(
  input  logic              clk8m,      // IP carrier clock, 8 MHz
  input  logic              clk5m,      // 5 MHz oscillator
  input  logic              n_reset,    // IP reset, active low
  input  logic              n_write,
  input  logic              n_iosel,
  input  logic              n_memsel,
  input  logic              n_idsel,
  input  logic              n_intsel,
  input  logic [6:1]        a,
  input  logic [15:0]       d_in,       // carrier data bus, input side
  output logic [15:0]       d_out,      // read data, valid while ack is high
  output logic              ack,        // enable the data bus drivers
  output logic              n_ack,      // acknowledge, active low
  input  logic              n_ipstrobe, // n_ipstrobe pin state
  output logic              strbout,    // pull n_ipstrobe low
  output logic              adc_dclk,   // ADC data clock
  output logic              adc_n_cs,   // ADC chip select, active low
  input  logic [NUM_CH-1:0] adc_sdata   // ADC serial data, one per ADC
);

  ctrl_bits_t ctrl;
  acq_state_e state;
  logic memzero, hihalf, idsel, regclr, strtena, shftena, regena;
  logic [7:0] id_data;

  memzero_cmp u_memzero (.d(d_in), .memzero);

  ipctrl u_ipctrl (
    .clk8m, .n_reset, .n_write, .n_iosel, .n_memsel, .n_idsel, .n_intsel,
    .a, .d(d_in[3:0]), .regena, .memzero, .n_ipstrobe,
    .ctrl, .hihalf, .idsel, .regclr, .strbout, .strtena, .ack, .n_ack
  );

  acq_ctrl u_acq (
    .clk5m, .n_reset, .strtena, .slowclkena(ctrl.slowclkena),
    .dclk(adc_dclk), .n_cs(adc_n_cs), .shftena, .regena, .state
  );

  id_rom u_id (.a, .data(id_data));

  adc_datapath u_dp (
    .dclk(adc_dclk), .n_reset, .shftena, .regena, .sdata(adc_sdata),
    .clk8m, .regclr, .hihalf, .idsel, .a, .id_data, .ctrl, .dout(d_out)
  );

endmodule
