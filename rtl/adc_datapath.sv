// adc_datapath: serial capture and read-back data path of the IP8320.
//
// DCLK domain: every ADC has its own serial data line. One shift register per
// channel takes a bit, MSB first, at each rising DCLK edge while shftena is
// high (16 sequencer states, so 16 bits), and at the rising edge that ends the
// regena state all channels' words are copied at once into the result
// registers, which the carrier reads. Results reset to zero.
//
// clk8m domain: the read register resynchronises the addressed result to the
// carrier clock. It loads on every clk8m edge, so new results can be posted at
// any time, even in the middle of a read, without wait states; the carrier
// gets what the register holds at the end of the acknowledge cycle. regclr
// clears it synchronously, which is how unused locations read as zero.
// Addressing: a[6..1] = 00h..2Fh are channels 0..47, split into two groups
// of HALF channels; hihalf (a >= 18h) selects the upper group and the offset
// within the group is a - 18h there.
//
// Read data: ID data (zero-extended byte) while idsel is high, the four
// control bits at location 3Fh, the read register otherwise.
//
// The description gives the two groups of 24, the regena-triggered transfer,
// the 8 MHz resynchronisation register with synchronous clear and the idsel
// multiplexer; the single 16-bit read register, MSB-first shifting on the
// rising DCLK edge and the reset of the results are this design's choices.
module adc_datapath
  import ip8320_pkg::*;
#(
  parameter int unsigned NCH  = NUM_CH,   // channels
  parameter int unsigned W    = ADC_BITS, // bits per result
  parameter int unsigned HALF = HALF_CH   // channels per group
) (
  // DCLK domain
  input  logic           dclk,
  input  logic           n_reset,  // asynchronous reset, active low
  input  logic           shftena,
  input  logic           regena,
  input  logic [NCH-1:0] sdata,    // serial data, one line per ADC
  // carrier clock domain
  input  logic           clk8m,
  input  logic           regclr,   // synchronous clear of the read register
  input  logic           hihalf,   // upper group of channels
  input  logic           idsel,    // ID read: put id_data on the bus
  input  logic [6:1]     a,        // carrier address a[6..1]
  input  logic [7:0]     id_data,  // ID space byte
  input  ctrl_bits_t     ctrl,     // control register for read-back
  output logic [W-1:0]   dout      // read data to the bus drivers
);

  logic [W-1:0] shreg  [NCH];
  logic [W-1:0] result [NCH];
  logic [W-1:0] rdreg, sel_word;

  always_ff @(posedge dclk)
    if (shftena)
      for (int ch = 0; ch < NCH; ch++) shreg[ch] <= {shreg[ch][W-2:0], sdata[ch]};

  always_ff @(posedge dclk or negedge n_reset)
    if (!n_reset)
      for (int ch = 0; ch < NCH; ch++) result[ch] <= '0;
    else if (regena)
      for (int ch = 0; ch < NCH; ch++) result[ch] <= shreg[ch];

  // Channel select: group by hihalf, offset within the group.
  always_comb begin
    int unsigned off, ch;
    off = hihalf ? int'(a) - HALF : int'(a);
    ch  = hihalf ? HALF + off : off;
    sel_word = (off < HALF && ch < NCH) ? result[ch] : '0;
  end

  always_ff @(posedge clk8m)
    if (regclr) rdreg <= '0;
    else        rdreg <= sel_word;

  always_comb begin
    if (idsel)               dout = W'(id_data);
    else if (a == CTRL_ADDR) dout = W'(ctrl);
    else                     dout = rdreg;
  end

endmodule
