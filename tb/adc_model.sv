// adc_model: behavioural model of one 16-bit serial-output sampling ADC.
// Not synthesizable; testbench use only.
//
// The converter samples when its chip select n_cs falls and then needs a
// fixed conversion time: counting rising DCLK edges from the fall, it drives
// the 16 result bits MSB first after edges LAT to LAT+15, each bit held for
// one DCLK period, so that a controller sampling on rising DCLK edges takes
// the MSB at edge LAT+1. While n_cs is high the converter is shut down and
// drives 0. The result is tb_adc_pkg::adc_word(CH, conv), conv counting the
// n_cs falls.
// LAT = 6 matches the free-running sequence, whose chip select falls six
// edges before the first shift (states 17,15,11,00,01,03); LAT = 3 matches a
// sequence started from the stopped state 00 (states 00,01,03). aligned tells
// whether the current conversion started the way LAT assumes: after a
// one-state recycle (at least one DCLK edge with n_cs high) for LAT = 6, or
// straight from shutdown (no such edge) for LAT = 3.
module adc_model #(
  parameter int CH  = 0,
  parameter int LAT = 6
) (
  input  logic dclk,
  input  logic n_cs,
  output logic sdata
);
  import tb_adc_pkg::*;

  int   cnt = 0;
  int   hi_edges = 0;
  int   conv = 0;
  bit   aligned = 1'b0;
  logic [15:0] word = '0;

  initial sdata = 1'b0;

  always @(negedge n_cs) begin
    conv++;
    aligned = (LAT == 3) ? (hi_edges == 0) : (hi_edges > 0);
    hi_edges = 0;
    cnt = 0;
    word = adc_word(CH, conv);
  end

  always @(posedge dclk) begin
    if (n_cs) begin
      hi_edges++;
      sdata <= 1'b0;
    end else begin
      cnt++;
      if (cnt >= LAT && cnt <= LAT + 15) sdata <= word[15 - (cnt - LAT)];
      else                       sdata <= 1'b0;
    end
  end
endmodule
