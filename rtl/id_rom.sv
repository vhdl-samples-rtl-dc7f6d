// id_rom: ID space of the IP8320 IndustryPack module.
//
// The ID space has 64 byte locations, addressed by a[6..1]. The first twelve
// hold the module's identification bytes, the next four read as zero, and
// this 16-location pattern repeats four times, so only a[4..1] decode.
// Combinational: the byte follows the address with no clock.
//
// The layout (12 bytes + 4 zeros, repeated four times) follows the
// description. Its byte values are not published; the default of ID_BYTES is
// this design's: the IndustryPack identifier "IPAC" in bytes 0..3, byte 10 =
// 0Ch (number of ID bytes used), all other bytes zero. Set ID_BYTES to the
// real manufacturer, model and CRC values when they are known.
module id_rom #(
  parameter logic [7:0] ID_BYTES [12] = '{8'h49, 8'h50, 8'h41, 8'h43,
                                          8'h00, 8'h00, 8'h00, 8'h00,
                                          8'h00, 8'h00, 8'h0C, 8'h00}
) (
  input  logic [6:1] a,    // ID address a[6..1]
  output logic [7:0] data  // ID byte
);

  always_comb begin
    if (a[4:1] < 4'd12) data = ID_BYTES[a[4:1]];
    else                data = 8'h00;
  end

endmodule
