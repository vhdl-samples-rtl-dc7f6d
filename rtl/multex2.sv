// multex2: triple 32 x 32 multiplier.
//
// Three unsigned input buses A, B and C are multiplied pairwise into three
// full-width products, A*B, B*C and A*C. Purely combinational; each output
// follows its inputs after the multiplier delay.
// The function and the 32-bit inputs / 64-bit products follow the
// description; making the width a parameter is this design's.
module multex2 #(
  parameter int unsigned W = 32  // width of each input bus
) (
  input  logic [W-1:0]   ad,   // bus A
  input  logic [W-1:0]   bd,   // bus B
  input  logic [W-1:0]   cd,   // bus C
  output logic [2*W-1:0] axb,  // A * B
  output logic [2*W-1:0] bxc,  // B * C
  output logic [2*W-1:0] axc   // A * C
);

  assign axb = (2*W)'(ad) * (2*W)'(bd);
  assign bxc = (2*W)'(bd) * (2*W)'(cd);
  assign axc = (2*W)'(ad) * (2*W)'(cd);

endmodule
