// memzero_cmp: extended memory address comparator of the IP8320.
//
// During a memory select cycle the carrier puts the extended (upper) memory
// address on d[15..0]. The module decodes only the first 64 memory locations,
// so a memory transfer is legal only when that extended address is zero.
// memzero is high whenever any of the 16 data lines is high, i.e. when the
// extended address is NOT zero. Purely combinational.
// The function and polarity follow the description; the comparator being a
// plain OR reduction is this design's.
module memzero_cmp #(
  parameter int unsigned W = 16  // data bus width
) (
  input  logic [W-1:0] d,        // carrier data bus
  output logic         memzero   // 1 = extended address is not zero
);

  assign memzero = |d;

endmodule
