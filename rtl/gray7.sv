// gray7: 3-bit Gray-code sequencer with start enable and pause.
//
// Steps through the six-count Gray sequence 0,1,3,2,6,7,5 and back to 0, one
// bit changing per step, on rising edges of clk. Count 0 is the idle state:
// the counter leaves it only on an edge where strtena is high, regardless of
// pause. From any other count it advances on every edge where pause is low
// and holds while pause is high. So a one-cycle strtena pulse with pause low
// runs one full sequence back to 0; strtena held high runs continuously.
// rst (active high) clears the count to 0 asynchronously and holds it there.
// The unused code 4 goes to 0 on the next enabled edge.
// Behaviour and port names follow the description of the counter; the
// registered output is its Q outputs directly.
module gray7 (
  input  logic       clk,
  input  logic       rst,      // asynchronous reset, active high
  input  logic       strtena,  // start a sequence from count 0
  input  logic       pause,    // hold a running sequence
  output logic [2:0] graycnt   // current Gray count
);

  logic [2:0] next_gray;

  always_comb begin
    unique case (graycnt)
      3'b000:  next_gray = 3'b001;
      3'b001:  next_gray = 3'b011;
      3'b011:  next_gray = 3'b010;
      3'b010:  next_gray = 3'b110;
      3'b110:  next_gray = 3'b111;
      3'b111:  next_gray = 3'b101;
      default: next_gray = 3'b000;  // 5 -> 0, and the unused code 4
    endcase
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) graycnt <= 3'b000;
    else if ((graycnt == 3'b000 && strtena) || (graycnt != 3'b000 && !pause))
      graycnt <= next_gray;

endmodule
