// tb_gray7: self-checking testbench for the 3-bit Gray sequencer.
//
// Reproduces the published waveform: 7 ns clock, reset released, a one-cycle
// strtena pulse runs exactly one sequence 1,3,2,6,7,5 back to 0 and the
// counter then rests at 0; strtena held high keeps it cycling. Also checks
// that pause holds a running count, that pause does not block the start from
// 0, and that reset clears the count asynchronously. Expected counts come
// from a fixed table, one entry per clock edge.
module tb_gray7;
  logic clk = 1'b0, rst = 1'b0, strtena = 1'b0, pause = 1'b0;
  logic [2:0] graycnt;
  int checks = 0, failures = 0;

  localparam logic [2:0] SEQ [7] = '{3'd0, 3'd1, 3'd3, 3'd2, 3'd6, 3'd7, 3'd5};

  gray7 dut (.*);

  always #3.5ns clk = !clk;

  task automatic expect_cnt(input logic [2:0] v, input string what);
    checks++;
    if (graycnt !== v) begin
      failures++;
      $display("FAIL %s: graycnt=%0d expected %0d at %0t", what, graycnt, v, $time);
    end
  endtask

  // drive on the falling edge, sample just after the rising edge
  task automatic step();
    @(posedge clk); #1ns;
  endtask

  initial begin
    #1ns rst = 1'b1;
    #20ns; expect_cnt(3'd0, "in reset");
    @(negedge clk) rst = 1'b0;
    repeat (3) step();
    expect_cnt(3'd0, "idle without strtena");
    // single-cycle start pulse: one full sequence, then rest at 0
    @(negedge clk) strtena = 1'b1;
    @(negedge clk) strtena = 1'b0;
    #0; expect_cnt(3'd1, "first count after pulse");
    for (int i = 2; i <= 7; i++) begin
      step();
      expect_cnt(SEQ[i % 7], "pulse sequence");
    end
    repeat (4) begin step(); expect_cnt(3'd0, "rest after one sequence"); end
    // pause holds a running count; pause does not block the start
    @(negedge clk) begin strtena = 1'b1; pause = 1'b1; end
    @(negedge clk) strtena = 1'b0;
    expect_cnt(3'd1, "start with pause high");
    repeat (3) begin step(); expect_cnt(3'd1, "held by pause"); end
    @(negedge clk) pause = 1'b0;
    step(); expect_cnt(3'd3, "resume after pause");
    step(); expect_cnt(3'd2, "resume after pause");
    @(negedge clk) pause = 1'b1;
    repeat (2) begin step(); expect_cnt(3'd2, "second pause"); end
    @(negedge clk) pause = 1'b0;
    repeat (4) step(); // 6, 7, 5, 0
    expect_cnt(3'd0, "back to 0");
    // continuous running with strtena held high
    @(negedge clk) strtena = 1'b1;
    for (int i = 1; i <= 14; i++) begin
      step();
      expect_cnt(SEQ[i % 7], "continuous");
    end
    // asynchronous reset
    #1ns rst = 1'b1; #1ns;
    expect_cnt(3'd0, "async reset");
    step(); expect_cnt(3'd0, "held in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
