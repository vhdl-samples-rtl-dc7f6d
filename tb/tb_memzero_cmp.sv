// tb_memzero_cmp: self-checking testbench for the extended address comparator.
//
// memzero must be 0 only for d = 0000h: checks zero, every single-bit value
// and random values against that rule.
module tb_memzero_cmp;
  logic [15:0] d;
  logic memzero;
  int checks = 0, failures = 0;

  memzero_cmp dut (.*);

  task automatic check(input logic [15:0] v);
    d = v; #1ns;
    checks++;
    if (memzero !== (v != 16'h0)) begin
      failures++;
      $display("FAIL d=%h memzero=%b", v, memzero);
    end
  endtask

  initial begin
    check(16'h0000);
    for (int i = 0; i < 16; i++) check(16'h1 << i);
    check(16'hFFFF);
    repeat (100) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
