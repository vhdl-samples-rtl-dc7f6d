// tb_multex2: self-checking testbench for the triple multiplier.
//
// Applies corner values (0, 1, all ones, single high bit) and random 32-bit
// buses, and compares the three products with a shift-and-add reference
// computed in the testbench.
module tb_multex2;
  logic [31:0] ad, bd, cd;
  logic [63:0] axb, bxc, axc;
  int checks = 0, failures = 0;

  multex2 dut (.*);

  function automatic logic [63:0] ref_mul(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] acc = '0;
    for (int i = 0; i < 32; i++)
      if (y[i]) acc += {32'h0, x} << i;
    return acc;
  endfunction

  task automatic check_all();
    #1ns;
    checks += 3;
    if (axb !== ref_mul(ad, bd)) begin failures++; $display("FAIL axb %h*%h=%h", ad, bd, axb); end
    if (bxc !== ref_mul(bd, cd)) begin failures++; $display("FAIL bxc %h*%h=%h", bd, cd, bxc); end
    if (axc !== ref_mul(ad, cd)) begin failures++; $display("FAIL axc %h*%h=%h", ad, cd, axc); end
  endtask

  localparam logic [31:0] CORNER [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h0001_0000};

  initial begin
    foreach (CORNER[i]) foreach (CORNER[j]) begin
      ad = CORNER[i]; bd = CORNER[j]; cd = CORNER[(i + j) % 5];
      check_all();
    end
    repeat (300) begin
      ad = $urandom; bd = $urandom; cd = $urandom;
      check_all();
    end
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
