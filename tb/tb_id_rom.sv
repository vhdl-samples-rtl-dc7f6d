// tb_id_rom: self-checking testbench for the ID space.
//
// Walks all 64 ID locations: locations 0..11 of each 16-location block must
// return the configured ID bytes ("IPAC" first, 0Ch in byte 10), locations
// 12..15 must read zero, and the four blocks must be identical.
module tb_id_rom;
  logic [6:1] a;
  logic [7:0] data;
  int checks = 0, failures = 0;

  id_rom dut (.*);

  localparam logic [7:0] EXP [16] = '{8'h49, 8'h50, 8'h41, 8'h43, 8'h00, 8'h00,
                                      8'h00, 8'h00, 8'h00, 8'h00, 8'h0C, 8'h00,
                                      8'h00, 8'h00, 8'h00, 8'h00};

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = 6'(i); #1ns;
      checks++;
      if (data !== EXP[i % 16]) begin
        failures++;
        $display("FAIL a=%h data=%h expected %h", i, data, EXP[i % 16]);
      end
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
