// tb_adc_datapath: self-checking testbench for the capture and read data path.
//
// Drives the DCLK side directly: 16 DCLK periods with shftena high, each
// channel presenting its random 16-bit word MSB first, then one regena
// period; idle periods with garbage on the serial lines must be ignored.
// Reads every address on the 8 MHz side with hihalf computed from the address
// (>= 18h) and checks: channel words at 00h..2Fh one clk8m edge after the
// address is applied, zero at other addresses and whenever regclr is high,
// the control bits at 3Fh, the ID byte while idsel is high, and that old
// results stay readable while the next word is being shifted in.
module tb_adc_datapath;
  import ip8320_pkg::*;

  logic dclk = 1'b0, clk8m = 1'b0, n_reset = 1'b1;
  logic shftena = 1'b0, regena = 1'b0;
  logic [NUM_CH-1:0] sdata = '0;
  logic regclr = 1'b0, hihalf, idsel = 1'b0;
  logic [6:1] a = '0;
  logic [7:0] id_data = 8'h5A;
  ctrl_bits_t ctrl = 4'b1001;
  logic [15:0] dout;
  int checks = 0, failures = 0;

  logic [15:0] word [NUM_CH];   // words being shifted in
  logic [15:0] held [NUM_CH];   // words that should be readable

  adc_datapath dut (.*);

  always #200ns dclk = !dclk;
  always #62.5ns clk8m = !clk8m;
  assign hihalf = (a >= 6'h18);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One acquisition on the DCLK side: idle, 16 shifts, regena.
  task automatic acquire(input int idle);
    foreach (word[ch]) word[ch] = 16'($urandom);
    repeat (idle) begin @(negedge dclk); sdata = {$urandom, $urandom}; end
    for (int b = 15; b >= 0; b--) begin
      @(negedge dclk);
      shftena = 1'b1;
      foreach (word[ch]) sdata[ch] = word[ch][b];
    end
    @(negedge dclk);
    shftena = 1'b0; regena = 1'b1; sdata = {$urandom, $urandom};
    @(negedge dclk);
    regena = 1'b0;
    foreach (word[ch]) held[ch] = word[ch];
  endtask

  // Read one address: apply it, one clk8m edge, check the bus.
  task automatic read_check(input logic [6:1] ad, input bit clr);
    logic [15:0] exp;
    @(negedge clk8m);
    a = ad; regclr = clr;
    @(negedge clk8m);
    if (ad == CTRL_ADDR)          exp = 16'(ctrl);
    else if (clr || ad >= 6'h30)  exp = '0;
    else                          exp = held[ad];
    check(dout == exp, $sformatf("read %h clr=%0d: %h expected %h", ad, clr, dout, exp));
    regclr = 1'b0;
  endtask

  initial begin
    foreach (held[ch]) held[ch] = '0;
    #5ns n_reset = 1'b0;
    #1us n_reset = 1'b1;
    for (int ad = 0; ad < 64; ad++) read_check(6'(ad), 0);    // results reset to zero
    acquire(3);
    for (int ad = 0; ad < 64; ad++) read_check(6'(ad), 0);
    for (int ad = 0; ad < 64; ad += 7) read_check(6'(ad), 1);  // regclr zeroes
    // ID multiplexer
    @(negedge clk8m) begin idsel = 1'b1; a = 6'h02; end
    #1ns check(dout == 16'h005A, "ID byte while idsel");
    idsel = 1'b0;
    // old results readable while the next word shifts in
    fork
      acquire(2);
      begin
        @(posedge shftena);
        for (int i = 0; i < 20; i++) read_check(6'($urandom_range(0, 47)), 0);
        wait (regena);
      end
    join
    for (int ad = 0; ad < 48; ad++) read_check(6'(ad), 0);
    acquire(0);
    for (int ad = 0; ad < 48; ad++) read_check(6'(ad), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk8m);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
