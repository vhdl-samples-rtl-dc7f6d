// tb_ip8320_slow_stream: sustained read-out at the 625 kHz conversion rate.
//
// Workload: capture every set of all 48 channels without ever stopping the
// converters, with a carrier that needs 750 ns per read. The module runs
// free with slowclkena and statoutena set (one set every 36.8 us, a strobe
// pulse on n_ipstrobe per set). The carrier waits for the end of each
// strobe pulse, when the set is in the result registers, and reads channels
// 0..47 at one read per 750 ns (36.0 us per set). Every word of every set
// must match the converter model's value for that one sampling instant, and
// no posting may fall inside a read-out. Five consecutive sets are checked.
module tb_ip8320_slow_stream;
  import tb_adc_pkg::*;
  import ipbus_pkg::*;

  logic clk8m = 1'b0, clk5m = 1'b0;
  logic n_reset = 1'b1, strbout, adc_dclk, adc_n_cs, n_ipstrobe;
  logic [47:0] adc_sdata;
  int checks = 0, failures = 0, sets_read = 0;

  always #62.5ns clk8m = !clk8m;
  initial begin #37ns; forever #100ns clk5m = !clk5m; end

  ipbus_if bus (.clk8m);
  assign n_ipstrobe = !strbout;

  ip8320 dut (
    .clk8m, .clk5m, .n_reset,
    .n_write(bus.n_write), .n_iosel(bus.n_iosel), .n_memsel(bus.n_memsel),
    .n_idsel(bus.n_idsel), .n_intsel(bus.n_intsel), .a(bus.a),
    .d_in(bus.d_in), .d_out(bus.d_out), .ack(bus.ack), .n_ack(bus.n_ack),
    .n_ipstrobe, .strbout, .adc_dclk, .adc_n_cs, .adc_sdata
  );

  for (genvar ch = 0; ch < 48; ch++) begin : g_adc
    adc_model #(.CH(ch)) u_adc (.dclk(adc_dclk), .n_cs(adc_n_cs), .sdata(adc_sdata[ch]));
  end

  int captures = 0, cap_conv = 0;
  bit cap_valid;
  always @(posedge adc_dclk)
    if (adc_n_cs) begin
      captures++;
      cap_conv  = g_adc[0].u_adc.conv;
      cap_valid = g_adc[0].u_adc.aligned;
    end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [15:0] rd;
    bit acked, data_on;
    realtime t0;
    #5ns n_reset = 1'b0;
    #1us n_reset = 1'b1;
    bus.xfer(IO, 1, 6'h3F, 16'hA, 0, 0, rd, acked, data_on);   // slowclkena + statoutena
    // skip the first set after reset (started from the stopped state)
    @(posedge n_ipstrobe);
    repeat (5) begin
      int c0, conv;
      @(posedge n_ipstrobe);                 // end of strobe: set posted
      #1ns;
      c0 = captures; conv = cap_conv;
      check(cap_valid, "set comes from a complete conversion");
      t0 = $realtime;
      for (int ch = 0; ch < 48; ch++) begin
        bus.xfer(IO, 0, 6'(ch), 0, 0, 0, rd, acked, data_on);
        check(acked && rd == adc_word(ch, conv),
              $sformatf("set %0d channel %0d = %h expected %h", conv, ch, rd, adc_word(ch, conv)));
        repeat (3) @(negedge clk8m);         // carrier needs 750 ns per read
      end
      check(captures == c0, "no posting during the read-out");
      check($realtime - t0 < 36.8us, $sformatf("read-out took %0t", $realtime - t0));
      sets_read++;
    end
    check(sets_read == 5, "five consecutive sets read");
    $display("sets read completely: %0d", sets_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
