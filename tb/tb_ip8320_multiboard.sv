// tb_ip8320_multiboard: two IP8320 modules sampling in step on one
// n_ipstrobe line, paced by an external controller.
//
// Workload: simultaneous sampling beyond 48 channels, and reading a whole set
// at the 2.5 MHz rate through a carrier that is too slow to keep up with
// free-running conversion (one read per 250 ns; 48 reads take 12 us, longer
// than the 9.2 us between postings). Both modules share clocks and the
// open-drain line; both have ctrlinena and statoutena set. The controller
// holds the line low (both stop), releases it (both start), waits for the
// strobe (both post) and pulls it low again after a short reaction time, so
// neither module converts again until both have been read out. Checked:
// both chip selects fall at the same instant (simultaneous sampling), both
// post exactly one set per release, no further posting while held, and every
// word of both modules matches the converter models (channels 0..95). The
// converter models use the timing of a sequence started from the stopped
// state (adc_model LAT = 3). Repeated for four sets and two reaction times.
module tb_ip8320_multiboard;
  import tb_adc_pkg::*;
  import ipbus_pkg::*;

  logic clk8m = 1'b0, clk5m = 1'b0;
  logic n_reset = 1'b1, ext_low = 1'b0, n_ipstrobe;
  logic [1:0] strbout, dclk, n_cs;
  logic [47:0] sdata [2];
  int checks = 0, failures = 0;

  always #62.5ns clk8m = !clk8m;
  initial begin #37ns; forever #100ns clk5m = !clk5m; end

  assign n_ipstrobe = !(strbout[0] || strbout[1] || ext_low);

  ipbus_if bus0 (.clk8m);
  ipbus_if bus1 (.clk8m);

  ip8320 dut0 (
    .clk8m, .clk5m, .n_reset,
    .n_write(bus0.n_write), .n_iosel(bus0.n_iosel), .n_memsel(bus0.n_memsel),
    .n_idsel(bus0.n_idsel), .n_intsel(bus0.n_intsel), .a(bus0.a),
    .d_in(bus0.d_in), .d_out(bus0.d_out), .ack(bus0.ack), .n_ack(bus0.n_ack),
    .n_ipstrobe, .strbout(strbout[0]), .adc_dclk(dclk[0]), .adc_n_cs(n_cs[0]), .adc_sdata(sdata[0])
  );
  ip8320 dut1 (
    .clk8m, .clk5m, .n_reset,
    .n_write(bus1.n_write), .n_iosel(bus1.n_iosel), .n_memsel(bus1.n_memsel),
    .n_idsel(bus1.n_idsel), .n_intsel(bus1.n_intsel), .a(bus1.a),
    .d_in(bus1.d_in), .d_out(bus1.d_out), .ack(bus1.ack), .n_ack(bus1.n_ack),
    .n_ipstrobe, .strbout(strbout[1]), .adc_dclk(dclk[1]), .adc_n_cs(n_cs[1]), .adc_sdata(sdata[1])
  );

  // channels 0..47 on module 0, 48..95 on module 1
  for (genvar ch = 0; ch < 48; ch++) begin : g_adc
    adc_model #(.CH(ch),      .LAT(3)) u_adc0 (.dclk(dclk[0]), .n_cs(n_cs[0]), .sdata(sdata[0][ch]));
    adc_model #(.CH(ch + 48), .LAT(3)) u_adc1 (.dclk(dclk[1]), .n_cs(n_cs[1]), .sdata(sdata[1][ch]));
  end

  int captures [2] = '{0, 0};
  realtime cs_fall [2];
  int cap_conv [2];
  bit cap_aligned [2];
  // a posting edge: record which conversion the result registers now hold
  always @(posedge dclk[0])
    if (n_cs[0]) begin
      captures[0]++;
      cap_conv[0]    = g_adc[0].u_adc0.conv;
      cap_aligned[0] = g_adc[0].u_adc0.aligned;
    end
  always @(posedge dclk[1])
    if (n_cs[1]) begin
      captures[1]++;
      cap_conv[1]    = g_adc[0].u_adc1.conv;
      cap_aligned[1] = g_adc[0].u_adc1.aligned;
    end
  always @(negedge n_cs[0]) cs_fall[0] = $realtime;
  always @(negedge n_cs[1]) cs_fall[1] = $realtime;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [15:0] rd;
    bit acked, data_on;
    #5ns n_reset = 1'b0;
    #1us n_reset = 1'b1;
    bus0.xfer(IO, 1, 6'h3F, 16'h6, 0, 0, rd, acked, data_on);   // ctrlinena + statoutena
    bus1.xfer(IO, 1, 6'h3F, 16'h6, 0, 0, rd, acked, data_on);
    @(negedge n_ipstrobe);                     // a free-running post
    #300ns ext_low = 1'b1;                     // controller takes over
    #2us;
    for (int set = 0; set < 4; set++) begin
      int c0 [2], conv;
      c0 = captures;
      #10us check(captures == c0 && n_cs == 2'b11, "held low: both stopped");
      ext_low = 1'b0;                          // start a conversion on both
      @(negedge n_ipstrobe);                   // both strobe
      check(cs_fall[0] == cs_fall[1] && cs_fall[0] > $realtime - 9us,
            "both modules started the conversion at the same instant");
      #((set % 2) ? 50ns : 3us) ext_low = 1'b1;
      #2us;
      check(captures[0] == c0[0] + 1 && captures[1] == c0[1] + 1, "one set per release on each");
      check(cap_aligned[0] && cap_aligned[1], "conversions started from stop");
      conv = cap_conv[0];
      for (int ch = 0; ch < 48; ch++) begin
        bus0.xfer(IO, 0, 6'(ch), 0, 0, 0, rd, acked, data_on);
        check(acked && rd == adc_word(ch, conv),
              $sformatf("module 0 channel %0d = %h expected %h", ch, rd, adc_word(ch, conv)));
        bus1.xfer(MEM, 0, 6'(ch), 0, 0, 0, rd, acked, data_on);
        check(acked && rd == adc_word(ch + 48, cap_conv[1]),
              $sformatf("module 1 channel %0d = %h", ch, rd));
      end
      check(captures[0] == c0[0] + 1 && captures[1] == c0[1] + 1, "no posting while read");
    end
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
