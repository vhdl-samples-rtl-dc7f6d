// ip8320_exerciser: end-to-end test sequence for an IP8320 module, shared by
// the module testbench and the top-level testbench.
//
// Plays the IP carrier (through ipbus_if), the 48 ADCs (adc_model) and an
// external controller on the open-drain n_ipstrobe line (the pin is low when
// the module's strbout or the external controller pulls it). It checks:
//  - ID space contents and that ID writes are not acknowledged;
//  - continuous conversion from reset at one result set per 9.2 us, and the
//    words read from I/O and memory space against the ADC model's values for
//    the conversion last posted;
//  - a read held open across a posting returns the new set (the value at
//    the acknowledge cycle is what the carrier receives);
//  - zero-wait acknowledge, hold cycles, zero data at unused locations,
//    unacknowledged illegal transfers and the acknowledge-all mode;
//  - the 4x slow DCLK (36.8 us per set), in which all 48 channels of one set
//    are read back;
//  - the n_ipstrobe status output (one DCLK-long low pulse per posted set);
//  - the n_ipstrobe control input: held low it stops conversions, released
//    it lets exactly one set be posted before the controller stops it again.
// Each of these mechanisms is counted; one that never happened is a failure.
// A conversion started straight from the stopped state is not checked word
// by word (see adc_model), only for stable read-back.
module ip8320_exerciser
  import tb_adc_pkg::*;
  import ipbus_pkg::*;
#(
  parameter int NCH = 48
) (
  ipbus_if          bus,
  input  logic      clk8m,
  output logic      n_reset,
  output logic      n_ipstrobe,
  input  logic      strbout,
  input  logic      adc_dclk,
  input  logic      adc_n_cs,
  output logic [NCH-1:0] adc_sdata,
  output int        checks,
  output int        failures,
  output bit        done
);

  typedef enum int {
    M_ZERO_WAIT, M_HOLD, M_UNACKED, M_ACKALL, M_ZERO_FILL, M_ID_READ,
    M_UPPER_HALF, M_MEM_READ, M_CTRL_READBACK, M_FAST_RATE, M_SLOW_RATE,
    M_STROBE_OUT, M_CTRL_IN_STOP, M_WORD_CHECK, M_MID_UPDATE, M_NUM
  } mech_e;
  localparam string MECH_NAME [M_NUM] = '{"zero-wait ack", "hold cycles",
    "illegal transfer ignored", "acknowledge all", "zero fill", "ID read",
    "upper channel group", "memory-space read", "control read-back",
    "2.5 MHz rate", "625 kHz rate", "strobe output", "strobe input stop", "result words compared",
    "new set posted during a read"};
  int mech [M_NUM];

  localparam logic [7:0] ID_EXP [16] = '{8'h49, 8'h50, 8'h41, 8'h43, 8'h00, 8'h00,
    8'h00, 8'h00, 8'h00, 8'h00, 8'h0C, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};

  logic ext_low = 1'b0;
  assign n_ipstrobe = !(strbout || ext_low);

  for (genvar ch = 0; ch < NCH; ch++) begin : g_adc
    adc_model #(.CH(ch)) u_adc (.dclk(adc_dclk), .n_cs(adc_n_cs), .sdata(adc_sdata[ch]));
  end

  // Posted result sets: the DCLK edge that ends the chip-select-high state.
  int      captures = 0, cap_conv = 0;
  bit      cap_valid = 1'b0;
  realtime cap_time [$];
  always @(posedge adc_dclk)
    if (adc_n_cs) begin
      captures++;
      cap_conv  = g_adc[0].u_adc.conv;
      cap_valid = g_adc[0].u_adc.aligned;
      cap_time.push_back($realtime);
    end

  int strobes = 0;
  realtime strobe_fall, strobe_width;
  always @(negedge n_ipstrobe) if (!ext_low) begin strobes++; strobe_fall = $realtime; end
  always @(posedge n_ipstrobe) strobe_width = $realtime - strobe_fall;

  function automatic bit near(input realtime x, input realtime y);
    return (x - y < 1ns) && (y - x < 1ns);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [15:0] rd;
  bit acked, data_on;

  // Read channel ch from I/O or memory space and compare with the model,
  // unless a new set was posted during the read.
  task automatic read_channel(input int ch, input bit mem, input int holds = 0);
    int n_before;
    n_before = captures;
    bus.xfer(mem ? MEM : IO, 0, 6'(ch), 0, 0, holds, rd, acked, data_on);
    check(acked && data_on, $sformatf("channel %0d acknowledged", ch));
    if (acked) mech[M_ZERO_WAIT]++;
    if (holds > 0 && acked) mech[M_HOLD]++;
    if (mem) mech[M_MEM_READ]++;
    if (ch >= 24) mech[M_UPPER_HALF]++;
    if (captures == n_before && cap_valid) begin
      mech[M_WORD_CHECK]++;
      check(rd == adc_word(ch, cap_conv),
            $sformatf("channel %0d = %h expected %h", ch, rd, adc_word(ch, cap_conv)));
    end
  endtask

  task automatic write_ctrl(input logic [3:0] v);
    bus.xfer(IO, 1, 6'h3F, 16'(v), 0, 0, rd, acked, data_on);
    check(acked && !data_on, "control write acknowledged");
    bus.xfer(IO, 0, 6'h3F, 0, 0, 0, rd, acked, data_on);
    check(acked && rd == 16'(v), $sformatf("control read-back %h", rd));
    mech[M_CTRL_READBACK]++;
  endtask

  task automatic wait_capture();
    int c;
    c = captures;
    wait (captures > c);
    #300ns;
  endtask

  // Expect a transfer to be ignored (no acknowledge).
  task automatic expect_ignored(input space_e sp, input bit wr, input logic [6:1] ad,
                                input logic [15:0] ext, input string what);
    bus.xfer(sp, wr, ad, 0, ext, 0, rd, acked, data_on);
    check(!acked && !data_on, {what, " not acknowledged"});
    mech[M_UNACKED]++;
  endtask

  initial begin
    realtime per;
    logic [15:0] snap [NCH];
    int c0;
    checks = 0; failures = 0; done = 1'b0;
    foreach (mech[i]) mech[i] = 0;
    n_reset = 1'b1;
    #5ns n_reset = 1'b0;
    #1us;
    @(negedge clk8m) n_reset = 1'b1;

    // ID space
    for (int i = 0; i < 20; i++) begin
      bus.xfer(ID, 0, 6'(i * 3), 0, 0, 0, rd, acked, data_on);
      check(acked && data_on && rd == 16'(ID_EXP[(i * 3) % 16]),
            $sformatf("ID %h = %h", i * 3, rd));
      mech[M_ID_READ]++;
    end
    expect_ignored(ID, 1, 6'h00, 0, "ID write");
    bus.xfer(IO, 0, 6'h3F, 0, 0, 0, rd, acked, data_on);
    check(acked && rd == 0, "control bits reset to zero");
    bus.xfer(MEM, 0, 6'h3F, 0, 0, 0, rd, acked, data_on);
    check(acked && rd == 0, "control bits in memory space");

    // continuous conversions from reset, 2.5 MHz DCLK
    repeat (2) wait_capture();
    for (int k = 0; k < 4; k++) begin
      wait_capture();
      for (int i = 0; i < 12; i++) read_channel($urandom_range(0, NCH - 1), i[0], (i == 5) ? 2 : 0);
    end
    per = cap_time[$] - cap_time[$ - 1];
    check(near(per, 9200ns), $sformatf("posting period %0t", per));
    if (near(per, 9200ns)) mech[M_FAST_RATE]++;

    // a read held for 80 cycles (10 us) spans at least one posting
    for (int k = 0; k < 3; k++) begin
      int ch, n_before;
      ch = $urandom_range(0, NCH - 1);
      n_before = captures;
      bus.xfer(IO, 0, 6'(ch), 0, 0, 80, rd, acked, data_on);
      check(acked && captures > n_before, "a set was posted during the held read");
      if (cap_valid && $realtime - cap_time[$] > 300ns) begin
        check(rd == adc_word(ch, cap_conv),
              $sformatf("held read of channel %0d = %h, newest set %h", ch, rd, adc_word(ch, cap_conv)));
        if (captures > n_before && rd == adc_word(ch, cap_conv)) mech[M_MID_UPDATE]++;
      end
    end

    // unused locations and illegal transfers
    for (int ad = 'h30; ad < 'h3F; ad += 7) begin
      bus.xfer(IO, 0, 6'(ad), 0, 0, 0, rd, acked, data_on);
      check(acked && rd == 0, $sformatf("unused I/O %h reads zero", ad));
      bus.xfer(MEM, 0, 6'(ad), 0, 0, 0, rd, acked, data_on);
      check(acked && rd == 0, $sformatf("unused memory %h reads zero", ad));
      mech[M_ZERO_FILL]++;
    end
    expect_ignored(MEM, 0, 6'h01, 16'h0100, "extended memory read");
    expect_ignored(MEM, 1, 6'h01, 16'h0000, "memory write");
    expect_ignored(INT, 0, 6'h00, 0, "interrupt vector read");
    write_ctrl(4'b0001);
    bus.xfer(INT, 0, 6'h00, 0, 0, 0, rd, acked, data_on);
    check(acked && !data_on, "acknowledge-all: interrupt vector");
    bus.xfer(MEM, 0, 6'h01, 0, 16'h0100, 0, rd, acked, data_on);
    check(acked && !data_on, "acknowledge-all: extended memory");
    if (acked) mech[M_ACKALL]++;
    write_ctrl(4'b0000);

    // slow DCLK: a whole set can be read between two postings
    write_ctrl(4'b1000);
    repeat (2) wait_capture();
    per = cap_time[$] - cap_time[$ - 1];
    check(near(per, 36800ns), $sformatf("slow posting period %0t", per));
    if (near(per, 36800ns)) mech[M_SLOW_RATE]++;
    wait_capture();
    c0 = captures;
    for (int ch = 0; ch < NCH; ch++) read_channel(ch, ch[0]);
    check(captures == c0, "48 channels read within one slow posting period");

    // status output on n_ipstrobe
    write_ctrl(4'b1010);
    c0 = strobes;
    repeat (2) wait_capture();
    check(strobes - c0 >= 1 && strobes - c0 <= 2, $sformatf("strobe pulses %0d", strobes - c0));
    check(near(strobe_width, 1600ns), $sformatf("strobe width %0t", strobe_width));
    if (strobes > c0) mech[M_STROBE_OUT]++;

    // control input: external controller holds n_ipstrobe low
    write_ctrl(4'b0110);
    wait_capture();
    ext_low = 1'b1;
    #1us;
    c0 = captures;
    #30us;
    check(captures == c0 && adc_n_cs, "held low: conversions stopped");
    if (captures == c0) mech[M_CTRL_IN_STOP]++;
    ext_low = 1'b0;
    c0 = strobes;
    wait (strobes > c0);        // the module posts a set
    #500ns ext_low = 1'b1;      // and is stopped again well within 8.8 us
    c0 = captures;
    #20us;
    check(captures == c0, "one set per release");
    for (int ch = 0; ch < NCH; ch++) begin
      bus.xfer(IO, 0, 6'(ch), 0, 0, 0, rd, acked, data_on);
      snap[ch] = rd;
    end
    for (int ch = 0; ch < NCH; ch++) begin
      bus.xfer(MEM, 0, 6'(ch), 0, 0, 0, rd, acked, data_on);
      check(acked && rd == snap[ch], $sformatf("held set stable, channel %0d", ch));
    end
    ext_low = 1'b0;
    write_ctrl(4'b0000);

    // reset clears the control register
    write_ctrl(4'b1111);
    @(negedge clk8m) n_reset = 1'b0;
    #500ns @(negedge clk8m) n_reset = 1'b1;
    bus.xfer(IO, 0, 6'h3F, 0, 0, 0, rd, acked, data_on);
    check(acked && rd == 0, "control bits cleared by reset");

    foreach (mech[i]) begin
      check(mech[i] > 0, {"mechanism exercised: ", MECH_NAME[i]});
      $display("mechanism %-26s %0d", MECH_NAME[i], mech[i]);
    end
    done = 1'b1;
  end
endmodule
