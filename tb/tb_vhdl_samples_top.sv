// tb_vhdl_samples_top: end-to-end testbench of the top level at its default
// (full) size. The IP8320 is run through ip8320_exerciser (carrier, 48 ADC
// models, n_ipstrobe controller); in parallel the triple multiplier gets
// random operands checked against a shift-and-add reference, and the Gray
// sequencer is run on a 7 ns clock through a single start pulse, a paused
// count and continuous running, checked against its sequence table. Each
// mechanism of the three designs is counted and must occur at least once.
module tb_vhdl_samples_top;
  logic clk8m = 1'b0, clk5m = 1'b0, g7_clk = 1'b0;
  logic n_reset, n_ipstrobe, strbout, adc_dclk, adc_n_cs;
  logic [47:0] adc_sdata;
  logic [31:0] mx_ad = '0, mx_bd = '0, mx_cd = '0;
  logic [63:0] mx_axb, mx_bxc, mx_axc;
  logic g7_rst = 1'b0, g7_strtena = 1'b0, g7_pause = 1'b0;
  logic [2:0] g7_graycnt;
  int ip_checks, ip_failures, checks = 0, failures = 0;
  int n_mult = 0, n_pulse_seq = 0, n_pause_hold = 0, n_continuous = 0;
  bit ip_done, side_done = 1'b0;

  localparam logic [2:0] SEQ [7] = '{3'd0, 3'd1, 3'd3, 3'd2, 3'd6, 3'd7, 3'd5};

  always #62.5ns clk8m = !clk8m;
  initial begin #37ns; forever #100ns clk5m = !clk5m; end
  always #3.5ns g7_clk = !g7_clk;

  ipbus_if bus (.clk8m);

  vhdl_samples_top dut (
    .ip_clk8m(clk8m), .ip_clk5m(clk5m), .ip_n_reset(n_reset),
    .ip_n_write(bus.n_write), .ip_n_iosel(bus.n_iosel), .ip_n_memsel(bus.n_memsel),
    .ip_n_idsel(bus.n_idsel), .ip_n_intsel(bus.n_intsel), .ip_a(bus.a),
    .ip_d_in(bus.d_in), .ip_d_out(bus.d_out), .ip_ack(bus.ack), .ip_n_ack(bus.n_ack),
    .ip_n_ipstrobe(n_ipstrobe), .ip_strbout(strbout),
    .adc_dclk, .adc_n_cs, .adc_sdata,
    .mx_ad, .mx_bd, .mx_cd, .mx_axb, .mx_bxc, .mx_axc,
    .g7_clk, .g7_rst, .g7_strtena, .g7_pause, .g7_graycnt
  );

  ip8320_exerciser #(.NCH(48)) ex (
    .bus, .clk8m, .n_reset, .n_ipstrobe, .strbout, .adc_dclk, .adc_n_cs,
    .adc_sdata, .checks(ip_checks), .failures(ip_failures), .done(ip_done)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [63:0] ref_mul(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] acc = '0;
    for (int i = 0; i < 32; i++) if (y[i]) acc += {32'h0, x} << i;
    return acc;
  endfunction

  task automatic g7_step();
    @(posedge g7_clk); #1ns;
  endtask

  initial begin
    #1ns g7_rst = 1'b1;
    // triple multiplier
    repeat (200) begin
      mx_ad = $urandom; mx_bd = $urandom; mx_cd = $urandom;
      #5ns;
      check(mx_axb == ref_mul(mx_ad, mx_bd) && mx_bxc == ref_mul(mx_bd, mx_cd) &&
            mx_axc == ref_mul(mx_ad, mx_cd), "multiplier products");
      n_mult++;
    end
    // Gray sequencer: reset, single start pulse, pause, continuous
    @(negedge g7_clk) g7_rst = 1'b0;
    g7_step(); check(g7_graycnt == 0, "gray idle after reset");
    @(negedge g7_clk) g7_strtena = 1'b1;
    @(negedge g7_clk) g7_strtena = 1'b0;
    begin
      bit ok;
      ok = (g7_graycnt == 1);
      for (int i = 2; i <= 7; i++) begin g7_step(); ok &= (g7_graycnt == SEQ[i % 7]); end
      repeat (3) begin g7_step(); ok &= (g7_graycnt == 0); end
      check(ok, "gray single sequence then rest");
      if (ok) n_pulse_seq++;
    end
    @(negedge g7_clk) begin g7_strtena = 1'b1; g7_pause = 1'b1; end
    @(negedge g7_clk) g7_strtena = 1'b0;
    repeat (4) begin g7_step(); check(g7_graycnt == 1, "gray held by pause"); n_pause_hold++; end
    @(negedge g7_clk) begin g7_pause = 1'b0; g7_strtena = 1'b1; end
    for (int i = 2; i < 30; i++) begin
      g7_step();
      check(g7_graycnt == SEQ[i % 7], "gray continuous");
      if (g7_graycnt == 0) n_continuous++;
    end
    check(n_mult > 0 && n_pulse_seq > 0 && n_pause_hold > 0 && n_continuous > 1,
          "multiplier and Gray mechanisms exercised");
    $display("multiplier vectors %0d, gray single runs %0d, paused cycles %0d, continuous wraps %0d",
             n_mult, n_pulse_seq, n_pause_hold, n_continuous);
    side_done = 1'b1;
  end

  initial begin
    wait (ip_done && side_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ip_checks, failures + ip_failures);
    $finish;
  end

  initial begin
    #2ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ip_checks, failures + ip_failures + 1);
    $finish;
  end
endmodule
