// tb_ip8320: end-to-end testbench of the IP8320 module at its full size
// (48 channels), driven by ip8320_exerciser: carrier transfers, ADC models
// and the n_ipstrobe controller. Clocks: 8 MHz carrier, 5 MHz oscillator.
module tb_ip8320;
  logic clk8m = 1'b0, clk5m = 1'b0;
  logic n_reset, n_ipstrobe, strbout, adc_dclk, adc_n_cs;
  logic [47:0] adc_sdata;
  int checks, failures;
  bit done;

  always #62.5ns clk8m = !clk8m;
  initial begin #37ns; forever #100ns clk5m = !clk5m; end

  ipbus_if bus (.clk8m);

  ip8320 dut (
    .clk8m, .clk5m, .n_reset,
    .n_write(bus.n_write), .n_iosel(bus.n_iosel), .n_memsel(bus.n_memsel),
    .n_idsel(bus.n_idsel), .n_intsel(bus.n_intsel), .a(bus.a),
    .d_in(bus.d_in), .d_out(bus.d_out), .ack(bus.ack), .n_ack(bus.n_ack),
    .n_ipstrobe, .strbout, .adc_dclk, .adc_n_cs, .adc_sdata
  );

  ip8320_exerciser #(.NCH(48)) ex (
    .bus, .clk8m, .n_reset, .n_ipstrobe, .strbout, .adc_dclk, .adc_n_cs,
    .adc_sdata, .checks, .failures, .done
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
