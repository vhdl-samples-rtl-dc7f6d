// vhdl_samples_top: three independent designs side by side.
//
//  * ip8320  - 48-channel 16-bit ADC IndustryPack module (ports ip_* and adc_*)
//  * multex2 - triple 32 x 32 unsigned multiplier (ports mx_*)
//  * gray7   - 3-bit Gray sequencer with start enable and pause (ports g7_*)
//
// They share no signals; each keeps its own clocks and resets. See each
// module for its function and timing. Putting them in one top is only a
// packaging choice of this design.
module vhdl_samples_top
  import ip8320_pkg::*;
(
  // IP8320
  input  logic              ip_clk8m,
  input  logic              ip_clk5m,
  input  logic              ip_n_reset,
  input  logic              ip_n_write,
  input  logic              ip_n_iosel,
  input  logic              ip_n_memsel,
  input  logic              ip_n_idsel,
  input  logic              ip_n_intsel,
  input  logic [6:1]        ip_a,
  input  logic [15:0]       ip_d_in,
  output logic [15:0]       ip_d_out,
  output logic              ip_ack,
  output logic              ip_n_ack,
  input  logic              ip_n_ipstrobe,
  output logic              ip_strbout,
  output logic              adc_dclk,
  output logic              adc_n_cs,
  input  logic [NUM_CH-1:0] adc_sdata,
  // triple multiplier
  input  logic [31:0]       mx_ad,
  input  logic [31:0]       mx_bd,
  input  logic [31:0]       mx_cd,
  output logic [63:0]       mx_axb,
  output logic [63:0]       mx_bxc,
  output logic [63:0]       mx_axc,
  // Gray sequencer
  input  logic              g7_clk,
  input  logic              g7_rst,
  input  logic              g7_strtena,
  input  logic              g7_pause,
  output logic [2:0]        g7_graycnt
);

  ip8320 u_ip8320 (
    .clk8m(ip_clk8m), .clk5m(ip_clk5m), .n_reset(ip_n_reset),
    .n_write(ip_n_write), .n_iosel(ip_n_iosel), .n_memsel(ip_n_memsel),
    .n_idsel(ip_n_idsel), .n_intsel(ip_n_intsel), .a(ip_a),
    .d_in(ip_d_in), .d_out(ip_d_out), .ack(ip_ack), .n_ack(ip_n_ack),
    .n_ipstrobe(ip_n_ipstrobe), .strbout(ip_strbout),
    .adc_dclk, .adc_n_cs, .adc_sdata
  );

  multex2 u_multex2 (
    .ad(mx_ad), .bd(mx_bd), .cd(mx_cd),
    .axb(mx_axb), .bxc(mx_bxc), .axc(mx_axc)
  );

  gray7 u_gray7 (
    .clk(g7_clk), .rst(g7_rst), .strtena(g7_strtena), .pause(g7_pause),
    .graycnt(g7_graycnt)
  );

endmodule
