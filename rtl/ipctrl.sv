// ipctrl: IndustryPack bus transfer control of the IP8320 ADC module.
//
// Watches the four active-low selects of the IP carrier (I/O, memory, ID,
// interrupt vector) on the 8 MHz carrier clock and answers every legal
// transfer with a one-cycle acknowledge and no wait states. A select seen at a
// rising edge of clk8m sets a "transfer in progress" flag and drives n_ack low
// (and, for reads, ack high to enable the data bus drivers) for the following
// cycle. Both stay asserted through carrier hold cycles, i.e. for as long as a
// select stays low, and drop at the first edge where n_ack is low and all
// selects are high.
//
// Legal transfers: memory reads with a zero extended address (memzero = 0),
// I/O reads and writes, ID reads. With the ackallena control bit set every
// select is acknowledged, including interrupt-vector cycles and writes to
// memory or ID space; ack (data drivers) is still only given to legal reads.
//
// Control register, I/O location a[6..1] = 3Fh, bits d[3..0] = slowclkena,
// ctrlinena, statoutena, ackallena; all reset to 0. It is written at the end of
// the acknowledge cycle of an I/O write. When the carrier inserts hold cycles
// the register is written once only, on the first hold cycle, and further
// writes are blocked until the transfer terminates (wrtblk).
//
// Data path controls (combinational from the bus and the transfer flags):
//   hihalf : a[6..1] >= 18h, selects the upper group of 24 channels.
//   idsel  : an ID read is in its select or acknowledge cycles.
//   regclr : clears the data path's resynchronisation register so that unused
//            locations read as zero (reset; memory reads with a non-zero
//            extended address; memory or I/O reads of 30h..3Fh except the I/O
//            control location).
// Conversion start/stop:
//   strbout : regena AND statoutena; enables the external open-drain driver
//             that pulls n_ipstrobe low while new results are registered.
//   strtena : starts high after reset; with ctrlinena set it follows the
//             n_ipstrobe pin on clk8m and drops when the pin is held low by
//             someone other than this module.
//
// The equations follow the published model of this controller. Two terms of
// regclr are this design's reading where that model is inconsistent: for a
// memory post-select cycle the register is cleared when the extended address
// was non-zero OR a6 = a5 = 1 (the model's comment), where its equation
// repeats the first term. Memory reads of 3Fh read the control bits through
// the data path's own multiplexer.
module ipctrl
  import ip8320_pkg::*;
(
  input  logic       clk8m,      // IP carrier clock, 8 MHz
  input  logic       n_reset,    // IP reset, active low, asynchronous
  input  logic       n_write,    // 0 = write transfer
  input  logic       n_iosel,    // I/O select
  input  logic       n_memsel,   // memory select
  input  logic       n_idsel,    // ID select
  input  logic       n_intsel,   // interrupt vector select
  input  logic [6:1] a,          // carrier address a[6..1]
  input  logic [3:0] d,          // carrier data d[3..0] (control register writes)
  input  logic       regena,     // from the sequencer: new results being registered
  input  logic       memzero,    // 1 = extended memory address on d[15..0] is not zero
  input  logic       n_ipstrobe, // state of the n_ipstrobe pin
  output ctrl_bits_t ctrl,       // control register
  output logic       hihalf,     // address in upper 24-channel group
  output logic       idsel,      // ID read in progress: mux ID data onto the bus
  output logic       regclr,     // synchronous clear of the read register
  output logic       strbout,    // enable the open-drain n_ipstrobe driver
  output logic       strtena,    // conversions enabled
  output logic       ack,        // enable the data bus drivers (reads)
  output logic       n_ack       // acknowledge to the carrier, active low
);

  logic memtrans, iotrans, idtrans, regmemz, wrtblk;

  // Decoded select cycles: exactly one select low.
  logic mem_cyc, io_cyc, id_cyc, any_sel, none_sel, ctrl_loc, top16, ctrl_wr;
  assign mem_cyc  = !n_memsel &&  n_iosel &&  n_intsel &&  n_idsel;
  assign io_cyc   =  n_memsel && !n_iosel &&  n_intsel &&  n_idsel;
  assign id_cyc   =  n_memsel &&  n_iosel &&  n_intsel && !n_idsel;
  assign any_sel  = !n_memsel || !n_iosel || !n_intsel || !n_idsel;
  assign none_sel = !any_sel;
  assign ctrl_loc = (a == CTRL_ADDR);
  assign top16    = a[6] && a[5];
  // Control register write: acknowledge cycle of an I/O write, first time only.
  assign ctrl_wr  = iotrans && !n_write && !n_ack && ctrl_loc && !wrtblk;

  assign hihalf = a[6] || (a[5] && a[4]);

  assign regclr = !n_reset
               || (mem_cyc && memzero)
               || (mem_cyc && !memzero && top16)
               || (memtrans && (regmemz || top16))
               || (io_cyc && top16 && !ctrl_loc)
               || (iotrans && top16 && !ctrl_loc);

  assign idsel = (id_cyc && n_write) || (idtrans && n_write);

  assign strbout = regena && ctrl.statoutena;

  always_ff @(posedge clk8m or negedge n_reset) begin
    if (!n_reset) begin
      memtrans <= 1'b0;
      iotrans  <= 1'b0;
      idtrans  <= 1'b0;
      regmemz  <= 1'b0;
      wrtblk   <= 1'b0;
    end else begin
      // Transfer flags: set at the end of a select cycle, cleared at the end
      // of the acknowledge cycle (after any hold cycles).
      if (mem_cyc && n_write && !memzero)  memtrans <= 1'b1;
      else if (!n_ack && none_sel)         memtrans <= 1'b0;

      if (io_cyc)                          iotrans <= 1'b1;
      else if (!n_ack && none_sel)         iotrans <= 1'b0;

      if (id_cyc && n_write)               idtrans <= 1'b1;
      else if (!n_ack && none_sel)         idtrans <= 1'b0;

      // Remember a non-zero extended memory address past the select cycle.
      if (mem_cyc && memzero && !memtrans) regmemz <= 1'b1;
      else if (!n_ack && none_sel)         regmemz <= 1'b0;

      // Block repeated control writes during carrier hold cycles.
      if (iotrans && !n_write && !wrtblk && !n_iosel) wrtblk <= 1'b1;
      else if (wrtblk && !n_ack && n_iosel)           wrtblk <= 1'b0;
    end
  end

  always_ff @(posedge clk8m or negedge n_reset) begin
    if (!n_reset)     ctrl <= '0;
    else if (ctrl_wr) ctrl <= ctrl_bits_t'(d);
  end

  always_ff @(posedge clk8m or negedge n_reset) begin
    if (!n_reset) strtena <= 1'b1;
    else if (!ctrl.ctrlinena || n_ipstrobe) strtena <= 1'b1;
    else if (!strbout)                      strtena <= 1'b0;
  end

  always_ff @(posedge clk8m or negedge n_reset) begin
    if (!n_reset) begin
      n_ack <= 1'b1;
      ack   <= 1'b0;
    end else begin
      if ((!ctrl.ackallena && ((mem_cyc && n_write && !memzero) || io_cyc ||
                               (id_cyc && n_write))) ||
          (ctrl.ackallena && any_sel))
        n_ack <= 1'b0;
      else if (!n_ack && none_sel)
        n_ack <= 1'b1;

      if ((mem_cyc && n_write && !memzero) || (io_cyc && n_write) ||
          (id_cyc && n_write))
        ack <= 1'b1;
      else if (ack && none_sel)
        ack <= 1'b0;
    end
  end

  // The data drivers are only ever enabled together with the acknowledge.
  a_ack_with_nack: assert property (@(posedge clk8m) disable iff (!n_reset)
                                    ack |-> !n_ack);

endmodule
