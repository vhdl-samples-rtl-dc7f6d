// ipbus_if: IndustryPack carrier side of the IP bus, for testbenches.
//
// Bundles the carrier signals and provides the carrier's transfer tasks.
// Timing on the 8 MHz clock: the carrier drives select, address, direction
// and data after a falling edge; the module sees the select cycle at the next
// rising edge, and the carrier releases the select after the following falling
// edge unless it inserts hold cycles. The carrier takes n_ack and the read
// data just before the rising edge that ends the acknowledge cycle.
// Address, direction and write data stay valid until that edge.
interface ipbus_if
  import ipbus_pkg::*;
(input logic clk8m);
  logic        n_write = 1'b1;
  logic        n_iosel = 1'b1, n_memsel = 1'b1, n_idsel = 1'b1, n_intsel = 1'b1;
  logic [6:1]  a = '0;
  logic [15:0] d_in = '0;
  logic [15:0] d_out;
  logic        ack, n_ack;

  // One transfer. ext is the extended memory address for memory transfers.
  // acked reports n_ack seen low at the end of the acknowledge cycle,
  // data_on reports ack (data drivers on); rdata is the bus at that time.
  task automatic xfer(input space_e sp, input bit wr, input logic [6:1] addr,
                      input logic [15:0] wdata, input logic [15:0] ext, input int holds,
                      output logic [15:0] rdata, output bit acked, output bit data_on);
    @(negedge clk8m);
    a = addr; n_write = !wr;
    d_in = (sp == MEM) ? ext : wdata;
    case (sp)
      IO:  n_iosel  = 1'b0;
      MEM: n_memsel = 1'b0;
      ID:  n_idsel  = 1'b0;
      INT: n_intsel = 1'b0;
    endcase
    repeat (holds) @(negedge clk8m);
    @(negedge clk8m);
    {n_iosel, n_memsel, n_idsel, n_intsel} = '1;
    if (wr) d_in = wdata; else d_in = '0;
    #55ns;
    acked = !n_ack; data_on = ack; rdata = d_out;
    @(negedge clk8m);
    n_write = 1'b1; d_in = '0;
  endtask
endinterface
