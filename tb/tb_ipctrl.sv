// tb_ipctrl: self-checking testbench for the IndustryPack transfer controller.
//
// A carrier model runs transfers on an 8 MHz clock: inputs change on the
// falling edge, outputs are sampled 30 ns after it. A transfer is one select
// cycle, optional hold cycles (select kept low), then the acknowledge cycle;
// address, direction and data stay valid until the acknowledge cycle ends.
// Checked against the access rules of the module: which transfers are
// acknowledged with and without ackallena, that n_ack comes in the cycle right
// after the select (no wait states) and lasts through hold cycles, which get
// data drivers (ack), regclr over the address map, hihalf, idsel, single
// registration of control writes during hold cycles, control bit reset values,
// strbout and the strtena start/stop rule.
module tb_ipctrl;
  import ip8320_pkg::*;

  logic clk8m = 1'b0, n_reset = 1'b1;
  logic n_write = 1'b1, n_iosel = 1'b1, n_memsel = 1'b1, n_idsel = 1'b1, n_intsel = 1'b1;
  logic [6:1] a = '0;
  logic [3:0] d = '0;
  logic regena = 1'b0, memzero = 1'b0, n_ipstrobe = 1'b1;
  ctrl_bits_t ctrl;
  logic hihalf, idsel, regclr, strbout, strtena, ack, n_ack;
  int checks = 0, failures = 0;

  typedef enum {IO, MEM, ID, INT} space_e;

  ipctrl dut (.*);

  always #62.5ns clk8m = !clk8m;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Result of one transfer, as seen by the carrier.
  typedef struct {
    int  nack_first;  // cycles after the select edge until n_ack seen low (-1 never)
    int  nack_cycles; // cycles n_ack was low
    int  ack_cycles;  // cycles ack was high
    bit  rc_sel, rc_post; // regclr in select cycle / acknowledge cycle
    bit  id_sel, id_post; // idsel in select cycle / acknowledge cycle
    bit  hh;              // hihalf during select
  } xfer_t;

  task automatic xfer(input space_e sp, input bit wr, input logic [6:1] addr,
                      input logic [3:0] dat, input bit mz, input int holds,
                      output xfer_t r, input logic [3:0] hold_dat = 4'h0);
    r = '{default: 0};
    r.nack_first = -1;
    @(negedge clk8m);
    a = addr; d = dat; n_write = !wr; memzero = mz;
    case (sp)
      IO:  n_iosel  = 1'b0;
      MEM: n_memsel = 1'b0;
      ID:  n_idsel  = 1'b0;
      INT: n_intsel = 1'b0;
    endcase
    #30ns;
    r.rc_sel = regclr; r.id_sel = idsel; r.hh = hihalf;
    for (int c = 1; c <= holds + 4; c++) begin
      @(negedge clk8m);
      if (c == 2) d = hold_dat;         // data changes during hold cycles
      if (c == holds + 1) begin
        {n_iosel, n_memsel, n_idsel, n_intsel} = '1;
        memzero = 1'b0;
      end
      #30ns;
      if (!n_ack) begin
        r.nack_cycles++;
        if (r.nack_first < 0) r.nack_first = c;
      end
      if (ack) r.ack_cycles++;
      if (c == holds + 1) begin r.rc_post = regclr; r.id_post = idsel; end
    end
    n_write = 1'b1;
  endtask

  xfer_t r;
  localparam logic [6:1] HH_ADDR [5] = '{6'h00, 6'h17, 6'h18, 6'h2F, 6'h3F};
  localparam logic [6:1] UNUSED_ADDR [3] = '{6'h30, 6'h35, 6'h3E};

  // Check an acknowledged zero-wait transfer.
  task automatic expect_acked(input xfer_t r, input int holds, input bit data, input string what);
    check(r.nack_first == 1, {what, ": n_ack in the cycle after select"});
    check(r.nack_cycles == holds + 1, {what, ": n_ack length"});
    check(r.ack_cycles == (data ? holds + 1 : 0), {what, ": ack (data drivers)"});
  endtask

  task automatic expect_ignored(input xfer_t r, input string what);
    check(r.nack_cycles == 0 && r.ack_cycles == 0, {what, ": not acknowledged"});
  endtask

  initial begin
    #5ns n_reset = 1'b0;
    #200ns;
    check(ctrl == '0 && strtena && n_ack && !ack && regclr, "reset values");
    @(negedge clk8m) n_reset = 1'b1;
    #30ns check(!regclr, "regclr released");

    // hihalf boundary at 18h
    foreach (HH_ADDR[i]) begin
      logic [6:1] ad;
      ad = HH_ADDR[i];
      xfer(IO, 0, ad, 0, 0, 0, r);
      expect_acked(r, 0, 1, "I/O read");
      check(r.hh == (ad >= 6'h18), $sformatf("hihalf at %h", ad));
      check(!r.rc_sel && !r.rc_post, $sformatf("no regclr at I/O %h", ad));
    end
    // unused I/O locations 30h..3Eh clear the read register
    foreach (UNUSED_ADDR[i]) begin
      xfer(IO, 0, UNUSED_ADDR[i], 0, 0, 0, r);
      expect_acked(r, 0, 1, "unused I/O read");
      check(r.rc_sel && r.rc_post, "regclr on unused I/O location");
    end
    // I/O read with hold cycles
    xfer(IO, 0, 6'h04, 0, 0, 3, r);
    expect_acked(r, 3, 1, "I/O read, 3 holds");

    // control register write: ackallena + ctrlinena
    xfer(IO, 1, CTRL_ADDR, 4'b0101, 0, 0, r);
    expect_acked(r, 0, 0, "I/O write");
    check(ctrl == 4'b0101, "control write 0101");
    // write to another I/O location leaves it alone
    xfer(IO, 1, 6'h3E, 4'b1010, 0, 0, r);
    check(ctrl == 4'b0101, "write elsewhere ignored");
    // write with hold cycles and changing data: only the first value registers
    xfer(IO, 1, CTRL_ADDR, 4'b1010, 0, 3, r, 4'b0110);
    expect_acked(r, 3, 0, "I/O write, 3 holds");
    check(ctrl == 4'b1010, "single registration during holds");
    xfer(IO, 1, CTRL_ADDR, 4'b0000, 0, 0, r);
    check(ctrl == 4'b0000, "control write 0000");

    // memory space
    xfer(MEM, 0, 6'h10, 0, 0, 0, r);
    expect_acked(r, 0, 1, "memory read");
    check(!r.rc_sel && !r.rc_post, "no regclr on memory 10h");
    xfer(MEM, 0, 6'h35, 0, 0, 0, r);
    expect_acked(r, 0, 1, "memory read 35h");
    check(r.rc_sel && r.rc_post, "regclr on memory 35h");
    xfer(MEM, 0, 6'h10, 0, 1, 0, r);
    expect_ignored(r, "memory read, extended address");
    check(r.rc_sel, "regclr with extended address");
    xfer(MEM, 1, 6'h10, 0, 0, 0, r);
    expect_ignored(r, "memory write");
    // ID space
    xfer(ID, 0, 6'h03, 0, 0, 0, r);
    expect_acked(r, 0, 1, "ID read");
    check(r.id_sel && r.id_post, "idsel during ID read");
    xfer(ID, 0, 6'h03, 0, 0, 2, r);
    expect_acked(r, 2, 1, "ID read, 2 holds");
    xfer(ID, 1, 6'h03, 0, 0, 0, r);
    expect_ignored(r, "ID write");
    check(!r.id_sel, "no idsel on ID write");
    xfer(IO, 0, 6'h03, 0, 0, 0, r);
    check(!r.id_sel && !r.id_post, "no idsel on I/O read");
    // interrupt vector
    xfer(INT, 0, 6'h00, 0, 0, 0, r);
    expect_ignored(r, "interrupt vector read");

    // acknowledge-all mode
    xfer(IO, 1, CTRL_ADDR, 4'b0001, 0, 0, r);
    check(ctrl.ackallena, "ackallena set");
    xfer(INT, 0, 6'h00, 0, 0, 0, r);
    expect_acked(r, 0, 0, "ackall: interrupt vector");
    xfer(MEM, 1, 6'h10, 0, 0, 0, r);
    expect_acked(r, 0, 0, "ackall: memory write");
    xfer(MEM, 0, 6'h10, 0, 1, 0, r);
    expect_acked(r, 0, 0, "ackall: extended memory read");
    xfer(ID, 1, 6'h01, 0, 0, 1, r);
    expect_acked(r, 1, 0, "ackall: ID write, 1 hold");
    xfer(MEM, 0, 6'h02, 0, 0, 0, r);
    expect_acked(r, 0, 1, "ackall: memory read");

    // strbout: regena gated by statoutena
    @(negedge clk8m) regena = 1'b1; #30ns;
    check(!strbout, "strbout off without statoutena");
    regena = 1'b0;
    xfer(IO, 1, CTRL_ADDR, 4'b0010, 0, 0, r);
    @(negedge clk8m) regena = 1'b1; #30ns;
    check(strbout, "strbout with statoutena");
    regena = 1'b0; #1ns;
    check(!strbout, "strbout follows regena");

    // strtena: external low on n_ipstrobe ignored unless ctrlinena
    @(negedge clk8m) n_ipstrobe = 1'b0;
    repeat (2) @(negedge clk8m);
    check(strtena, "strtena stays without ctrlinena");
    n_ipstrobe = 1'b1;
    xfer(IO, 1, CTRL_ADDR, 4'b0110, 0, 0, r);   // ctrlinena + statoutena
    @(negedge clk8m) n_ipstrobe = 1'b0;
    @(negedge clk8m) check(!strtena, "external low stops conversions");
    n_ipstrobe = 1'b1;
    @(negedge clk8m) check(strtena, "release restarts conversions");
    // own strobe pulse does not stop conversions
    regena = 1'b1; #30ns;
    check(strbout, "own strobe pulse");
    n_ipstrobe = 1'b0;
    repeat (2) @(negedge clk8m);
    check(strtena, "own strobe does not stop");
    regena = 1'b0; n_ipstrobe = 1'b1;

    // reset clears the control register
    xfer(IO, 1, CTRL_ADDR, 4'b1111, 0, 0, r);
    check(ctrl == 4'b1111, "control write 1111");
    @(negedge clk8m) n_reset = 1'b0;
    #1ns check(ctrl == '0 && strtena && regclr, "asynchronous reset");
    @(negedge clk8m) n_reset = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk8m);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
