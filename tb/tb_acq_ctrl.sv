// tb_acq_ctrl: self-checking testbench for the acquisition controller.
//
// Runs the closed sequencer from a 5 MHz clock and follows it edge by edge
// on DCLK: the state must walk the 23-entry table, shftena must be high for
// exactly 16 DCLK periods and regena for one per acquisition, and n_cs must
// rise only in the regena state. The acquisition period must be 23 DCLK
// periods: 9.2 us at 2.5 MHz and 36.8 us with slowclkena. Dropping strtena
// must stop DCLK, return the state to 00 and raise n_cs; raising it again
// must restart from 00.
module tb_acq_ctrl;
  import ip8320_pkg::*;

  logic clk5m = 1'b0, n_reset = 1'b1, strtena = 1'b1, slowclkena = 1'b0;
  logic dclk, n_cs, shftena, regena;
  acq_state_e state;
  int checks = 0, failures = 0;

  localparam logic [4:0] SEQ [23] = '{5'h00, 5'h01, 5'h03, 5'h02, 5'h06, 5'h07,
    5'h05, 5'h04, 5'h0C, 5'h0D, 5'h0F, 5'h0E, 5'h0A, 5'h0B, 5'h09, 5'h08,
    5'h18, 5'h19, 5'h1B, 5'h13, 5'h17, 5'h15, 5'h11};

  acq_ctrl dut (.*);

  always #100ns clk5m = !clk5m;

  function automatic bit near(input realtime x, input realtime y);
    return (x - y < 1ns) && (y - x < 1ns);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Follow one full acquisition, from the DCLK edge that leaves state 00 to
  // the return to 00; dur is the time since the previous call's start edge.
  realtime last_start = 0;

  task automatic follow_sequence(output realtime dur);
    int nshift, nreg;
    realtime t0;
    nshift = 0; nreg = 0;
    do begin @(posedge dclk); t0 = $realtime; #1ns; end while (state != S01);
    dur = t0 - last_start;
    last_start = t0;
    for (int i = 1; i <= 23; i++) begin
      check(state == SEQ[i % 23], $sformatf("step %0d state %h", i, state));
      check(n_cs == (state == S13), $sformatf("n_cs in %h", state));
      if (shftena) nshift++;
      if (regena) nreg++;
      if (i < 23) begin @(posedge dclk); #1ns; end
    end
    check(nshift == 16, $sformatf("shift states %0d", nshift));
    check(nreg == 1, "one regena per acquisition");
  endtask

  initial begin
    realtime dur;
    #5ns n_reset = 1'b0;
    #500ns;
    check(state == S00 && !dclk, "reset state");
    n_reset = 1'b1;
    follow_sequence(dur);
    follow_sequence(dur);
    check(near(dur, 9200ns), $sformatf("fast acquisition period %0t", dur));
    slowclkena = 1'b1;
    follow_sequence(dur);
    follow_sequence(dur);
    check(near(dur, 36800ns), $sformatf("slow acquisition period %0t", dur));
    slowclkena = 1'b0;
    follow_sequence(dur);
    // stop in the middle of a sequence
    wait (state == S0F);
    #50ns strtena = 1'b0;
    #1ns check(state == S00 && n_cs && !dclk, "stop clears the state");
    #3us check(state == S00 && n_cs && !dclk, "stays stopped");
    strtena = 1'b1;
    #1ns check(!n_cs, "n_cs low on restart");
    follow_sequence(dur);
    follow_sequence(dur);
    check(near(dur, 9200ns), $sformatf("period after restart %0t", dur));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk5m);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
