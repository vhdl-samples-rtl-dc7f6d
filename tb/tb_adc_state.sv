// tb_adc_state: self-checking testbench for the sequencer logic and DCLK
// generator.
//
// Next-state logic: all 32 state codes are applied with strtena low and high
// and the result is compared with the 23-entry sequence table (00 waits for
// strtena, 11h and unused codes go to 00). shftena, regena and n_cs are
// compared with the state lists of the description. DCLK: with a 5 MHz input
// the period must be 400 ns (2.5 MHz), or 1600 ns (625 kHz) with slowclkena,
// and DCLK must stay low in reset and while strtena is low.
module tb_adc_state;
  import ip8320_pkg::*;

  logic clk5m = 1'b0, n_reset = 1'b1, strtena = 1'b0, slowclkena = 1'b0;
  acq_state_e current, nextd;
  logic dclk, n_cs, shftena, regena;
  int checks = 0, failures = 0;

  localparam logic [4:0] SEQ [23] = '{5'h00, 5'h01, 5'h03, 5'h02, 5'h06, 5'h07,
    5'h05, 5'h04, 5'h0C, 5'h0D, 5'h0F, 5'h0E, 5'h0A, 5'h0B, 5'h09, 5'h08,
    5'h18, 5'h19, 5'h1B, 5'h13, 5'h17, 5'h15, 5'h11};

  adc_state dut (.*);

  always #100ns clk5m = !clk5m;

  function automatic bit near(input realtime x, input realtime y);
    return (x - y < 1ns) && (y - x < 1ns);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Measure DCLK rising edges over a window of clk5m cycles.
  int      n_edges;
  realtime t_first, t_last;
  bit      counting = 1'b0;

  always @(posedge dclk)
    if (counting) begin
      if (n_edges == 0) t_first = $realtime;
      t_last = $realtime;
      n_edges++;
    end

  task automatic count_dclk(input int cycles, output int edges, output realtime period);
    n_edges = 0;
    counting = 1'b1;
    repeat (cycles) @(posedge clk5m);
    counting = 1'b0;
    edges = n_edges;
    period = (edges > 1) ? (t_last - t_first) / (edges - 1) : 0;
  endtask

  initial begin
    int edges;
    realtime period;
    // combinational table
    for (int s = 0; s < 32; s++) begin
      for (int st = 0; st < 2; st++) begin
        int pos;
        logic [4:0] exp_next;
        bit exp_shift;
        current = acq_state_e'(s); strtena = st[0]; #1ns;
        pos = -1;
        foreach (SEQ[i]) if (SEQ[i] == 5'(s)) pos = i;
        if (pos < 0)       exp_next = 5'h00;
        else if (pos == 0) exp_next = (st != 0) ? 5'h01 : 5'h00;
        else               exp_next = SEQ[(pos + 1) % 23];
        exp_shift = (pos < 0) || (pos >= 3 && pos <= 18);
        check(nextd == exp_next, $sformatf("next of %h (strtena=%0d) = %h", s, st, nextd));
        check(shftena == exp_shift, $sformatf("shftena in %h", s));
        check(regena == (s == 5'h13), $sformatf("regena in %h", s));
        check(n_cs == (s == 5'h13 || st == 0), $sformatf("n_cs in %h", s));
      end
    end
    // DCLK
    n_reset = 1'b0;
    strtena = 1'b1;
    count_dclk(40, edges, period);
    check(edges == 0, "no DCLK in reset");
    n_reset = 1'b1;
    count_dclk(80, edges, period);
    check(edges >= 39 && edges <= 41, $sformatf("fast DCLK edges %0d", edges));
    check(near(period, 400ns), $sformatf("fast DCLK period %0t", period));
    slowclkena = 1'b1;
    repeat (16) @(posedge clk5m);
    count_dclk(160, edges, period);
    check(edges >= 19 && edges <= 21, $sformatf("slow DCLK edges %0d", edges));
    check(near(period, 1600ns), $sformatf("slow DCLK period %0t", period));
    strtena = 1'b0;
    count_dclk(80, edges, period);
    check(edges == 0 && dclk == 1'b0, "DCLK stopped without strtena");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk5m);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
