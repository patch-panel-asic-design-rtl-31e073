// tb_pp_tpg: self-checking test of the test pulse sequencer.
// For every coarse delay 0..7, both trigger edges and several widths, checks
// the clock at which the pulse rises and its length in clocks against the
// timing rule, and that a second trigger during a pulse is ignored.
`timescale 1ns / 1ps
module tb_pp_tpg;
  import pp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, tptrig = 1'b0, pol_in = 1'b0;
  logic [2:0] dly_c = '0;
  logic [PW_BITS-1:0] pw = 12'd400;
  logic pulse;
  int checks = 0, failures = 0;
  int cyc = 0;

  pp_tpg dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic shot(input bit pin, input int c, input int w, input bit retrig);
    int n, rise, fall, expw;
    pol_in = pin;
    dly_c = 3'(c);
    pw = PW_BITS'(w);
    @(posedge clk);
    #3;
    // For a falling-edge trigger, raise TPTRIG just after a rising edge;
    // it is taken at the falling edge and seen at the next rising edge.
    tptrig = 1'b1;
    @(posedge clk);
    #1;
    n = cyc;            // edge at which the trigger is first seen high
    #2 tptrig = 1'b0;
    rise = -1;
    fall = -1;
    expw = (w == 0) ? 4096 : w;
    for (int i = 0; i < expw + 20; i++) begin
      @(posedge clk);
      #1;
      if (pulse && rise < 0) rise = cyc;
      if (!pulse && rise >= 0 && fall < 0) fall = cyc;
      if (retrig && i == 12) begin
        tptrig = 1'b1;
        @(posedge clk);
        #1;
        tptrig = 1'b0;
        if (!pulse && rise >= 0 && fall < 0) fall = cyc;
      end
    end
    check(rise == n + 1 + c, $sformatf("rise pol=%0b c=%0d: %0d vs %0d", pin, c, rise - n, 1 + c));
    check(fall - rise == expw, $sformatf("width pol=%0b w=%0d: %0d", pin, w, fall - rise));
    repeat (12) @(posedge clk);
  endtask

  // Reset is asserted by an edge so that every asynchronous reset sees it.
  initial #0.5 rst_n = 1'b0;

  initial begin
    #60 rst_n = 1'b1;
    for (int c = 0; c <= 7; c++) shot(1'b0, c, 5 + c, 1'b0);
    for (int c = 0; c <= 7; c++) shot(1'b1, c, 3, 1'b0);
    shot(1'b0, 7, 400, 1'b0);  // initial settings: 7 clocks, 10 us
    shot(1'b0, 2, 30, 1'b1);   // trigger during pulse ignored
    shot(1'b0, 0, 1, 1'b0);    // shortest pulse, 25 ns
    shot(1'b0, 0, 0, 1'b0);    // code 0 wraps to 4096 clocks
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
