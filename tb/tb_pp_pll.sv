// tb_pp_pll: self-checking test of the PLL model.
// For each ring length (32, 28, 24, 20 units) checks that the loop locks
// within 400 reference cycles, that the unit delay then equals 25 ns / N
// within 1 % and that the ring period is 50 ns (20 MHz). Also checks that LOCK falls when the
// ring length changes and that CP_ON = 0 freezes the control value.
`timescale 1ns / 1ps
module tb_pp_pll;
  logic ref_clk = 1'b0, rst_n = 1'b0, cp_on = 1'b1;
  logic [1:0] step = 2'd0, cp_cont = 2'b01;
  logic [15:0] vcon_ps;
  logic lock, vcro_clk;
  int checks = 0, failures = 0;

  pp_pll dut (.*);

  always #12.5 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  realtime tv[$];
  always @(posedge vcro_clk) begin
    tv.push_back($realtime);
    if (tv.size() > 4) void'(tv.pop_front());
  end

  task automatic lock_and_check(input int s);
    int n, cyc;
    real exp_ud, per;
    n = 32 - 4 * s;
    exp_ud = 25000.0 / real'(n);
    cyc = 0;
    while (!lock && cyc < 400) begin
      @(posedge ref_clk);
      cyc++;
    end
    check(lock, $sformatf("lock at N=%0d after %0d cycles", n, cyc));
    repeat (40) @(posedge ref_clk);
    check(real'(vcon_ps) > exp_ud * 0.99 && real'(vcon_ps) < exp_ud * 1.01,
          $sformatf("unit delay N=%0d: %0d ps, expected %0.1f", n, vcon_ps, exp_ud));
    per = real'(tv[3] - tv[2]);
    check(per > 49.5 && per < 50.5, $sformatf("ring period N=%0d: %0.3f ns", n, per));
    check(lock, $sformatf("stays locked N=%0d", n));
  endtask

  // Reset is asserted by an edge so that every asynchronous reset sees it.
  initial #0.5 rst_n = 1'b0;

  initial begin
    #30 rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      step = 2'(s);
      #1;
      if (s > 0) begin
        repeat (4) @(posedge ref_clk);
        check(!lock, $sformatf("lock lost after step change to %0d", s));
      end
      lock_and_check(s);
    end
    // Charge pump off: V_CON floats, value held.
    begin
      automatic logic [15:0] v0;
      cp_on = 1'b0;
      v0 = vcon_ps;
      step = 2'd1;
      repeat (100) @(posedge ref_clk);
      check(vcon_ps == v0, "CP off holds V_CON");
      check(!lock, "no lock with CP off and wrong ring length");
      cp_on = 1'b1;
      lock_and_check(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge ref_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
