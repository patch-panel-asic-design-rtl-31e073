// tb_pp_lvds_rx: self-checking test of the LVDS receiver model.
// Drives differential hits, checks the output level and the propagation
// delay for each bias code (shorter for larger codes), and that an input
// with both legs equal leaves the output unchanged.
`timescale 1ns / 1ps
module tb_pp_lvds_rx;
  logic inp = 1'b0, inn = 1'b1, out;
  logic [1:0] bias = 2'd2;
  int checks = 0, failures = 0;
  real dly[4];

  pp_lvds_rx dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    realtime t;
    #20;
    check(out == 1'b0, "low when INP<INN");
    for (int b = 0; b < 4; b++) begin
      bias = 2'(b);
      #20;
      t = $realtime;
      inp = 1'b1;
      inn = 1'b0;
      @(posedge out);
      dly[b] = real'($realtime - t);
      check(dly[b] > 3.0 && dly[b] < 7.5, $sformatf("delay code %0d: %0.2f ns", b, dly[b]));
      #20;
      inn = 1'b1;     // both high: no valid level, output holds
      #20;
      check(out == 1'b1, "hold on equal legs");
      inp = 1'b0;
      #20;
      check(out == 1'b0, "falls on INP<INN");
    end
    for (int b = 1; b < 4; b++) check(dly[b] < dly[b-1], "delay decreases with bias code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
