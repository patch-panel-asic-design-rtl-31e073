// tb_pp_pfd: self-checking test of the phase frequency detector.
// Drives a 20 MHz reference and a VCRO clock of the same period at phase
// offsets from -20 ns to +20 ns, and measures how long UPB and DN stay high in
// each period; the active one must last the phase offset, the other one zero.
// Also checks the complement outputs and a frequency difference.
`timescale 1ns / 1ps
module tb_pp_pfd;
  logic ref_clk = 1'b0, vcro_clk = 1'b0, rst_n = 1'b1;
  logic up, upb, dn, dnb;
  int checks = 0, failures = 0;

  pp_pfd dut (.*);

  realtime t_up, t_dn, w_up, w_dn;
  always @(posedge upb) t_up = $realtime;
  always @(negedge upb) w_up = $realtime - t_up;
  always @(posedge dn)  t_dn = $realtime;
  always @(negedge dn)  w_dn = $realtime - t_dn;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One 50 ns period with the VCRO edge 'off' ns after the reference edge.
  task automatic period(input real off);
    w_up = 0.0;
    w_dn = 0.0;
    fork
      begin
        if (off < 0.0) #(-off);
        ref_clk = 1'b1;
        #25 ref_clk = 1'b0;
      end
      begin
        if (off > 0.0) #(off);
        vcro_clk = 1'b1;
        #25 vcro_clk = 1'b0;
      end
    join
    #24;
    check(up == !upb && dnb == !dn, "complements");
    check(!upb && !dn, "both cleared");
    if (off > 0.0)
      check(w_up > off - 0.01 && w_up < off + 0.01 && w_dn < 0.01,
            $sformatf("ref leads %0.1f: up %0.2f dn %0.2f", off, w_up, w_dn));
    else if (off < 0.0)
      check(w_dn > -off - 0.01 && w_dn < -off + 0.01 && w_up < 0.01,
            $sformatf("vcro leads %0.1f: up %0.2f dn %0.2f", -off, w_up, w_dn));
  endtask

  // Reset is asserted by an edge so that every asynchronous reset sees it.
  initial #0.5 rst_n = 1'b0;

  initial begin
    #10 rst_n = 1'b1;
    #10;
    for (int i = -20; i <= 20; i += 3) period(real'(i));
    // VCRO at half the frequency: only UP pulses on the extra reference edge.
    ref_clk = 1'b1;
    #5 ref_clk = 1'b0;
    #20;
    check(upb && !dn, "extra reference edge holds UPB");
    vcro_clk = 1'b1;
    #1;
    check(!upb && !dn, "VCRO edge clears");
    vcro_clk = 1'b0;
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
