// tb_pp_port: self-checking test of one 16-channel port with a fixed unit
// delay of 893 ps (28-unit ring). Checks bypassed channels (direct,
// asynchronous, polarity-corrected), BCID outputs on the other channels
// against the window rule computed from hit time, receiver delay and the
// delay codes, masked channels, and the test pulse timing, polarity and
// driver enables. Counts single- and double-crossing hits and masked hits.
`timescale 1ns / 1ps
module tb_pp_port;
  import pp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tptrig = 1'b0;
  logic [NCH-1:0] in_p = '0, in_n = '1, pol, bypass, out;
  chan_cfg_t cfg;
  logic [1:0] rx_bias = 2'b10;
  logic [15:0] vcon_ps = 16'd893;
  logic [3:0] tpg_drv = 4'd3;
  logic [1:0] tpg_bias_cont = 2'b01;
  logic tpg_bias_enb = 1'b0;
  logic tpulse, tpulse_n, tpg_en_ref;
  logic [14:0] tpg_en;
  logic [1:0] tpg_rv;

  pp_port dut (.*);

  always #12.5 clk = ~clk;

  localparam real RX_NS = 5.0;
  int checks = 0, failures = 0, n_single = 0, n_double = 0, n_masked = 0, n_bypass = 0;
  real ud, d_ns, lag;
  real hit_t[NCH][$];
  realtime t_clk;
  bit on = 1'b0;
  always @(posedge clk) t_clk = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit in_window(int ch, real dj);
    foreach (hit_t[ch][i])
      if (hit_t[ch][i] > dj - 25.0 && hit_t[ch][i] <= dj + lag) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    if (on) begin
      automatic realtime te = $realtime;
      fork
        begin
          #(d_ns + 1.0);
          for (int ch = 0; ch < NCH; ch++) begin
            if (bypass[ch]) continue;
            check(out[ch] == (cfg.dl_mask[ch] && in_window(ch, real'(te) + d_ns - 25.0)),
                  $sformatf("BCID ch %0d at %0t", ch, $realtime));
          end
        end
      join_none
    end
  end

  // Reset is asserted by an edge so that every asynchronous reset sees it.
  initial #0.5 rst_n = 1'b0;

  initial begin
    realtime t0;
    cfg = CHAN_INIT;
    cfg.dl_mask = 16'hFDFF;
    cfg.dl_dly_cont = 6'd20;
    cfg.bcd_dly_cont = 6'd30;
    cfg.bcd_gate_cont = 6'd8;     // gate before delay: lag wraps
    cfg.tpg_dly_cont_c = 3'd5;
    cfg.tpg_dly_cont_f = 6'd7;
    cfg.tpg_pw_cont = 12'd12;
    pol = 16'h3C0F;
    bypass = 16'h8001;
    ud = 0.893;
    d_ns = 30.0 * ud;
    lag = 8.0 * ud - d_ns;
    lag = lag - 25.0 * $floor(lag / 25.0);
    for (int ch = 0; ch < NCH; ch++) begin
      in_p[ch] = pol[ch];
      in_n[ch] = ~pol[ch];
    end
    #60 rst_n = 1'b1;
    repeat (4) @(posedge clk);
    on = 1'b1;
    for (int n = 0; n < 400; n++) begin
      automatic int ch = $urandom_range(0, NCH - 1);
      automatic real th, ph;
      #(real'($urandom_range(2000, 9000)) / 1000.0);
      th = real'($realtime) + RX_NS + 20.0 * ud;
      ph = th - (real'(t_clk) + d_ns);
      ph = ph - 25.0 * $floor(ph / 25.0);
      if (ph < 0.5 || ph > 24.5 || (ph > lag - 0.5 && ph < lag + 0.5)) continue;
      if (hit_t[ch].size() > 0 && th - hit_t[ch][hit_t[ch].size()-1] < 150.0) continue;
      if (!bypass[ch]) begin
        hit_t[ch].push_back(th);
        if (!cfg.dl_mask[ch]) n_masked++;
        else if (ph < lag) n_double++;
        else n_single++;
      end
      fork
        automatic int c2 = ch;
        begin
          in_p[c2] = ~pol[c2];
          in_n[c2] = pol[c2];
          #4;
          in_p[c2] = pol[c2];
          in_n[c2] = ~pol[c2];
        end
      join_none
      if (bypass[ch]) begin
        #(RX_NS - 0.2);
        check(!out[ch], "bypass not before receiver delay");
        #0.4;
        check(out[ch], "bypass hit");
        n_bypass++;
      end
    end
    #200;
    on = 1'b0;
    // test pulse
    @(posedge clk);
    #3 tptrig = 1'b1;
    @(posedge clk);
    t0 = $realtime;
    #3 tptrig = 1'b0;
    @(posedge tpulse);
    check($realtime - t0 > 6 * 25.0 + 7.0 * ud - 0.01 && $realtime - t0 < 6 * 25.0 + 7.0 * ud + 0.01,
          $sformatf("test pulse delay %0.3f", $realtime - t0));
    t0 = $realtime;
    check(!tpulse_n && tpg_en == 15'h0007 && tpg_en_ref && tpg_rv == 2'b01, "driver controls");
    @(negedge tpulse);
    check($realtime - t0 > 12 * 25.0 - 0.01 && $realtime - t0 < 12 * 25.0 + 0.01, "test pulse width");
    check(n_single > 0 && n_double > 0 && n_masked > 0 && n_bypass > 0,
          $sformatf("coverage single %0d double %0d masked %0d bypass %0d", n_single, n_double, n_masked, n_bypass));
    $display("single %0d double %0d masked %0d bypass %0d", n_single, n_double, n_masked, n_bypass);
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
