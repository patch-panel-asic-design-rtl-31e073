// tb_pp_asic_top: end-to-end test of the whole chip at its default sizes.
//
// Sequence: reset and PLL lock with the STEP pins (32 units); SPI read-back
// of the initial register values; bypass mode from the BYPASS/POL pins on all
// 32 channels; an SPI frame that moves polarity and bypass to the registers,
// sets per-channel polarity, bypass and mask bits, the channel, BCID_Delay and
// BCID_Gate delays and the test pulse settings; random hits on all channels,
// each BCID output compared with the window rule computed from the hit time,
// the receiver delay and the delay codes; test pulses on both ports (coarse
// and fine delay, width, polarity, falling-edge trigger, driver enables);
// the DELIN/DELOUT delay; a switch to a 20-unit ring from the register with
// relock; an upset in one register copy. Each mechanism is counted and one
// that never happened counts as a failure.
`timescale 1ns / 1ps
module tb_pp_asic_top;
  import pp_pkg::*;

  logic [NCH-1:0] ina = '0, ina_n = '1, inb = '0, inb_n = '1;
  logic [NCH-1:0] outa, outb;
  logic tpulsea, tpulsea_n, tpulseb, tpulseb_n;
  logic delin = 1'b0, delout;
  logic pol = 1'b0, bypass = 1'b1, clk = 1'b0, tptrig = 1'b0, reset_n = 1'b1;
  logic seu, pllld;
  logic [1:0] step = 2'd0;
  logic [15:0] vcon_ps;
  logic mosi = 1'b0, ss_n = 1'b1, sck = 1'b0, miso, miso_oe;
  logic cpol = 1'b0, cpha = 1'b0, rspi_n = 1'b1;
  logic [14:0] tpga_en, tpgb_en;
  logic tpga_en_ref, tpgb_en_ref;
  logic [1:0] tpga_rv, tpgb_rv, cmos_out_cont;

  pp_asic_top dut (.*);

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam real RX_NS = 5.0;   // receiver delay at bias code 2

  // mechanism counters
  int n_lock = 0, n_readback = 0, n_bypass = 0, n_polinv = 0, n_single = 0,
      n_double = 0, n_masked = 0, n_tpg = 0, n_tpg_fall = 0, n_tpg_neg = 0,
      n_delout = 0, n_relock = 0, n_seu = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- SPI
  task automatic spi_frame(input logic [CFG_BITS-1:0] tx, output logic [CFG_BITS-1:0] rx);
    rx = '0;
    sck = cpol;
    ss_n = 1'b0;
    #200;
    for (int i = 0; i < CFG_BITS; i++) begin
      mosi = tx[CFG_BITS-1-i];
      #100;
      rx[CFG_BITS-1-i] = miso;
      sck = ~cpol;
      #100;
      sck = cpol;
    end
    #100;
    ss_n = 1'b1;
    #300;
  endtask

  // ---------------------------------------------------------------- hits
  task automatic set_in(input int ch, input bit v);
    if (ch < NCH) begin
      ina[ch] = v;
      ina_n[ch] = ~v;
    end else begin
      inb[ch-NCH] = v;
      inb_n[ch-NCH] = ~v;
    end
  endtask

  function automatic bit out_of(int ch);
    return (ch < NCH) ? outa[ch] : outb[ch-NCH];
  endfunction

  realtime t_clk;            // last rising CLK edge
  always @(posedge clk) t_clk = $realtime;

  // ---------------------------------------------------------------- BCID check state
  cfg_t     c;               // configuration written over SPI
  real      ud;              // unit delay, ns
  real      d_ns, g_ns, lag; // BCID_Delay / BCID_Gate delay, gate lag
  real      hit_t[2*NCH][$]; // hit times at the BCID input
  bit       bcid_on = 1'b0;

  function automatic bit in_window(int ch, real dj);
    foreach (hit_t[ch][i])
      if (hit_t[ch][i] > dj - 25.0 && hit_t[ch][i] <= dj + lag) return 1'b1;
    return 1'b0;
  endfunction

  // At each BCID_Delay edge (CLK edge + d_ns) the outputs show the crossing
  // whose boundary lay 25 ns earlier.
  always @(posedge clk) begin
    if (bcid_on) begin
      automatic realtime te = $realtime;
      fork
        begin
          #(d_ns + 1.0);
          for (int ch = 0; ch < 2 * NCH; ch++) begin
            automatic chan_cfg_t cc = (ch < NCH) ? c.a : c.b;
            automatic int i = ch % NCH;
            automatic bit e;
            if (cc.dl_bypass[i]) continue;
            e = cc.dl_mask[i] && in_window(ch, real'(te) + d_ns - 25.0);
            checks++;
            if (out_of(ch) !== e) begin
              failures++;
              $display("FAIL BCID ch %0d at %0t: out %0b expected %0b", ch, $realtime, out_of(ch), e);
            end
          end
        end
      join_none
    end
  end

  // one hit on channel ch, 'w' ns wide, at the current time
  task automatic hit(input int ch, input real w);
    automatic chan_cfg_t cc = (ch < NCH) ? c.a : c.b;
    automatic int i = ch % NCH;
    automatic bit inv = cc.dl_pol[i];
    fork
      begin
        set_in(ch, ~inv);   // leading edge of the hit in board polarity
        #(w);
        set_in(ch, inv);
      end
    join_none
  endtask

  // ---------------------------------------------------------------- main
  logic [CFG_BITS-1:0] rx;
  // Reset is asserted by an edge so that every asynchronous reset sees it.
  initial #0.5 reset_n = 1'b0;

  initial begin
    realtime t0;
    #100 reset_n = 1'b1;

    // PLL lock, 32 units
    wait (pllld);
    n_lock++;
    repeat (50) @(posedge clk);
    check(vcon_ps > 16'd772 && vcon_ps < 16'd790, $sformatf("unit delay %0d ps at 32 units", vcon_ps));
    ud = real'(vcon_ps) / 1000.0;

    // Read back the initial values
    spi_frame(CFG_INIT, rx);
    check(rx == CFG_INIT, "read back of the initial values");
    n_readback++;
    check(cmos_out_cont == 2'b01 && !seu, "initial CMOS drive code, no SEU");

    // Bypass from the pins, both polarities, all 32 channels
    for (int p = 0; p < 2; p++) begin
      pol = p[0];
      for (int ch = 0; ch < 2 * NCH; ch++) set_in(ch, pol);   // idle
      #20;
      for (int ch = 0; ch < 2 * NCH; ch++) begin
        t0 = $realtime;
        set_in(ch, ~pol);       // hit in board polarity
        #(RX_NS - 0.2);
        check(out_of(ch) == 1'b0, "bypass output not before receiver delay");
        #0.4;
        check(out_of(ch) == 1'b1, $sformatf("bypass hit ch %0d pol %0d", ch, p));
        set_in(ch, pol);
        #10;
        check(out_of(ch) == 1'b0, "bypass hit ends");
        n_bypass++;
        if (p == 1) n_polinv++;
      end
    end
    pol = 1'b0;

    // Configuration for BCID and test pulses
    c = CFG_INIT;
    c.com.dl_pol_sel    = 1'b0;
    c.com.dl_bypass_sel = 1'b0;
    c.com.tpg_drv_cont_a = 4'd5;
    c.com.tpg_drv_cont_b = 4'd15;
    c.com.tpg_bias_cont  = 2'b10;
    c.a.dl_pol    = 16'hA5C3;
    c.b.dl_pol    = 16'h0F0F;
    c.a.dl_bypass = 16'h0001;
    c.b.dl_bypass = 16'h0000;
    c.a.dl_mask   = 16'hFF7F;
    c.b.dl_mask   = 16'hBFFF;
    c.a.dl_dly_cont   = 6'd10;
    c.b.dl_dly_cont   = 6'd40;
    c.a.bcd_dly_cont  = 6'd5;  c.a.bcd_gate_cont = 6'd17;
    c.b.bcd_dly_cont  = 6'd5;  c.b.bcd_gate_cont = 6'd17;
    c.a.tpg_dly_cont_c = 3'd3; c.a.tpg_dly_cont_f = 6'd10; c.a.tpg_pw_cont = 12'd20;
    c.b.tpg_dly_cont_c = 3'd0; c.b.tpg_dly_cont_f = 6'd0;  c.b.tpg_pw_cont = 12'd8;
    c.b.tpg_pol_in = 1'b1;     c.b.tpg_pol_out = 1'b1;
    c.a.test_pol = 1'b1;       c.a.test_dly_cont = 6'd20;
    for (int ch = 0; ch < 2 * NCH; ch++) begin
      automatic chan_cfg_t cc = (ch < NCH) ? c.a : c.b;
      set_in(ch, cc.dl_pol[ch % NCH]);   // idle level
    end
    spi_frame(c, rx);
    check(rx == CFG_INIT, "read back before overwrite");
    check(dut.u_spi.cfg == c, "configuration written");
    n_polinv++;

    // BCID: both ports use the same clock delays; lag = gate - delay
    d_ns = 5.0 * ud;
    g_ns = 17.0 * ud;
    lag  = g_ns - d_ns;
    repeat (4) @(posedge clk);
    bcid_on = 1'b1;
    for (int n = 0; n < 600; n++) begin
      automatic int ch = $urandom_range(0, 2 * NCH - 1);
      automatic chan_cfg_t cc = (ch < NCH) ? c.a : c.b;
      automatic int i = ch % NCH;
      automatic real th, ph, delay_ns;
      #(real'($urandom_range(2000, 9000)) / 1000.0);
      delay_ns = RX_NS + real'(cc.dl_dly_cont) * ud;
      th = real'($realtime) + delay_ns;
      // phase against the BCID_Delay edges; keep clear of D and G edges
      ph = th - (real'(t_clk) + d_ns);
      ph = ph - 25.0 * $floor(ph / 25.0);
      if (ph < 0.5 || ph > 24.5 || (ph > lag - 0.5 && ph < lag + 0.5)) continue;
      // one hit per channel per 150 ns
      if (hit_t[ch].size() > 0 && th - hit_t[ch][hit_t[ch].size()-1] < 150.0) continue;
      if (cc.dl_bypass[i]) begin
        hit(ch, 4.0);
        #(RX_NS + 0.3);
        check(out_of(ch) == 1'b1, "bypassed channel in BCID mode");
        n_bypass++;
        continue;
      end
      hit_t[ch].push_back(th);
      hit(ch, 4.0);
      if (!cc.dl_mask[i]) n_masked++;
      else if (ph < lag) n_double++;
      else n_single++;
    end
    #200;
    bcid_on = 1'b0;
    #100;

    // Test pulses: A coarse 3, fine 10, width 20, positive, 5 sources;
    // B falling-edge trigger, no delays, width 8, negative, 15 sources.
    @(posedge clk);
    #3 tptrig = 1'b1;
    @(posedge clk);
    t0 = $realtime;     // trigger seen at this edge
    #3 tptrig = 1'b0;
    fork
      begin : pa
        realtime tr, tf;
        @(posedge tpulsea);
        tr = $realtime;
        @(negedge tpulsea);
        tf = $realtime;
        check(tr - t0 > (1 + 3) * 25.0 + 10.0 * ud - 0.1 && tr - t0 < (1 + 3) * 25.0 + 10.0 * ud + 0.1,
              $sformatf("TPG A delay %0.2f ns", tr - t0));
        check(tf - tr > 20 * 25.0 - 0.1 && tf - tr < 20 * 25.0 + 0.1, "TPG A width");
        n_tpg++;
      end
      begin : pb
        realtime tr, tf;
        @(negedge tpulseb);
        tr = $realtime;
        @(posedge tpulseb);
        tf = $realtime;
        check(tr - t0 > 24.9 && tr - t0 < 25.1, $sformatf("TPG B delay %0.2f ns", tr - t0));
        check(tf - tr > 8 * 25.0 - 0.1 && tf - tr < 8 * 25.0 + 0.1, "TPG B width");
        n_tpg++;
        n_tpg_fall++;
        n_tpg_neg++;
      end
    join
    check(tpga_en == 15'h001F && tpgb_en == 15'h7FFF && tpga_en_ref && tpga_rv == 2'b10,
          "driver enables");
    check(tpulsea_n == ~tpulsea && tpulseb_n == ~tpulseb, "differential outputs");

    // DELIN -> DELOUT, inverted, 20 units
    #50;
    check(delout == 1'b1, "DELOUT idle inverted");
    t0 = $realtime;
    delin = 1'b1;
    @(negedge delout);
    check($realtime - t0 > 20.0 * ud - 0.01 && $realtime - t0 < 20.0 * ud + 0.01,
          $sformatf("DELOUT delay %0.3f ns", $realtime - t0));
    n_delout++;
    delin = 1'b0;

    // Ring length from the register: 10011 = 20 units
    c.com.pll_dly_sel = 1'b0;
    c.pll.dly_cont = 5'b10011;
    spi_frame(c, rx);
    repeat (3) @(posedge clk);
    check(!pllld, "lock lost on ring change");
    wait (pllld);
    repeat (50) @(posedge clk);
    check(vcon_ps > 16'd1237 && vcon_ps < 16'd1263, $sformatf("unit delay %0d ps at 20 units", vcon_ps));
    n_relock++;

    // Upset in one register copy
    begin
      automatic cfg_t u = dut.u_spi.r2;
      u.a.dl_mask = ~u.a.dl_mask;
      force dut.u_spi.r2 = u;
      repeat (2) @(posedge clk);
      #1;
      check(seu && dut.u_spi.cfg == c, "SEU flagged, configuration kept");
      release dut.u_spi.r2;
      repeat (2) @(posedge clk);
      #1;
      check(dut.u_spi.r2 == c, "copy repaired");
      n_seu++;
    end

    $display("mechanisms: lock %0d readback %0d bypass %0d pol-inv %0d bcid-1 %0d bcid-2 %0d masked %0d",
             n_lock, n_readback, n_bypass, n_polinv, n_single, n_double, n_masked);
    $display("            tpg %0d tpg-falling %0d tpg-negative %0d delout %0d relock %0d seu %0d",
             n_tpg, n_tpg_fall, n_tpg_neg, n_delout, n_relock, n_seu);
    check(n_lock > 0 && n_readback > 0 && n_bypass > 0 && n_polinv > 0, "mechanisms 1");
    check(n_single > 0 && n_double > 0 && n_masked > 0, "BCID mechanisms");
    check(n_tpg > 0 && n_tpg_fall > 0 && n_tpg_neg > 0 && n_delout > 0 && n_relock > 0 && n_seu > 0,
          "mechanisms 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
