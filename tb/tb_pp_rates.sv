// tb_pp_rates: the chip at the input rates it is specified for, with the
// register values it has after reset (bypass and polarity from the pins,
// all channels unmasked, channel delay 47 units, both BCID clock delays 0,
// so every hit belongs to exactly one crossing).
//   1. 10 MHz periodic hits on all 32 channels, BCID mode: every channel must
//      give exactly one output clock per hit.
//   2. The same in bypass mode: one output pulse per hit.
//   3. 0.2 MHz random hits (the expected rate at the design luminosity) on all
//      32 channels in BCID mode for 250 us: one output clock per hit.
// Hits are kept at least 1 ns away from the BCID clock edges.
`timescale 1ns / 1ps
module tb_pp_rates;
  import pp_pkg::*;

  logic [NCH-1:0] ina = '0, ina_n = '1, inb = '0, inb_n = '1;
  logic [NCH-1:0] outa, outb;
  logic tpulsea, tpulsea_n, tpulseb, tpulseb_n;
  logic delin = 1'b0, delout;
  logic pol = 1'b0, bypass = 1'b0, clk = 1'b0, tptrig = 1'b0, reset_n = 1'b1;
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

  localparam real RX_NS = 5.0;   // receiver delay at the initial bias code
  int checks = 0, failures = 0;
  int sent[2*NCH], seen[2*NCH];
  real ud;
  realtime t_clk;
  always @(posedge clk) t_clk = $realtime;

  // Count output pulses per channel.
  for (genvar i = 0; i < NCH; i++) begin : g_cnt
    always @(posedge outa[i]) seen[i]++;
    always @(posedge outb[i]) seen[NCH+i]++;
  end

  task automatic pulse_in(input int ch);
    fork
      begin
        if (ch < NCH) begin ina[ch] = 1'b1; ina_n[ch] = 1'b0; end
        else begin inb[ch-NCH] = 1'b1; inb_n[ch-NCH] = 1'b0; end
        #5;
        if (ch < NCH) begin ina[ch] = 1'b0; ina_n[ch] = 1'b1; end
        else begin inb[ch-NCH] = 1'b0; inb_n[ch-NCH] = 1'b1; end
      end
    join_none
  endtask

  // Phase of a hit at the BCID against the BCID_Delay edges (= CLK edges).
  function automatic real bcid_phase(real t);
    real ph = t + RX_NS + 47.0 * ud - real'(t_clk);
    return ph - 25.0 * $floor(ph / 25.0);
  endfunction

  task automatic clear_counts();
    foreach (sent[i]) begin
      sent[i] = 0;
      seen[i] = 0;
    end
  endtask

  task automatic compare(input string what);
    foreach (sent[i]) begin
      checks++;
      if (seen[i] != sent[i]) begin
        failures++;
        $display("FAIL %s ch %0d: %0d outputs for %0d hits", what, i, seen[i], sent[i]);
      end
    end
  endtask

  task automatic periodic(input int nhits);
    // each channel gets its own phase within the 100 ns period
    for (int n = 0; n < nhits; n++) begin
      for (int ch = 0; ch < 2 * NCH; ch++) begin
        automatic real ph;
        #(100.0 / real'(2 * NCH));
        ph = bcid_phase(real'($realtime));
        if (ph < 1.0 || ph > 24.0) continue;
        pulse_in(ch);
        sent[ch]++;
      end
    end
    #200;
  endtask

  initial begin
    #0.5 reset_n = 1'b0;
    #100 reset_n = 1'b1;
    wait (pllld);
    repeat (50) @(posedge clk);
    ud = real'(vcon_ps) / 1000.0;

    // 1. 10 MHz, BCID
    clear_counts();
    periodic(100);
    compare("10 MHz BCID");
    // 2. 10 MHz, bypass
    bypass = 1'b1;
    #100;
    clear_counts();
    periodic(100);
    compare("10 MHz bypass");
    bypass = 1'b0;
    #100;
    // 3. 0.2 MHz random per channel, BCID, 250 us
    clear_counts();
    begin
      automatic real t_next[2*NCH];
      automatic real t_end = real'($realtime) + 250000.0;
      foreach (t_next[i]) t_next[i] = real'($realtime) + real'($urandom_range(0, 10000));
      while (real'($realtime) < t_end) begin
        #1;
        foreach (t_next[i]) begin
          if (real'($realtime) >= t_next[i]) begin
            automatic real ph = bcid_phase(real'($realtime));
            // exponential gaps with a 5 us mean, at least 200 ns
            t_next[i] = real'($realtime) + 200.0
                        - 4800.0 * $ln(real'($urandom_range(1, 1000000)) / 1000000.0);
            if (ph < 1.0 || ph > 24.0) continue;
            pulse_in(i);
            sent[i]++;
          end
        end
      end
    end
    #200;
    compare("0.2 MHz BCID");
    begin
      automatic int total = 0;
      foreach (sent[i]) total += sent[i];
      $display("random hits sent: %0d over 32 channels in 250 us", total);
      checks++;
      if (total < 1000) begin
        failures++;
        $display("FAIL too few random hits");
      end
    end
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
