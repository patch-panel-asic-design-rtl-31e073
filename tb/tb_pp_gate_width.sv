// tb_pp_gate_width: effective BCID gate width of the whole chip, for every
// ring length (STEP pins 0-3, N = 32, 28, 24, 20) and every BCD_GATE_CONT
// code 0-47 on both ports.
//
// For each setting, 64 hit phases spread evenly over one 25 ns crossing are
// sent, two rounds of one phase per channel. A hit is reported in one or in
// two crossings; the effective gate is 25 ns plus 25 ns times the fraction of
// phases reported twice. It must agree within 1 ns with 25 ns + lag, where the
// lag is (code x unit delay) mod 25 ns and the unit delay is read from the
// PLL. Settings whose lag lies within 0.4 ns of a whole crossing are skipped,
// since the gate edge then meets a crossing boundary. Over all settings the
// gates must span at least 26 to 49 ns.
//
// The output flip-flops are clocked by BCID_Delay, which equals CLK here
// (BCD_DLY_CONT = 0), so the outputs are sampled on the falling CLK edge and
// every high sample counts as one reported crossing.
`timescale 1ns / 1ps
module tb_pp_gate_width;
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

  localparam real RX_NS   = 5.0;  // receiver delay at the initial bias code
  localparam int  NPH     = 4 * NCH;
  localparam int  REPEATS = 4;

  int checks = 0, failures = 0, skipped = 0, tested = 0;
  int seen[2*NCH];
  real ud, w_min = 100.0, w_max = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk)
    for (int i = 0; i < NCH; i++) begin
      if (outa[i]) seen[i]++;
      if (outb[i]) seen[NCH+i]++;
    end

  task automatic spi_write(input cfg_t c);
    logic [CFG_BITS-1:0] tx = CFG_BITS'(c);
    sck = cpol;
    ss_n = 1'b0;
    #200;
    for (int i = 0; i < CFG_BITS; i++) begin
      mosi = tx[CFG_BITS-1-i];
      #100 sck = ~cpol;
      #100 sck = cpol;
    end
    #100 ss_n = 1'b1;
    #300;
  endtask

  task automatic set_in(input int ch, input bit v);
    if (ch < NCH) begin
      ina[ch] = v;
      ina_n[ch] = ~v;
    end else begin
      inb[ch-NCH] = v;
      inb_n[ch-NCH] = ~v;
    end
  endtask

  // Send a 5 ns hit whose leading edge reaches the BCID at phase ph after a
  // CLK edge, within the next 50 ns.
  task automatic hit_at_phase(input int ch, input real ph);
    real off = ph - RX_NS - 47.0 * ud;
    off = off - 25.0 * $floor(off / 25.0);
    fork
      begin
        #(25.0 + off) set_in(ch, 1'b1);
        #5 set_in(ch, 1'b0);
      end
    join_none
  endtask

  // Measure the effective gate for the current settings, in ns.
  task automatic measure(output real w);
    int doubles = 0;
    for (int r = 0; r < NPH / (2 * NCH); r++) begin
      foreach (seen[i]) seen[i] = 0;
      for (int n = 0; n < REPEATS; n++) begin
        @(posedge clk);
        for (int ch = 0; ch < 2 * NCH; ch++)
          hit_at_phase(ch, (real'(r + 2 * ch) + 0.5) * 25.0 / real'(NPH));
        #500;
      end
      foreach (seen[i]) begin
        check(seen[i] >= REPEATS && seen[i] <= 2 * REPEATS,
              $sformatf("ch %0d: %0d crossings for %0d hits", i, seen[i], REPEATS));
        if (seen[i] == 2 * REPEATS) doubles++;
      end
    end
    w = 25.0 + 25.0 * real'(doubles) / real'(NPH);
  endtask

  initial begin
    cfg_t c;
    #0.5 reset_n = 1'b0;
    #100 reset_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      step = 2'(s);
      repeat (20) @(posedge clk);
      wait (pllld);
      repeat (100) @(posedge clk);
      ud = real'(vcon_ps) / 1000.0;
      check(ud > 0.98 * 25.0 / real'(32 - 4 * s) && ud < 1.02 * 25.0 / real'(32 - 4 * s),
            $sformatf("unit delay %0.3f ns at STEP %0d", ud, s));
      for (int g = 0; g <= 47; g++) begin
        real lag, w;
        lag = real'(g) * ud;
        lag = lag - 25.0 * $floor(lag / 25.0);
        if (lag > 24.6 || (g > 0 && lag < 0.4)) begin
          skipped++;
          continue;
        end
        c = CFG_INIT;
        c.a.bcd_gate_cont = 6'(g);
        c.b.bcd_gate_cont = 6'(g);
        spi_write(c);
        measure(w);
        tested++;
        $display("STEP %0d  N %0d  gate code %2d  lag %6.2f ns  effective gate %6.2f ns",
                 s, 32 - 4 * s, g, lag, w);
        check(w > 24.0 + lag && w < 26.0 + lag,
              $sformatf("gate %0.2f ns, expected %0.2f ns", w, 25.0 + lag));
        if (w < w_min) w_min = w;
        if (w > w_max) w_max = w;
      end
    end
    $display("settings measured %0d, skipped %0d; effective gate %0.2f to %0.2f ns",
             tested, skipped, w_min, w_max);
    check(tested >= 150, "enough settings measured");
    check(w_min <= 26.0 && w_max >= 49.0, "gate range covers 26 to 49 ns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
