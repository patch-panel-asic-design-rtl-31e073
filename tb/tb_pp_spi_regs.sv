// tb_pp_spi_regs: self-checking test of the SPI slave and voted registers.
// Checks the initial values after reset, writes random frames in all four
// SPI modes and compares the configuration with the frame, checks that MISO
// returns the previous contents MSB first, that a 223-bit frame is dropped,
// that an upset in one register copy is outvoted and flagged on SEU, and that
// the SPI reset restores the initial values.
`timescale 1ns / 1ps
module tb_pp_spi_regs;
  import pp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, rspi_n = 1'b1;
  logic sck = 1'b0, mosi = 1'b0, ss_n = 1'b1, cpol = 1'b0, cpha = 1'b0;
  logic miso, miso_oe, seu;
  cfg_t cfg;
  int checks = 0, failures = 0;

  pp_spi_regs dut (.*);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Shift nbits of tx (MSB first) and collect what MISO returns.
  task automatic spi_frame(input logic [CFG_BITS-1:0] tx, input int nbits,
                           output logic [CFG_BITS-1:0] rx);
    rx = '0;
    sck = cpol;
    ss_n = 1'b0;
    #200;
    for (int i = 0; i < nbits; i++) begin
      if (!cpha) begin
        mosi = tx[CFG_BITS-1-i];
        #100;
        rx[CFG_BITS-1-i] = miso;
        sck = ~cpol;
        #100;
        sck = cpol;
      end else begin
        sck = ~cpol;
        mosi = tx[CFG_BITS-1-i];
        #100;
        rx[CFG_BITS-1-i] = miso;
        sck = cpol;
        #100;
      end
    end
    #100;
    ss_n = 1'b1;
    #300;
  endtask

  function automatic logic [CFG_BITS-1:0] rand_cfg();
    logic [CFG_BITS-1:0] v;
    for (int i = 0; i < CFG_BITS; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  logic [CFG_BITS-1:0] prev, tx, rx;
  cfg_t hold;

  // Reset is asserted by an edge so that every asynchronous reset sees it.
  initial #0.5 rst_n = 1'b0;

  initial begin
    #100 rst_n = 1'b1;
    #100;
    check(cfg == CFG_INIT, "initial values");
    check(cfg.pll.dly_cont == 5'b11111 && cfg.com.rx_bias_cont == 2'b10, "initial PLL/RX codes");
    check(!seu, "no SEU after reset");
    prev = CFG_INIT;
    for (int m = 0; m < 8; m++) begin
      {cpol, cpha} = 2'(m);
      #200;
      tx = rand_cfg();
      spi_frame(tx, CFG_BITS, rx);
      check(cfg == cfg_t'(tx), $sformatf("write mode %0d", m % 4));
      check(rx == prev, $sformatf("readback mode %0d", m % 4));
      prev = tx;
    end
    // A first bit of the frame ends up in Channel B bit 95.
    tx = '0;
    tx[CFG_BITS-1] = 1'b1;
    spi_frame(tx, CFG_BITS, rx);
    check(cfg.b.bcd_gate_cont == 6'b100000 && cfg.com == '0, "bit order");
    prev = tx;
    // Short frame is ignored.
    spi_frame(rand_cfg(), CFG_BITS - 1, rx);
    check(cfg == cfg_t'(prev), "223-bit frame dropped");
    // Upset in one copy.
    hold = dut.r1;
    hold.com.nc[2] = ~hold.com.nc[2];
    hold.a.dl_mask[7] = ~hold.a.dl_mask[7];
    force dut.r1 = hold;
    repeat (3) @(posedge clk);
    #1;
    check(cfg == cfg_t'(prev), "voted value survives upset");
    check(seu, "SEU flagged");
    release dut.r1;
    repeat (3) @(posedge clk);
    #1;
    check(dut.r1 == cfg_t'(prev), "upset copy repaired");
    check(seu, "SEU stays set");
    tx = rand_cfg();
    spi_frame(tx, CFG_BITS, rx);
    check(!seu && cfg == cfg_t'(tx), "write clears SEU");
    rspi_n = 1'b0;
    #50 rspi_n = 1'b1;
    #50;
    check(cfg == CFG_INIT, "SPI reset");
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
