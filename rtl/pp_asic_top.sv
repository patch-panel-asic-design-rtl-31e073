// pp_asic_top: the Patch-Panel ASIC.
//
// The chip sits between two 16-channel ASD (amplifier-shaper-discriminator)
// boards and the trigger electronics. For each of its 32 channels it receives
// the discriminator output over LVDS, corrects the polarity (wire or strip
// boards), delays it in steps of about 1 ns to cancel time-of-flight and cable
// differences, and assigns the hit to one or two 25 ns bunch crossings of the
// 40 MHz clock (BCID). It also sends a programmable test pulse to each ASD
// board on a trigger.
//
// Blocks: two ports (pp_port, A and B), a PLL (pp_pll) that sets the delay of
// every delay unit to 25 ns / N through the common control V_CON, a test delay
// line from DELIN to DELOUT, and an SPI register file (pp_spi_regs) with
// voted registers and an SEU flag.
//
// Pin-or-register selection, as in the register map: with DL_POL_SEL = 1
// the POL pin sets the polarity of all 32 channels and of DELIN, otherwise the
// per-channel DL_POL bits (and TEST_POL) do; with DL_BYPASS_SEL = 1 the BYPASS
// pin sets bypass for all channels, otherwise the DL_BYPASS bits; with
// PLL_DLY_SEL = 1 the STEP pins set the ring length, otherwise bits [3:2] of
// PLL_DLY_CONT (11111 = 32, 11011 = 28, 10111 = 24, 10011 = 20 units).
// The DELIN/DELOUT line uses the TEST_POL and TEST_DLY_CONT fields of Channel
// A; the Channel B copies are stored and read back but drive nothing (a choice
// of this design: the chip has one DELIN/DELOUT pair).
// Analog outputs are brought out as logic: the test pulse driver controls
// (current-source enables, bias code), the CMOS drive strength code, and V_CON
// as the unit delay in ps. MISO_OE marks when MISO is driven.
`timescale 1ns / 1ps
module pp_asic_top
  import pp_pkg::*;
(
  // Port A and B: LVDS inputs, hit outputs, test pulse outputs
  input  logic [NCH-1:0] ina,
  input  logic [NCH-1:0] ina_n,
  input  logic [NCH-1:0] inb,
  input  logic [NCH-1:0] inb_n,
  output logic [NCH-1:0] outa,
  output logic [NCH-1:0] outb,
  output logic           tpulsea,
  output logic           tpulsea_n,
  output logic           tpulseb,
  output logic           tpulseb_n,
  // Common
  input  logic           delin,
  output logic           delout,
  input  logic           pol,
  input  logic           bypass,
  input  logic           clk,
  input  logic           tptrig,
  output logic           seu,
  input  logic           reset_n,
  // PLL
  output logic           pllld,
  input  logic [1:0]     step,
  output logic [15:0]    vcon_ps,
  // SPI
  input  logic           mosi,
  input  logic           ss_n,
  input  logic           sck,
  output logic           miso,
  output logic           miso_oe,
  input  logic           cpol,
  input  logic           cpha,
  input  logic           rspi_n,
  // Controls of the analog output stages
  output logic [14:0]    tpga_en,
  output logic           tpga_en_ref,
  output logic [1:0]     tpga_rv,
  output logic [14:0]    tpgb_en,
  output logic           tpgb_en_ref,
  output logic [1:0]     tpgb_rv,
  output logic [1:0]     cmos_out_cont
);

  cfg_t cfg;

  pp_spi_regs u_spi (
    .clk    (clk),
    .rst_n  (reset_n),
    .rspi_n (rspi_n),
    .sck    (sck),
    .mosi   (mosi),
    .ss_n   (ss_n),
    .cpol   (cpol),
    .cpha   (cpha),
    .miso   (miso),
    .miso_oe(miso_oe),
    .cfg    (cfg),
    .seu    (seu)
  );

  // Pin or register selection
  logic [NCH-1:0] pol_a, pol_b, byp_a, byp_b;
  logic [1:0]     step_eff;
  logic           test_pol;

  assign pol_a    = cfg.com.dl_pol_sel    ? {NCH{pol}}    : cfg.a.dl_pol;
  assign pol_b    = cfg.com.dl_pol_sel    ? {NCH{pol}}    : cfg.b.dl_pol;
  assign byp_a    = cfg.com.dl_bypass_sel ? {NCH{bypass}} : cfg.a.dl_bypass;
  assign byp_b    = cfg.com.dl_bypass_sel ? {NCH{bypass}} : cfg.b.dl_bypass;
  assign test_pol = cfg.com.dl_pol_sel    ? pol           : cfg.a.test_pol;
  assign step_eff = cfg.com.pll_dly_sel   ? step : step_from_code(cfg.pll.dly_cont);
  assign cmos_out_cont = cfg.com.cmos_out_cont;

  logic vcro_clk;

  pp_pll u_pll (
    .ref_clk (clk),
    .rst_n   (reset_n),
    .step    (step_eff),
    .cp_on   (cfg.pll.cp_on),
    .cp_cont (cfg.pll.cp_cont),
    .vcon_ps (vcon_ps),
    .lock    (pllld),
    .vcro_clk(vcro_clk)
  );

  pp_port u_port_a (
    .clk          (clk),
    .rst_n        (reset_n),
    .in_p         (ina),
    .in_n         (ina_n),
    .pol          (pol_a),
    .bypass       (byp_a),
    .cfg          (cfg.a),
    .rx_bias      (cfg.com.rx_bias_cont),
    .vcon_ps      (vcon_ps),
    .tptrig       (tptrig),
    .tpg_drv      (cfg.com.tpg_drv_cont_a),
    .tpg_bias_cont(cfg.com.tpg_bias_cont),
    .tpg_bias_enb (cfg.com.tpg_bias_enb),
    .out          (outa),
    .tpulse       (tpulsea),
    .tpulse_n     (tpulsea_n),
    .tpg_en       (tpga_en),
    .tpg_en_ref   (tpga_en_ref),
    .tpg_rv       (tpga_rv)
  );

  pp_port u_port_b (
    .clk          (clk),
    .rst_n        (reset_n),
    .in_p         (inb),
    .in_n         (inb_n),
    .pol          (pol_b),
    .bypass       (byp_b),
    .cfg          (cfg.b),
    .rx_bias      (cfg.com.rx_bias_cont),
    .vcon_ps      (vcon_ps),
    .tptrig       (tptrig),
    .tpg_drv      (cfg.com.tpg_drv_cont_b),
    .tpg_bias_cont(cfg.com.tpg_bias_cont),
    .tpg_bias_enb (cfg.com.tpg_bias_enb),
    .out          (outb),
    .tpulse       (tpulseb),
    .tpulse_n     (tpulseb_n),
    .tpg_en       (tpgb_en),
    .tpg_en_ref   (tpgb_en_ref),
    .tpg_rv       (tpgb_rv)
  );

  // Test delay line DELIN -> DELOUT
  pp_vdelay u_test_dly (
    .in     (delin ^ test_pol),
    .sel    (cfg.a.test_dly_cont),
    .vcon_ps(vcon_ps),
    .out    (delout)
  );

endmodule
