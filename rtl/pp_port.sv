// pp_port: one 16-channel port of the Patch-Panel ASIC (Channel A or B),
// serving one ASD board.
//
// Hit path of each channel:
//   LVDS receiver -> polarity (POL bit: 1 inverts, for strip boards)
//     BYPASS = 1: the level goes straight to OUT, asynchronously;
//     BYPASS = 0: variable delay (DL_DLY_CONT, common to the 16 channels)
//                 -> BCID (mask bit, 0 = masked) -> OUT, one clock per
//                 identified bunch crossing.
// The two BCID clocks are the 40 MHz CLK delayed by two more variable delays,
// BCD_DLY_CONT (BCID_Delay, crossing boundaries) and BCD_GATE_CONT
// (BCID_Gate, gate extension); see pp_bcid for the window rule.
// Test pulse path: pp_tpg (trigger edge, coarse delay, width) -> variable
// delay TPG_DLY_CONT_F (fine delay) -> pp_tpg_out (polarity, driver enables).
// All variable delays take the unit delay VCON_PS from the PLL.
// POL and BYPASS arrive already selected between the pins and the registers.
// RST_N clears the BCID and test pulse logic.
//
// The structure follows the published block diagram and pin description. The
// order of polarity correction before the delay is this design's reading.
`timescale 1ns / 1ps
module pp_port
  import pp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] in_p,
  input  logic [NCH-1:0] in_n,
  input  logic [NCH-1:0] pol,
  input  logic [NCH-1:0] bypass,
  input  chan_cfg_t      cfg,
  input  logic [1:0]     rx_bias,
  input  logic [15:0]    vcon_ps,
  input  logic           tptrig,
  input  logic [3:0]     tpg_drv,
  input  logic [1:0]     tpg_bias_cont,
  input  logic           tpg_bias_enb,
  output logic [NCH-1:0] out,
  output logic           tpulse,
  output logic           tpulse_n,
  output logic [14:0]    tpg_en,
  output logic           tpg_en_ref,
  output logic [1:0]     tpg_rv
);

  logic bcid_delay, bcid_gate;

  pp_vdelay u_dly_clk (.in(clk), .sel(cfg.bcd_dly_cont),  .vcon_ps(vcon_ps), .out(bcid_delay));
  pp_vdelay u_gate_clk(.in(clk), .sel(cfg.bcd_gate_cont), .vcon_ps(vcon_ps), .out(bcid_gate));

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    logic rx, hit, hit_d, bc;

    pp_lvds_rx u_rx (.inp(in_p[i]), .inn(in_n[i]), .bias(rx_bias), .out(rx));
    assign hit = rx ^ pol[i];

    pp_vdelay u_dl (.in(hit), .sel(cfg.dl_dly_cont), .vcon_ps(vcon_ps), .out(hit_d));

    pp_bcid u_bcid (
      .asd_in    (hit_d),
      .mask      (cfg.dl_mask[i]),
      .bcid_delay(bcid_delay),
      .bcid_gate (bcid_gate),
      .rn        (rst_n),
      .bcid_out  (bc)
    );

    assign out[i] = bypass[i] ? hit : bc;
  end

  logic pulse, pulse_d;

  pp_tpg u_tpg (
    .clk   (clk),
    .rst_n (rst_n),
    .tptrig(tptrig),
    .pol_in(cfg.tpg_pol_in),
    .dly_c (cfg.tpg_dly_cont_c),
    .pw    (cfg.tpg_pw_cont),
    .pulse (pulse)
  );

  pp_vdelay u_tpg_fine (.in(pulse), .sel(cfg.tpg_dly_cont_f), .vcon_ps(vcon_ps), .out(pulse_d));

  pp_tpg_out u_tpg_out (
    .pulse    (pulse_d),
    .pol_out  (cfg.tpg_pol_out),
    .drv      (tpg_drv),
    .bias_cont(tpg_bias_cont),
    .bias_enb (tpg_bias_enb),
    .tpulse   (tpulse),
    .tpulse_n (tpulse_n),
    .en       (tpg_en),
    .en_ref   (tpg_en_ref),
    .rv       (tpg_rv)
  );

endmodule
