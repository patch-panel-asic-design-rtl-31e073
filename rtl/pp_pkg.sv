// pp_pkg: register map and shared constants of the Patch-Panel ASIC.
//
// The configuration is one 224-bit word loaded over SPI. It is made of four
// parts, each a packed struct whose first field is its most significant bit:
//   Channel B (96 bits) | Channel A (96 bits) | PLL (8 bits) | Common (24 bits)
// Frames are shifted in MSB first, so the first bit of a frame lands in bit 95
// of Channel B and the last one in bit 0 of Common. Field positions, widths and
// initial values follow the published register tables; the NC field of the
// Common part is a reserved 6-bit field kept as storage.
`timescale 1ns / 1ps
package pp_pkg;

  localparam int unsigned NCH        = 16;   // channels per ASD board / port
  localparam int unsigned PW_BITS    = 12;   // test pulse width code
  localparam int unsigned COARSE_MAX = 7;    // coarse delay 0..7 clocks

  // One 16-channel port (Channel A or Channel B), 96 bits.
  typedef struct packed {
    logic [5:0]     bcd_gate_cont;   // <95:90> BCID_Gate delay code
    logic [5:0]     bcd_dly_cont;    // <89:84> BCID_Delay delay code
    logic [11:0]    tpg_pw_cont;     // <83:72> test pulse width in clocks
    logic [5:0]     tpg_dly_cont_f;  // <71:66> test pulse fine delay code
    logic [2:0]     tpg_dly_cont_c;  // <65:63> test pulse coarse delay, clocks
    logic           tpg_pol_out;     // <62>    0 positive, 1 negative pulse
    logic           tpg_pol_in;      // <61>    0 rising, 1 falling CLK edge
    logic [5:0]     test_dly_cont;   // <60:55> DELIN/DELOUT delay code
    logic           test_pol;        // <54>    DELIN polarity, 1 inverted
    logic [5:0]     dl_dly_cont;     // <53:48> channel delay code
    logic [NCH-1:0] dl_mask;         // <47:32> 0 masked, 1 not masked
    logic [NCH-1:0] dl_bypass;       // <31:16> 1 bypass delay and BCID
    logic [NCH-1:0] dl_pol;          // <15:0>  1 inverted
  } chan_cfg_t;

  // PLL, 8 bits.
  typedef struct packed {
    logic       cp_on;     // <7>   charge pump enable
    logic [1:0] cp_cont;   // <6:5> charge pump bias
    logic [4:0] dly_cont;  // <4:0> ring length: 11111=32 11011=28 10111=24 10011=20
  } pll_cfg_t;

  // Common, 24 bits.
  typedef struct packed {
    logic [5:0] nc;             // <23:18> reserved
    logic [1:0] cmos_out_cont;  // <17:16> CMOS output drivability
    logic [1:0] rx_bias_cont;   // <15:14> LVDS receiver bias
    logic       tpg_bias_enb;   // <13>    1 disables the TPG bias
    logic [1:0] tpg_bias_cont;  // <12:11> TPG bias current
    logic [3:0] tpg_drv_cont_b; // <10:7>  TPG B current sources, 0 = off
    logic [3:0] tpg_drv_cont_a; // <6:3>   TPG A current sources, 0 = off
    logic       dl_bypass_sel;  // <2>     1 BYPASS pin, 0 register
    logic       dl_pol_sel;     // <1>     1 POL pin, 0 register
    logic       pll_dly_sel;    // <0>     1 STEP pins, 0 register
  } com_cfg_t;

  typedef struct packed {
    chan_cfg_t b;
    chan_cfg_t a;
    pll_cfg_t  pll;
    com_cfg_t  com;
  } cfg_t;

  localparam int unsigned CFG_BITS = $bits(cfg_t);  // 224

  localparam chan_cfg_t CHAN_INIT = '{
    bcd_gate_cont:  6'b000000,
    bcd_dly_cont:   6'b000000,
    tpg_pw_cont:    12'b000110010000,  // 400 clocks = 10 us
    tpg_dly_cont_f: 6'b101111,
    tpg_dly_cont_c: 3'b111,
    tpg_pol_out:    1'b0,
    tpg_pol_in:     1'b0,
    test_dly_cont:  6'b101111,
    test_pol:       1'b0,
    dl_dly_cont:    6'b101111,
    dl_mask:        '1,
    dl_bypass:      '1,
    dl_pol:         '0
  };

  localparam pll_cfg_t PLL_INIT = '{cp_on: 1'b1, cp_cont: 2'b01, dly_cont: 5'b11111};

  localparam com_cfg_t COM_INIT = '{
    nc:             6'b000000,
    cmos_out_cont:  2'b01,
    rx_bias_cont:   2'b10,
    tpg_bias_enb:   1'b0,
    tpg_bias_cont:  2'b00,
    tpg_drv_cont_b: 4'b0000,
    tpg_drv_cont_a: 4'b0000,
    dl_bypass_sel:  1'b1,
    dl_pol_sel:     1'b1,
    pll_dly_sel:    1'b1
  };

  localparam cfg_t CFG_INIT = '{b: CHAN_INIT, a: CHAN_INIT, pll: PLL_INIT, com: COM_INIT};

  // Ring length select as on the STEP pins: 0:32, 1:28, 2:24, 3:20 units.
  function automatic logic [1:0] step_from_code(logic [4:0] code);
    return ~code[3:2];
  endfunction

  function automatic int unsigned ring_units(logic [1:0] step);
    return 32 - 4 * int'(step);
  endfunction

endpackage
