// pp_tpg: test pulse sequencer of one port.
//
// TPTRIG is sampled on the rising CLK edge (POL_IN = 0) or on the falling
// edge (POL_IN = 1, then retimed to the next rising edge). The sampled trigger
// runs through a coarse delay line of 7 flip-flops; DLY_C selects tap 0 (no
// delay) to tap 7. A rising edge at the selected tap starts the pulse, which
// stays high for PW clocks, counted by a 12-bit counter (PW = 400 gives 10 us at
// 40 MHz; PW = 0 wraps and gives 4096 clocks). Triggers that arrive while a
// pulse is running are ignored.
//
// Timing with POL_IN = 0: if TPTRIG is first seen high at rising edge n, PULSE
// rises after edge n + 1 + DLY_C and falls after edge n + 1 + DLY_C + PW.
// The fine delay and the output stage follow outside this module.
//
// Following the published design: edge select, coarse delay line with a tap
// multiplexer, a set flip-flop and a clock counter that ends the pulse, the
// register codes. Own choices: synchronous start detection, the retiming of the
// falling-edge sample, the PW = 0 case and ignoring triggers during a pulse.
`timescale 1ns / 1ps
module pp_tpg
  import pp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tptrig,
  input  logic               pol_in,   // 0 rising, 1 falling CLK edge
  input  logic [2:0]         dly_c,    // coarse delay, clocks
  input  logic [PW_BITS-1:0] pw,       // pulse width, clocks
  output logic               pulse
);

  logic trig_n, trig_p;
  logic [COARSE_MAX:0] taps;
  logic sel_q, start;
  logic [PW_BITS-1:0] cnt;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) trig_n <= 1'b0;
    else        trig_n <= tptrig;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_p           <= 1'b0;
      taps[COARSE_MAX:1] <= '0;
      sel_q            <= 1'b0;
    end else begin
      trig_p           <= pol_in ? trig_n : tptrig;
      taps[COARSE_MAX:1] <= taps[COARSE_MAX-1:0];
      sel_q            <= taps[dly_c];
    end
  end
  assign taps[0] = trig_p;
  assign start   = taps[dly_c] & ~sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulse <= 1'b0;
      cnt   <= '0;
    end else if (pulse) begin
      if (cnt == pw - PW_BITS'(1)) pulse <= 1'b0;
      cnt <= cnt + PW_BITS'(1);
    end else if (start) begin
      pulse <= 1'b1;
      cnt   <= '0;
    end
  end

endmodule
