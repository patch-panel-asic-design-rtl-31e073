// pp_pll: behavioural model of the delay-unit PLL (the real PLL is analog:
// voltage-controlled ring oscillator, charge pump, off-chip filter capacitor).
//
// The 40 MHz reference is divided by two. A ring of N delay units (N = 32, 28,
// 24 or 20 for STEP = 0..3) plus an inverter oscillates with a half period of
// N unit delays, so at lock one unit delay is 25 ns / N and the ring runs at
// 20 MHz. The phase frequency detector (pp_pfd, real logic) compares the
// divided reference with the ring output. Its state at the other clock's edge
// tells which one led; the model measures that lead e and, standing in for
// the charge pump and R/C filter, applies a proportional-plus-integral update:
//   unit delay  <- unit delay - KI * e / (2N)      (integral, the capacitor)
//   next half period is shortened by KP * e        (proportional, the resistor)
// with KP = 0.25 * (CP_CONT + 1) and KI = KP / 5. CP_ON = 0 leaves V_CON
// floating: the unit delay is then frozen. The control voltage V_CON, common
// to every delay unit of the chip, is represented by the resulting unit delay
// in ps (VCON_PS). LOCK (the PLLLD pin) goes high after LOCK_COUNT consecutive
// comparisons with |e| below LOCK_TOL_PS and low at the first one above it.
// The loop gains, the start value UD_FREE_PS and the lock rule are this
// model's own; the ring lengths, the divider, the PFD and the 25 ns target
// follow the published design. RST_N restarts the loop from UD_FREE_PS.
`timescale 1ns / 1ps
module pp_pll #(
  parameter int unsigned UD_FREE_PS  = 1000,
  parameter int unsigned LOCK_TOL_PS = 100,
  parameter int unsigned LOCK_COUNT  = 16
) (
  input  logic        ref_clk,   // 40 MHz
  input  logic        rst_n,
  input  logic [1:0]  step,      // 0:32 1:28 2:24 3:20 units
  input  logic        cp_on,
  input  logic [1:0]  cp_cont,
  output logic [15:0] vcon_ps,   // unit delay at the current V_CON
  output logic        lock,
  output logic        vcro_clk
);

  logic ref2;
  logic up, upb, dn, dnb;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) ref2 <= 1'b0;
    else        ref2 <= ~ref2;
  end

  pp_pfd u_pfd (
    .ref_clk (ref2),
    .vcro_clk(vcro_clk),
    .rst_n   (rst_n),
    .up      (up),
    .upb     (upb),
    .dn      (dn),
    .dnb     (dnb)
  );

  real     ud_ps;        // unit delay, ps
  real     nudge_ps;     // pending proportional correction, ps
  realtime t_ref, t_vco;
  int      good;

  function automatic real units();
    return real'(32 - 4 * int'(step));
  endfunction

  task automatic loop_update(input real e_ps);
    real kp, ki;
    kp = 0.25 * real'(int'(cp_cont) + 1);
    ki = kp / 5.0;
    if (cp_on) begin
      ud_ps    = ud_ps - ki * e_ps / (2.0 * units());
      nudge_ps = nudge_ps + kp * e_ps;
    end
    if (e_ps < real'(LOCK_TOL_PS) && e_ps > -real'(LOCK_TOL_PS)) begin
      if (good < int'(LOCK_COUNT)) good = good + 1;
    end else begin
      good = 0;
    end
    lock    = (good >= int'(LOCK_COUNT));
    vcon_ps = 16'($rtoi(ud_ps + 0.5));
  endtask

  initial begin
    ud_ps    = real'(UD_FREE_PS);
    nudge_ps = 0.0;
    good     = 0;
    lock     = 1'b0;
    vcro_clk = 1'b0;
    vcon_ps  = 16'(UD_FREE_PS);
    t_ref    = 0;
    t_vco    = 0;
  end

  always @(negedge rst_n) begin
    ud_ps    = real'(UD_FREE_PS);
    nudge_ps = 0.0;
    good     = 0;
    lock     = 1'b0;
    vcon_ps  = 16'(UD_FREE_PS);
  end

  // Ring oscillator: half period of N unit delays, less any pending nudge
  // (at most half of the half period per step).
  always begin
    real hp, nd;
    hp = units() * ud_ps;
    nd = nudge_ps;
    if (nd >  hp / 2.0) nd =  hp / 2.0;
    if (nd < -hp / 2.0) nd = -hp / 2.0;
    nudge_ps = nudge_ps - nd;
    #((hp - nd) / 1000.0) vcro_clk = ~vcro_clk;
  end

  // The PFD state read at each edge, before the edge updates it.
  always @(posedge ref2) begin
    t_ref = $realtime;
    if (dn && rst_n) loop_update(-1000.0 * real'(t_ref - t_vco));
  end

  always @(posedge vcro_clk) begin
    t_vco = $realtime;
    if (upb && rst_n) loop_update(1000.0 * real'(t_vco - t_ref));
  end

endmodule
