// pp_bcid: bunch-crossing identification for one channel.
//
// A rising edge on ASD_IN counts as a hit when MASK is 1 (0 masks the
// channel). Hits advance a 2-bit Gray counter clocked by ASD_IN itself, so a
// hit is captured whatever its width and wherever it falls in the clock period.
// Two delayed copies of the 40 MHz clock sample that counter:
//   BCID_DELAY sets the bunch-crossing boundaries D(k), and
//   BCID_GATE, whose edge G(k) lags D(k) by delta = (t_gate - t_delay) mod 25 ns,
//   stretches the window of each crossing past its boundary.
// Crossing k is reported for every hit in (D(k-1), G(k)], a window of
// 25 ns + delta. A hit that falls in (D(k), G(k)] therefore belongs to
// crossings k and k+1 and gives two BCID outputs; all others give one.
// BCID_OUT is registered on BCID_DELAY: the result for crossing k appears at
// D(k+1) and lasts one clock. RN, active low, clears everything.
// Up to three hits per window are told apart from none by the counter.
//
// Following the published design: the ports, the hit flip-flop clocked by
// ASD_IN with MASK as data, sampling with the two delayed clocks, a registered
// output clocked by BCID_Delay, and the one-or-two-crossing behaviour with an
// effective gate between 25 and 50 ns. The Gray counter and the exact window
// rule are this design's own.
`timescale 1ns / 1ps
module pp_bcid (
  input  logic asd_in,      // delayed, polarity-corrected hit
  input  logic mask,        // 1 = channel active, 0 = masked
  input  logic bcid_delay,  // delayed 40 MHz clock: crossing boundaries
  input  logic bcid_gate,   // delayed 40 MHz clock: gate extension
  input  logic rn,          // reset, active low
  output logic bcid_out
);

  logic [1:0] hc;           // Gray-coded hit count, ASD_IN domain
  logic [1:0] g_smp;        // hc at the last BCID_GATE edge
  logic [1:0] d_cur, d_prv; // hc at the last two BCID_DELAY edges

  always_ff @(posedge asd_in or negedge rn) begin
    if (!rn)       hc <= 2'b00;
    else if (mask) hc <= {hc[0], ~hc[1]};
  end

  always_ff @(posedge bcid_gate or negedge rn) begin
    if (!rn) g_smp <= 2'b00;
    else     g_smp <= hc;
  end

  always_ff @(posedge bcid_delay or negedge rn) begin
    if (!rn) begin
      d_cur    <= 2'b00;
      d_prv    <= 2'b00;
      bcid_out <= 1'b0;
    end else begin
      bcid_out <= (d_cur != d_prv) || (g_smp != d_cur);
      d_prv    <= d_cur;
      d_cur    <= hc;
    end
  end

endmodule
