// pp_pfd: phase frequency detector of the delay-locked PLL.
//
// Two flip-flops with their D inputs tied high. The reference edge sets the
// first (UPB high, UP low), the VCRO edge sets the second (DN high, DNB low).
// As soon as both are set they are cleared together, so the flip-flop of the
// earlier clock stays set for the time by which that clock leads: UPB pulses
// while the reference leads, DN pulses while the VCRO leads. UP and DNB are
// the complements, as needed by the switches of the charge pump. The clear
// acts without a clock; RST_N additionally clears both.
//
// Following the published design: the two set flip-flops, the common clear
// when both are set and the four output names. Own choice: RST_N.
`timescale 1ns / 1ps
module pp_pfd (
  input  logic ref_clk,
  input  logic vcro_clk,
  input  logic rst_n,
  output logic up,
  output logic upb,
  output logic dn,
  output logic dnb
);

  logic q_ref, q_vco, clr;
  assign clr = !rst_n || (q_ref && q_vco);

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) q_ref <= 1'b0;
    else     q_ref <= 1'b1;
  end

  always_ff @(posedge vcro_clk or posedge clr) begin
    if (clr) q_vco <= 1'b0;
    else     q_vco <= 1'b1;
  end

  assign upb = q_ref;
  assign up  = !q_ref;
  assign dn  = q_vco;
  assign dnb = !q_vco;

endmodule
