// pp_vdelay: behavioural model of the variable delay line (the real line is
// 48 analog current-starved delay cells and a 48-to-1 multiplexer).
//
// All cells share the control voltage V_CON of the PLL, which holds each
// cell's delay at 25 ns / N, the reference period over the ring length (N = 20, 24, 28 or 32
// cells in the PLL ring). Here V_CON is carried as that unit delay in
// picoseconds, VCON_PS. The 6-bit code SEL picks tap SEL (0 = input passed
// straight to the multiplexer, code k = k unit delays, 47 at most); codes
// above 47 are treated as 47. The output copies each input edge after
// SEL * VCON_PS + T_FIX_PS as a transport delay: every edge is kept, also
// when edges follow each other faster than the delay, as in a cell chain.
// Pulse shrinking inside the cells is not modelled.
// T_FIX_PS stands for the multiplexer and output buffer; its default of 0 is
// this model's choice.
`timescale 1ns / 1ps
module pp_vdelay #(
  parameter int unsigned T_FIX_PS = 0
) (
  input  logic        in,
  input  logic [5:0]  sel,
  input  logic [15:0] vcon_ps,
  output logic        out
);

  int unsigned tap;
  assign tap = (sel > 6'd47) ? 47 : int'(sel);

  initial out = 1'b0;
  // Each edge is carried by its own delayed process, so that edges closer
  // together than the delay are all kept.
  always @(in) begin
    automatic logic    v = in;
    automatic realtime d = real'(tap * vcon_ps + T_FIX_PS) / 1000.0;
    fork
      begin
        #(d) out = v;
      end
    join_none
  end

endmodule
