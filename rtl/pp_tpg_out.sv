// pp_tpg_out: digital control of one test pulse output stage.
//
// The output stage is a differential pair fed by up to 15 switched current
// sources plus one reference branch; the amplitude grows with the number of
// sources switched on. This module turns the register settings into those
// switch controls and into the logic level of the two outputs:
//   EN[k] (k = 0..14) is on when DRV > k, a thermometer code of DRV;
//   EN_REF (the reference branch) is on whenever the stage is enabled;
//   RV passes the 2-bit bias current code to the bias resistor;
// The stage is enabled when DRV is non-zero and BIAS_ENB is 0. When enabled,
// TPULSE follows the (delayed) pulse and TPULSE_N its complement; POL_OUT = 1
// swaps the two. When disabled, both outputs and all enables are 0.
// Purely combinational.
//
// Following the published design: 15 current-source enables plus a reference
// branch, the 4-bit amplitude code with 0 switching the driver off, the bias
// enable and 2-bit bias code, the output polarity. Own choice: the thermometer
// mapping and the logic-level representation of the analog outputs.
`timescale 1ns / 1ps
module pp_tpg_out (
  input  logic        pulse,     // pulse after the fine delay
  input  logic        pol_out,   // 0 positive, 1 negative
  input  logic [3:0]  drv,       // number of current sources, 0 = off
  input  logic [1:0]  bias_cont,
  input  logic        bias_enb,  // 1 disables the bias
  output logic        tpulse,
  output logic        tpulse_n,
  output logic [14:0] en,
  output logic        en_ref,
  output logic [1:0]  rv
);

  logic enabled;
  assign enabled = (drv != 4'd0) && !bias_enb;

  always_comb begin
    for (int k = 0; k < 15; k++) en[k] = enabled && (drv > 4'(k));
  end

  assign en_ref   = enabled;
  assign rv       = enabled ? bias_cont : 2'b00;
  assign tpulse   = enabled && (pulse ^ pol_out);
  assign tpulse_n = enabled && !(pulse ^ pol_out);

endmodule
