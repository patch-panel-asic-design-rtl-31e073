// pp_lvds_rx: behavioural model of the LVDS receiver (not synthesizable
// logic: the real receiver is an analog circuit of two differential amplifier
// stages and two inverter stages).
//
// The two legs INP/INN are given as logic levels. The output goes high when
// INP is high and INN low, low for the opposite, and keeps its value when both
// legs are equal (no valid differential level). It follows the input after a
// propagation delay set by the 2-bit bias code: a larger code means more bias
// current and a shorter delay. The delays in DLY_NS are this model's own
// values, picked within the 4-7 ns range of the measured receiver path; only
// their ordering follows the published measurements. Code 2 is the typical
// setting and the register's initial value.
`timescale 1ns / 1ps
module pp_lvds_rx #(
  parameter real DLY_NS [4] = '{6.0, 5.5, 5.0, 4.5}
) (
  input  logic       inp,
  input  logic       inn,
  input  logic [1:0] bias,
  output logic       out
);

  // Compare the legs on every change and forward valid levels only.
  initial out = 1'b0;
  always @(inp or inn) begin
    if (inp != inn) begin
      automatic logic    v = inp;
      automatic realtime d = DLY_NS[bias];
      fork
        begin
          #(d) out = v;
        end
      join_none
    end
  end

endmodule
