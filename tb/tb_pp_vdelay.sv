// tb_pp_vdelay: self-checking test of the variable delay model.
// For several unit delays (25 ns / N for N = 32, 28, 24, 20) and every code
// 0..63, measures the delay of a rising and a falling edge and compares it
// with code * unit (codes above 47 counted as 47).
`timescale 1ns / 1ps
module tb_pp_vdelay;
  logic in = 1'b0, out;
  logic [5:0] sel = '0;
  logic [15:0] vcon_ps = 16'd781;
  int checks = 0, failures = 0;

  pp_vdelay dut (.*);

  initial begin
    realtime t;
    real d, e;
    for (int s = 0; s < 4; s++) begin
      vcon_ps = 16'(25000 / (32 - 4 * s));
      for (int c = 0; c < 64; c++) begin
        sel = 6'(c);
        #60;
        e = real'(((c > 47) ? 47 : c) * int'(vcon_ps)) / 1000.0;
        for (int edge_i = 0; edge_i < 2; edge_i++) begin
          t = $realtime;
          in = ~in;
          if (e > 0.0) @(out);
          else #0.001;
          d = real'($realtime - t);
          checks++;
          if (out !== in || d > e + 0.0015 || d < e - 0.0015) begin
            failures++;
            $display("FAIL code %0d unit %0d: %0.3f vs %0.3f", c, vcon_ps, d, e);
          end
          #60;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
