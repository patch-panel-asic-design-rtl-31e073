// tb_pp_tpg_out: exhaustive check of the output stage control against a
// reference written independently (count of enabled sources, output levels).
`timescale 1ns / 1ps
module tb_pp_tpg_out;
  logic pulse, pol_out, bias_enb;
  logic [3:0] drv;
  logic [1:0] bias_cont;
  logic tpulse, tpulse_n, en_ref;
  logic [14:0] en;
  logic [1:0] rv;
  int checks = 0, failures = 0;

  pp_tpg_out dut (.*);

  initial begin
    for (int v = 0; v < 512; v++) begin
      {pulse, pol_out, bias_enb, drv, bias_cont} = 9'(v);
      #1;
      begin
        automatic bit on = (drv != 0) && !bias_enb;
        automatic int n = on ? int'(drv) : 0;
        automatic logic [14:0] exp_en = 15'((32'd1 << n) - 1);
        automatic logic hi = on && (pulse != pol_out);
        automatic logic lo = on && (pulse == pol_out);
        checks++;
        if (en !== exp_en || en_ref !== on || tpulse !== hi || tpulse_n !== lo ||
            rv !== (on ? bias_cont : 2'b00)) begin
          failures++;
          $display("FAIL v=%0d en=%h tp=%b%b", v, en, tpulse, tpulse_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
