// tb_pp_bcid: self-checking test of pp_bcid.
// Runs the delay clock at 40 MHz and the gate clock at several phase lags,
// places hits at random times (never within 0.5 ns of a clock edge) and
// compares every BCID output with a reference computed from the hit times:
// crossing k is set when a hit falls in (D(k-1), D(k) + lag]. The result for
// crossing k must appear at D(k+1). Also checks masking and that both the
// one-crossing and the two-crossing case occur.
`timescale 1ns / 1ps
module tb_pp_bcid;
  logic asd_in = 1'b0, mask = 1'b1, bcid_delay = 1'b0, bcid_gate = 1'b0, rn = 1'b1;
  logic bcid_out;
  int checks = 0, failures = 0;
  int doubles = 0, singles = 0;

  pp_bcid dut (.*);

  real lag;                 // gate lag in ns, 0..24
  real t0 = 1000.0;         // time of D(0)
  real hits[$];
  bit  run = 1'b0;

  // Clocks: D(k) at t0 + 25k, G(k) at D(k) + lag.
  // Reset is asserted by an edge so that every asynchronous reset sees it.
  initial #0.5 rn = 1'b0;

  initial begin
    forever begin
      #12.5 bcid_delay = ~bcid_delay;
    end
  end
  always @(posedge bcid_delay) begin
    automatic real l = lag;
    fork
      begin
        #(l) bcid_gate = 1'b1;
        #12.5 bcid_gate = 1'b0;
      end
    join_none
  end

  function automatic bit expect_out(real dk);  // dk = time of D(k)
    foreach (hits[i])
      if (hits[i] > dk - 25.0 && hits[i] <= dk + lag) return 1'b1;
    return 1'b0;
  endfunction

  task automatic run_phase(real l, bit m, int n);
    real dk, t;
    lag = l;
    mask = m;
    hits.delete();
    rn = 1'b0;
    #40;
    rn = 1'b1;
    // align to a delay edge
    @(posedge bcid_delay);
    dk = $realtime;
    // generate hits in the next n crossings, spaced at least 6 ns
    fork
      begin
        t = $realtime + 50.0;
        while (t < dk + 25.0 * (n - 2)) begin
          real ph;
          t = t + 6.0 + real'($urandom_range(0, 60000)) / 1000.0;
          ph = t - dk - 25.0 * $floor((t - dk) / 25.0);
          if (ph < 0.5 || ph > 24.5) continue;
          if (lag > 0.0 && (ph > lag - 0.5 && ph < lag + 0.5)) continue;
          #(t - $realtime) asd_in = 1'b1;
          hits.push_back($realtime);
          #3 asd_in = 1'b0;
        end
      end
    join_none
    for (int k = 1; k < n; k++) begin
      @(posedge bcid_delay);
      #0.1;
      // output now belongs to crossing whose boundary is 25 ns ago
      if (k >= 3) begin
        automatic bit e = m ? expect_out($realtime - 0.1 - 25.0) : 1'b0;
        checks++;
        if (bcid_out !== e) begin
          failures++;
          $display("FAIL lag=%0.1f t=%0.1f out=%0b exp=%0b", lag, $realtime, bcid_out, e);
        end
      end
    end
    disable fork;
    asd_in = 1'b0;
    // classify hits: in two windows or one
    foreach (hits[i]) begin
      real ph = hits[i] - dk - 25.0 * $floor((hits[i] - dk) / 25.0);
      if (ph < lag) doubles++;
      else singles++;
    end
  endtask

  initial begin
    run_phase(0.0, 1'b1, 200);
    run_phase(7.3, 1'b1, 200);
    run_phase(15.0, 1'b1, 200);
    run_phase(23.9, 1'b1, 200);
    run_phase(12.0, 1'b0, 100);
    checks++;
    if (doubles == 0 || singles == 0) begin
      failures++;
      $display("FAIL coverage doubles=%0d singles=%0d", doubles, singles);
    end
    $display("hits in two crossings: %0d, in one: %0d", doubles, singles);
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
