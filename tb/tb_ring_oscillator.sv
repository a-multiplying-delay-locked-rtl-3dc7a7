// Self-checking testbench for the ring oscillator model.
//
// With injection off, the period of every phase must be 16 stage delays,
// with td = 25 ps * 0.7 / (vrail - 0.3), and phases[k+1] must rise one stage
// delay after phases[k]. With the rail set so the ring is slower than four
// times a 500 MHz reference and injection pulses on, phases[0] must rise one
// stage delay after every reference edge (the ring is pulled), and with the
// ring faster, a reference edge must not disturb it.
`timescale 1ps / 1fs
module tb_ring_oscillator;
  import mdll_pkg::*;

  logic ref_clk = 1'b0, inj = 1'b0;
  logic [NUM_PHASES-1:0] phases;
  real vrail = 0.86;
  int checks = 0, failures = 0;
  logic run_ref = 1'b0;

  ring_oscillator dut (.ref_clk, .inj, .vrail, .phases);
  pulse_gen #(.WIDTH_PS(60.0)) u_inj (.trig(ref_clk && run_ref), .pulse(inj));

  initial forever begin #1000; ref_clk = ~ref_clk; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  realtime rise[NUM_PHASES];
  realtime per0;
  for (genvar j = 0; j < NUM_PHASES; j++) begin : g_mon
    always @(posedge phases[j]) begin
      if (j == 0) per0 = $realtime - rise[0];
      rise[j] = $realtime;
    end
  end

  realtime t_ref;
  always @(posedge ref_clk) t_ref = $realtime;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real td_of(input real v);
    return 25.0 * 0.7 / (v - 0.3);
  endfunction

  initial begin
    real vs[3] = '{1.0, 0.86, 0.6};
    foreach (vs[i]) begin
      vrail = vs[i];
      #5000;
      @(posedge phases[0]); @(posedge phases[0]);
      check(per0 > 16.0 * td_of(vs[i]) - 0.5 && per0 < 16.0 * td_of(vs[i]) + 0.5,
            $sformatf("period %0.2f at %0.2f V, expected %0.2f", per0, vs[i], 16.0 * td_of(vs[i])));
      @(posedge phases[NUM_PHASES-1]);
      #1;
      for (int j = 1; j < NUM_PHASES; j++)
        check(rise[j] - rise[j-1] > td_of(vs[i]) - 0.5 && rise[j] - rise[j-1] < td_of(vs[i]) + 0.5,
              $sformatf("phase %0d spacing", j));
    end
    // Slow ring (1.75 GHz), injection on: phases[0] pulled to ref + td.
    vrail = 0.80;
    run_ref = 1'b1;
    repeat (3) @(posedge ref_clk);
    repeat (5) begin
      @(posedge ref_clk);
      @(posedge phases[0]);
      check($realtime - t_ref > td_of(0.80) - 0.5 && $realtime - t_ref < td_of(0.80) + 0.5,
            "slow ring pulled to the reference");
    end
    // Fast ring (2.5 GHz): undisturbed period.
    vrail = 1.0;
    repeat (3) @(posedge ref_clk);
    repeat (20) begin
      @(posedge phases[0]);
      if (rise[0] > 0.0) check(per0 > 16.0 * td_of(1.0) - 0.5 && per0 < 16.0 * td_of(1.0) + 0.5,
                               "fast ring keeps its period under injection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
