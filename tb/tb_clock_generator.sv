// End-to-end testbench of the clock generator at its default parameters.
//
// A 500 MHz reference drives the MDLL from a 1 V start; both TRCs select 16
// buffers (365 ps at a 1 V processor supply). The testbench checks:
//   - the watchdog starts the output clock, which is low after reset;
//   - the MDLL locks: mean ring period 500 ps within 1 %;
//   - every rising edge of the output that the watchdog did not make lies on
//     a rising edge of one of the 16 MDLL phases;
//   - the high time equals the first TRC's delay and the period lies between
//     the two TRC delays added and that plus one phase step;
//   - with the processor supply drooped to 0.8 V, the TRC delays and so the
//     period grow as the delay law predicts;
//   - after the reference jumps to 286 MHz and then to 556 MHz, the MDLL
//     relocks at four times the reference.
// It counts DN, detector UP, recovery, injection pulls of the ring and
// watchdog pulses, and fails if one of them never happened.
`timescale 1ps / 1fs
module tb_clock_generator;
  import mdll_pkg::*;

  logic ref_clk = 1'b0, rst_n;
  real vproc = 1.0;
  logic [4:0] trc1_sel = 5'b01_00_0, trc2_sel = 5'b01_00_0;
  logic clk_out, tp1, tp2, wd_fire, up, dn, pd_en, recover;
  logic [NUM_PHASES-1:0] phases;
  real vctrl, vrail;
  realtime half = 1000.0;
  int checks = 0, failures = 0;

  // A reset edge 1 ps after start, so the asynchronous reset acts on any
  // start state.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end

  clock_generator dut (.ref_clk, .rst_n, .vproc, .trc1_sel, .trc2_sel, .clk_out, .phases,
                       .tp1, .tp2, .wd_fire, .up, .dn, .pd_en, .recover, .vctrl, .vrail);

  initial forever begin #(half); ref_clk = ~ref_clk; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  function automatic real trc_delay(input real v);
    return 45.0 + 16.0 * 20.0 * 0.7 / (v - 0.3);
  endfunction

  // Mechanism counters.
  int n_dn, n_up, n_rec, n_wd, n_pull;
  always @(posedge dut.u_mdll.u_ctrl.det_mdll) n_dn++;
  always @(posedge dut.u_mdll.u_ctrl.det_ref) n_up++;
  always @(posedge recover) n_rec++;
  always @(posedge wd_fire) n_wd++;
  always @(dut.u_mdll.u_ring.gen) n_pull++;

  // Phase edge times.
  realtime last_rise[NUM_PHASES];
  for (genvar j = 0; j < NUM_PHASES; j++) begin : g_mon
    always @(posedge phases[j]) last_rise[j] = $realtime;
  end

  // Output clock: alignment, high time and period.
  realtime t_up, t_prev_up, hi, per;
  bit check_clk = 1'b0;
  int n_clk, n_aligned;
  always @(posedge clk_out) begin
    bit on_phase;
    #0.001;
    on_phase = 1'b0;
    for (int j = 0; j < NUM_PHASES; j++)
      if ($realtime - last_rise[j] < 0.002) on_phase = 1'b1;
    t_prev_up = t_up;
    t_up = $realtime;
    per = t_up - t_prev_up;
    if (check_clk && !wd_fire) begin
      n_clk++;
      if (on_phase) n_aligned++;
    end
  end
  always @(negedge clk_out) hi = $realtime - t_up;

  // Ring period measurement.
  int n_ring;
  realtime t_r0, t_r1;
  always @(posedge phases[0]) begin if (n_ring == 0) t_r0 = $realtime; t_r1 = $realtime; n_ring++; end

  task automatic ring_locked(input realtime tref, input string name);
    realtime mean;
    n_ring = 0;
    #(40.0 * tref);
    mean = (t_r1 - t_r0) / real'(n_ring - 1);
    $display("%s: ring period %0.1f ps (expected %0.1f)", name, mean, tref / 4.0);
    check(mean > 0.99 * tref / 4.0 && mean < 1.01 * tref / 4.0, {name, ": MDLL locked"});
  endtask

  task automatic clock_ok(input real v, input string name);
    realtime d, lo_p, hi_p;
    d = trc_delay(v);
    n_clk = 0; n_aligned = 0;
    check_clk = 1'b1;
    repeat (30) begin
      @(negedge clk_out); #1;
      check(hi > d - 0.01 && hi < d + 0.01, $sformatf("%s: high time %0.2f, expected %0.2f", name, hi, d));
      @(posedge clk_out); #1;
      lo_p = 2.0 * d;
      hi_p = 2.0 * d + 16.0 * 25.0 * 0.7 / 0.56 / 16.0 + 2.0;
      check(per >= lo_p - 0.01 && per <= hi_p,
            $sformatf("%s: period %0.2f, expected %0.2f..%0.2f", name, per, lo_p, hi_p));
    end
    check_clk = 1'b0;
    check(n_clk >= 25 && n_aligned == n_clk, $sformatf("%s: %0d of %0d rising edges on an MDLL phase", name, n_aligned, n_clk));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000 rst_n = 1'b1;
    #20000;
    check(n_wd >= 1, "watchdog started the output clock");
    #380000;
    ring_locked(2000.0, "500 MHz");
    clock_ok(1.0, "vproc 1.0 V");
    vproc = 0.8;
    #5000;
    clock_ok(0.8, "vproc 0.8 V");
    vproc = 1.0;
    half = 1748.0;
    #600000;
    ring_locked(3496.0, "286 MHz");
    half = 899.0;
    #1400000;
    ring_locked(1798.0, "556 MHz");
    $display("DN %0d, detector UP %0d, recovery %0d, injection pulls %0d, watchdog %0d",
             n_dn, n_up, n_rec, n_pull, n_wd);
    check(n_dn > 0, "DN happened");
    check(n_up > 0, "detector UP happened");
    check(n_rec > 0, "recovery happened");
    check(n_pull > 0, "injection pulled the ring");
    check(n_wd > 0, "watchdog fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
