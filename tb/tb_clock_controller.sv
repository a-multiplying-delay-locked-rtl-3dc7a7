// Self-checking testbench for clock_controller.
//
// An ideal 16-phase 2 GHz source (phase k rises at k x 31.25 ps modulo
// 500 ps) stands in for the MDLL. The testbench checks that
//   - after reset, with no TRC pulses, the watchdog starts the clock after
//     8 rising edges of phase 0;
//   - a tp1 pulse makes the output fall at once;
//   - after a tp2 pulse rising at a random time t, the output rises exactly on
//     the first phase edge after t (the next multiple of 31.25 ps), and
//     exactly one phase is selected.
`timescale 1ps / 1fs
module tb_clock_controller;
  import mdll_pkg::*;

  localparam realtime STEP = 31.25;

  logic rst_n, tp1 = 1'b0, tp2 = 1'b0;
  logic [NUM_PHASES-1:0] phases;
  logic clk_out, ci, wd_fire;
  logic [NUM_PHASES-1:0] sel;
  int checks = 0, failures = 0;

  // A reset edge 1 ps after start, so the asynchronous reset acts on any
  // start state.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end

  clock_controller dut (.rst_n, .phases, .tp1, .tp2, .clk_out, .ci, .sel, .wd_fire);

  // Ideal phase source.
  int unsigned kk = 0;
  initial forever begin #(STEP); kk = (kk + 1) % NUM_PHASES; end
  always_comb for (int j = 0; j < NUM_PHASES; j++) phases[j] = ((kk + NUM_PHASES - j) % NUM_PHASES) < 8;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  realtime t_rise_out, t_fall_out;
  int n_wd;
  always @(posedge clk_out) t_rise_out = $realtime;
  always @(negedge clk_out) t_fall_out = $realtime;
  always @(posedge wd_fire) n_wd++;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t, expect_t;
    #(10.0);
    #100 rst_n = 1'b1;
    // Watchdog start: phase 0 rises at multiples of 500 ps.
    wait (clk_out);
    #1;
    check(n_wd == 1, "watchdog started the clock");
    check(t_rise_out == 8.0 * 500.0, $sformatf("watchdog edge at %0.2f, expected 4000", t_rise_out));
    for (int i = 0; i < 40; i++) begin
      // Falling edge from tp1.
      #(realtime'(100 + $urandom % 300) + 0.37);
      t = $realtime;
      tp1 = 1'b1;
      #1;
      check(!clk_out && t_fall_out == t, "tp1 resets the output");
      #79 tp1 = 1'b0;
      // Rising edge from tp2, off the phase grid.
      #(realtime'(50 + $urandom % 400) + 3.1);
      t = $realtime;
      expect_t = (real'($rtoi(t / STEP)) + 1.0) * STEP;
      tp2 = 1'b1;
      #70;
      check($countones(sel) == 1, "exactly one phase selected");
      check(clk_out && t_rise_out == expect_t,
            $sformatf("rising edge at %0.3f, expected %0.3f (tp2 at %0.3f)", t_rise_out, expect_t, t));
      #10 tp2 = 1'b0;
    end
    check(n_wd == 1, "watchdog quiet while the pulses come");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
