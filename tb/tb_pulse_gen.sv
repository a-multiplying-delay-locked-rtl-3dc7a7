// Self-checking testbench for pulse_gen: each rising edge of the trigger,
// at random spacings longer than the pulse, must give one pulse of exactly
// WIDTH_PS starting at the edge, and no edge may be lost.
`timescale 1ps / 1fs
module tb_pulse_gen;
  logic trig = 1'b0, pulse;
  int checks = 0, failures = 0;
  realtime t_edge, t_rise;
  int n_pulses = 0;

  pulse_gen #(.WIDTH_PS(40.0)) dut (.trig, .pulse);

  always @(posedge pulse) if ($realtime > 1.0) begin
    t_rise = $realtime;
    n_pulses++;
    checks++;
    if (t_rise != t_edge) begin failures++; $display("FAIL: pulse late"); end
  end
  always @(negedge pulse) if ($realtime > 1.0) begin
    checks++;
    if ($realtime - t_rise < 39.99 || $realtime - t_rise > 40.01) begin
      failures++;
      $display("FAIL: width %0.2f", $realtime - t_rise);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    checks++; if (pulse) failures++;
    for (int i = 0; i < 30; i++) begin
      #(realtime'(60 + $urandom % 200));
      t_edge = $realtime;
      trig = 1'b1;
      #(realtime'(5 + $urandom % 100));
      trig = 1'b0;
    end
    #200;
    checks++;
    if (n_pulses != 30) begin failures++; $display("FAIL: %0d pulses for 30 edges", n_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
