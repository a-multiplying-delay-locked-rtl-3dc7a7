// Self-checking testbench for the tunable replica circuit model: for random
// chain selections and two processor supplies, the delay from a rising input
// edge to the output pulse must be 3 x 15 ps plus (16a + 4b + 2c) buffer
// delays of 20 ps x 0.7 / (vproc - 0.3), and the pulse must last 80 ps.
`timescale 1ps / 1fs
module tb_trc;
  logic in = 1'b0, pulse;
  logic [4:0] sel = '0;
  real vproc = 1.0;
  int checks = 0, failures = 0;
  realtime t_in, t_rise;

  trc dut (.in, .sel, .vproc, .pulse);

  always @(posedge pulse) t_rise = $realtime;
  always @(negedge pulse) if ($realtime > 1.0) begin
    checks++;
    if ($realtime - t_rise < 79.99 || $realtime - t_rise > 80.01) begin
      failures++; $display("FAIL: pulse width");
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vs[2] = '{1.0, 0.8};
    #100;
    foreach (vs[i]) begin
      vproc = vs[i];
      for (int n = 0; n < 16; n++) begin
        real expect_d;
        sel = 5'($urandom);
        expect_d = 45.0 + real'(16 * sel[4:3] + 4 * sel[2:1] + 2 * sel[0]) * 20.0 * 0.7 / (vs[i] - 0.3);
        #100;
        t_in = $realtime;
        in = 1'b1;
        @(posedge pulse);
        t_rise = $realtime;
        checks++;
        if (t_rise - t_in < expect_d - 0.01 || t_rise - t_in > expect_d + 0.01) begin
          failures++;
          $display("FAIL: sel=%b v=%0.2f delay %0.2f expected %0.2f", sel, vs[i], t_rise - t_in, expect_d);
        end
        #500 in = 1'b0;
        #(expect_d + 200.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
