// Self-checking testbench for the charge pump and loop filter model: the
// control voltage must start at 1 V, fall by slew x width for a DN pulse,
// rise the same for an UP pulse, hold with both or neither, ramp during a
// long UP, and stay within its limits.
`timescale 1ps / 1fs
module tb_charge_pump_filter;
  logic up = 1'b0, dn = 1'b0;
  real vctrl;
  int checks = 0, failures = 0;
  localparam real SLEW = 1.0e-5;

  charge_pump_filter dut (.up, .dn, .vctrl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (v=%f)", $realtime, what, vctrl); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1.0e-6) && (b - a < 1.0e-6);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v0;
    #100;
    check(near(vctrl, 1.0), "starts at 1 V");
    for (int i = 0; i < 20; i++) begin
      int w = 20 + $urandom % 400;
      v0 = vctrl;
      dn = 1'b1; #(w); dn = 1'b0; #30;
      check(near(vctrl, v0 - SLEW * w), $sformatf("DN of %0d ps", w));
      v0 = vctrl;
      up = 1'b1; dn = 1'b1; #(w); up = 1'b0; dn = 1'b0; #30;
      check(near(vctrl, v0), "UP and DN together hold");
    end
    // Leave room below the upper clamp for the long UP.
    dn = 1'b1; #2000; dn = 1'b0; #30;
    v0 = vctrl;
    up = 1'b1; #995;
    check(vctrl > v0 + SLEW * 980.0 && vctrl <= v0 + SLEW * 995.0 + 1.0e-9,
          "long UP ramps while it lasts");
    #5;
    up = 1'b0;
    #1;
    check(near(vctrl, v0 + SLEW * 1000.0), "long UP total");
    v0 = vctrl;
    #5000;
    check(near(vctrl, v0), "holds with no pulse");
    dn = 1'b1; #200000; dn = 1'b0; #20;
    check(near(vctrl, 0.3), "clamped at the lower limit");
    up = 1'b1; #200000; up = 1'b0; #20;
    check(near(vctrl, 1.0), "clamped at the upper limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
