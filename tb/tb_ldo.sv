// Self-checking testbench for the LDO model: the rail starts at the 1 V
// supply, follows a step of the control voltage as a first-order system with
// a 200 ps time constant (checked against (1 - 10/200)^n after n steps of
// 10 ps), settles on the control voltage and never exceeds the supply.
`timescale 1ps / 1fs
module tb_ldo;
  real vctrl = 1.0, vrail;
  int checks = 0, failures = 0;

  ldo dut (.vctrl, .vrail);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (vrail=%f)", $realtime, what, vrail); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expect_v;
    #5;
    check(vrail == 1.0, "starts at the supply");
    #10;
    vctrl = 0.8;
    for (int n = 1; n <= 40; n++) begin
      #10;
      expect_v = 0.8 + 0.2 * ((1.0 - 10.0 / 200.0) ** n);
      check(vrail - expect_v < 1.0e-9 && expect_v - vrail < 1.0e-9, $sformatf("step response, step %0d", n));
    end
    #10000;
    check(vrail > 0.7999 && vrail < 0.8001, "settles on the control voltage");
    vctrl = 1.3;
    #10000;
    check(vrail <= 1.0 && vrail > 0.999, "limited by the supply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
