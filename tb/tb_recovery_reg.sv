// Self-checking testbench for recovery_reg.
//
// Applies a sequence of reference edges with the phase detector enable held
// low or high and checks the register against the rule worked out by hand: a
// reference edge sets it if the enable is low and it is clear, and any other
// reference edge clears it. With the enable low for a long time the recovery
// UP therefore covers every other reference period.
`timescale 1ps / 1fs
module tb_recovery_reg;
  logic ref_clk = 1'b0, pd_en = 1'b0, rst_n;
  logic recover;
  int checks = 0, failures = 0;

  // A reset edge 1 ps after start, so the asynchronous reset acts on any
  // start state.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end

  recovery_reg dut (.ref_clk, .pd_en, .rst_n, .recover);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    int ups;
    #300 rst_n = 1'b1;
    checks++; if (recover) failures++;
    model = 1'b0;
    ups = 0;
    for (int i = 0; i < 40; i++) begin
      pd_en = (i >= 10 && i < 20) || (($urandom % 3) == 0 && i >= 30);
      #500 ref_clk = 1'b1;
      model = !pd_en && !model;
      #1;
      checks++;
      if (recover !== model) begin
        failures++;
        $display("FAIL: edge %0d en=%b recover=%b expected %b", i, pd_en, recover, model);
      end
      if (recover) ups++;
      #499 ref_clk = 1'b0;
    end
    checks++;
    if (ups < 5) begin failures++; $display("FAIL: recovery seldom asserted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
