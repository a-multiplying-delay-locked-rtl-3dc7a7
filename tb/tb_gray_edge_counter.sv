// Self-checking testbench for gray_edge_counter.
//
// Drives rising edges on mdll_clk and checks, against a reference count kept
// in the testbench, that the state is the Gray code of the number of edges
// since the last reset, that consecutive states differ in exactly one bit,
// that pd_en rises after exactly MULT-1 edges (3 for the default, 4 for a
// second instance with MULT = 5), that the count saturates at 15 and that the
// pd_rst pulse clears it.
`timescale 1ps / 1fs
module tb_gray_edge_counter;
  import mdll_pkg::*;

  logic mdll_clk = 1'b0, pd_rst = 1'b0, rst_n;
  logic [COUNT_W-1:0] count4, count5;
  logic pd_en4, pd_en5;
  int checks = 0, failures = 0;

  // A reset edge 1 ps after start, so the asynchronous reset acts on any
  // start state.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end

  gray_edge_counter dut4 (.mdll_clk, .pd_rst, .rst_n, .count(count4), .pd_en(pd_en4));
  gray_edge_counter #(.MULT(5)) dut5 (.mdll_clk, .pd_rst, .rst_n, .count(count5), .pd_en(pd_en5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [3:0] gray(input int n);
    logic [3:0] b = 4'(n);
    return b ^ (b >> 1);
  endfunction

  task automatic edge_();
    #100 mdll_clk = 1'b1;
    #100 mdll_clk = 1'b0;
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] prev;
    #200 rst_n = 1'b1;
    check(count4 == 0 && !pd_en4, "reset state");
    for (int round = 0; round < 2; round++) begin
      prev = count4;
      for (int n = 1; n <= 18; n++) begin
        edge_();
        check(count4 == gray(n > 15 ? 15 : n), $sformatf("count after %0d edges", n));
        check(count5 == count4, "both instances count alike");
        if (n <= 15) check($countones(count4 ^ prev) == 1, "one bit changes per edge");
        check(pd_en4 == (n >= 3), $sformatf("enable (x4) after %0d edges", n));
        check(pd_en5 == (n >= 4), $sformatf("enable (x5) after %0d edges", n));
        prev = count4;
      end
      #50 pd_rst = 1'b1;
      #20 check(count4 == 0 && !pd_en4 && count5 == 0, "cleared by pd_rst");
      pd_rst = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
