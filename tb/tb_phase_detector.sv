// Self-checking testbench for phase_detector.
//
// A pulse generator (15 ps) closes the reset loop as in the MDLL. Each
// scenario enables the detector, then gives a reference edge and a loop edge
// with a chosen order and spacing, and checks: reference first gives a
// det_ref (UP) pulse from the reference edge to the loop edge; loop first
// gives a det_mdll (DN) pulse from the loop edge to the reference edge; only
// one of the two is ever raised; with the enable low neither is raised.
`timescale 1ps / 1fs
module tb_phase_detector;
  logic ref_clk = 1'b0, mdll_clk = 1'b0, en = 1'b0, rst_n;
  logic det_ref, det_mdll, rst_req, pd_rst;
  int checks = 0, failures = 0;

  // A reset edge 1 ps after start, so the asynchronous reset acts on any
  // start state.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end

  phase_detector dut (.ref_clk, .mdll_clk, .en, .pd_rst, .rst_n, .det_ref, .det_mdll, .rst_req);
  pulse_gen #(.WIDTH_PS(15.0)) u_pg (.trig(rst_req), .pulse(pd_rst));

  realtime t_up_rise, t_dn_rise, up_w, dn_w;
  always @(posedge det_ref)  t_up_rise = $realtime;
  always @(negedge det_ref)  up_w = $realtime - t_up_rise;
  always @(posedge det_mdll) t_dn_rise = $realtime;
  always @(negedge det_mdll) dn_w = $realtime - t_dn_rise;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One comparison: edge a at t, edge b at t + sep (ref_first selects which).
  task automatic compare(input bit ref_first, input realtime sep, input bit enable);
    up_w = 0.0; dn_w = 0.0;
    en = enable;
    #200;
    if (ref_first) ref_clk = 1'b1; else mdll_clk = 1'b1;
    #(sep);
    if (ref_first) mdll_clk = 1'b1; else ref_clk = 1'b1;
    #100;
    en = 1'b0;
    ref_clk = 1'b0; mdll_clk = 1'b0;
    #200;
    check(!det_ref && !det_mdll, "detector cleared after comparison");
    if (!enable)
      check(up_w == 0.0 && dn_w == 0.0, "no output while disabled");
    else if (ref_first)
      check(up_w >= sep - 0.1 && up_w <= sep + 0.1 && dn_w == 0.0,
            $sformatf("UP width %0.1f for lead %0.1f", up_w, sep));
    else
      check(dn_w >= sep - 0.1 && dn_w <= sep + 0.1 && up_w == 0.0,
            $sformatf("DN width %0.1f for lead %0.1f", dn_w, sep));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge det_ref or posedge det_mdll) begin
    checks++;
    if (det_ref && det_mdll) begin failures++; $display("FAIL: UP and DN together"); end
  end

  initial begin
    #100 rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      compare(1'b1, realtime'(10 + $urandom % 300), 1'b1);
      compare(1'b0, realtime'(10 + $urandom % 300), 1'b1);
    end
    compare(1'b1, 50.0, 1'b0);
    compare(1'b0, 50.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
