// Closed-loop testbench for the MDLL.
//
// Instance x4 runs the main configuration: it starts with its rail at 1 V
// (ring at 2.5 GHz) on a 500 MHz reference, then the reference jumps to the
// low end of the locking range (286 MHz), then to the high end (556 MHz),
// which needs the recovery mechanism, then back to 500 MHz. At the end of
// each segment the mean ring period over 40 reference periods must be a
// quarter of the reference period within 1 %, and every reference period must
// hold four ring edges on average (160 +- 1 in 40). Instance x5 has the multiplication factor set
// to 5 and runs on 400 MHz, so it must lock to 2 GHz too. The testbench also
// counts DN pulses, detector UP pulses and recovery pulses and requires each
// to have happened.
`timescale 1ps / 1fs
module tb_mdll;
  import mdll_pkg::*;

  logic rst_n;
  logic ref4 = 1'b0, ref5 = 1'b0;
  realtime half4 = 1000.0;
  logic [NUM_PHASES-1:0] ph4, ph5;
  logic up4, dn4, en4, rec4, up5, dn5, en5, rec5;
  real vc4, vr4, vc5, vr5;
  int checks = 0, failures = 0;

  // A reset edge 1 ps after start, so the asynchronous reset acts on any
  // start state.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end

  mdll u4 (.ref_clk(ref4), .rst_n, .phases(ph4), .up(up4), .dn(dn4), .pd_en(en4),
           .recover(rec4), .vctrl(vc4), .vrail(vr4));
  mdll #(.MULT(5)) u5 (.ref_clk(ref5), .rst_n, .phases(ph5), .up(up5), .dn(dn5), .pd_en(en5),
                       .recover(rec5), .vctrl(vc5), .vrail(vr5));

  initial forever begin #(half4); ref4 = ~ref4; end
  initial forever begin #1250;    ref5 = ~ref5; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  int n_dn, n_up, n_rec;
  always @(posedge u4.u_ctrl.det_mdll) n_dn++;
  always @(posedge u4.u_ctrl.det_ref) n_up++;
  always @(posedge rec4) n_rec++;

  // Ring edges per reference period and their times.
  int e4, e5, per_ref4, per_ref5;
  realtime t_first4, t_last4, t_first5, t_last5;
  int n4, n5;
  always @(posedge ph4[0]) begin e4++; if (n4 == 0) t_first4 = $realtime; t_last4 = $realtime; n4++; end
  always @(posedge ph5[0]) begin e5++; if (n5 == 0) t_first5 = $realtime; t_last5 = $realtime; n5++; end
  always @(posedge ref4) begin per_ref4 = e4; e4 = 0; end
  always @(posedge ref5) begin per_ref5 = e5; e5 = 0; end

  task automatic measure4(input realtime tref, input int mult, input string name);
    int tot = 0;
    n4 = 0;
    @(posedge ref4); #1;
    repeat (40) begin
      @(posedge ref4); #1;
      tot += per_ref4;
    end
    check(tot >= 40 * mult - 1 && tot <= 40 * mult + 1,
          $sformatf("%s: %0d ring edges in 40 reference periods", name, tot));
    begin
      realtime mean = (t_last4 - t_first4) / real'(n4 - 1);
      $display("%s: ring period %0.1f ps, expected %0.1f", name, mean, tref / mult);
      check(mean > 0.99 * tref / mult && mean < 1.01 * tref / mult, $sformatf("%s: locked period", name));
    end
  endtask

  initial begin
    #6000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000 rst_n = 1'b1;
    #400000;
    measure4(2000.0, 4, "500 MHz from a 1 V start");
    begin
      int tot = 0;
      n5 = 0;
      @(posedge ref5); #1;
      repeat (40) begin @(posedge ref5); #1; tot += per_ref5; end
      check(tot >= 199 && tot <= 201, $sformatf("x5: %0d ring edges in 40 periods", tot));
      check((t_last5 - t_first5) / real'(n5 - 1) > 495.0 && (t_last5 - t_first5) / real'(n5 - 1) < 505.0,
            $sformatf("x5: ring period %0.1f ps", (t_last5 - t_first5) / real'(n5 - 1)));
    end
    half4 = 1748.0;
    #600000;
    measure4(3496.0, 4, "286 MHz after a jump down");
    n_rec = 0;
    half4 = 899.0;
    #1400000;
    check(n_rec > 0, "recovery used after the jump up");
    measure4(1798.0, 4, "556 MHz after a jump up");
    half4 = 1000.0;
    #600000;
    measure4(2000.0, 4, "500 MHz again");
    $display("DN pulses %0d, detector UP pulses %0d, recovery pulses %0d", n_dn, n_up, n_rec);
    check(n_dn > 0, "DN happened");
    check(n_up > 0, "detector UP happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
