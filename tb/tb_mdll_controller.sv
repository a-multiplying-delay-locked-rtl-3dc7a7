// Self-checking testbench for mdll_controller.
//
// The controller is driven by the ring oscillator model held at fixed rail
// voltages (open loop) with a 500 MHz reference and the injection and reset
// pulse generators of the MDLL. For each rail voltage the testbench checks the
// rules of the controller edge by edge, from its own record of the edge
// times:
//   - DN rises on a loop edge and falls on the next reference edge;
//   - UP from the detector rises on a reference edge and falls on the next
//     loop edge;
//   - a detection happens only on the 4th loop edge after the detector was
//     last reset (the enable comes after 3);
//   - recovery is set exactly at reference edges that find the enable low
//     and the register clear.
// Rails of 1.0 V (ring at 2.5 GHz, too fast), 0.80 V (1.75 GHz, too slow)
// and 0.55 V (1.0 GHz, less than 3 edges per period) must give DN only,
// detector UP only, and recovery, in that order.
`timescale 1ps / 1fs
module tb_mdll_controller;
  import mdll_pkg::*;

  logic ref_clk = 1'b0, rst_n;
  logic inj, pd_rst, up, dn, pd_en, recover, rst_req;
  logic [COUNT_W-1:0] count;
  logic [NUM_PHASES-1:0] phases;
  real vrail = 1.0;
  int checks = 0, failures = 0;

  // A reset edge 1 ps after start, so the asynchronous reset acts on any
  // start state.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end

  pulse_gen #(.WIDTH_PS(60.0)) u_inj (.trig(ref_clk), .pulse(inj));
  ring_oscillator u_ring (.ref_clk, .inj, .vrail, .phases);
  mdll_controller dut (.ref_clk, .mdll_clk(phases[0]), .pd_rst, .rst_n, .up, .dn, .pd_en,
                       .recover, .rst_req, .count);
  pulse_gen #(.WIDTH_PS(70.0)) u_pg (.trig(rst_req), .pulse(pd_rst));

  initial forever begin #1000; ref_clk = ~ref_clk; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  realtime t_ref, t_loop;
  int edges_since_rst, n_dn, n_up_pd, n_rec;
  logic det_ref_q, det_mdll_q;
  assign det_ref_q  = dut.u_pd.det_ref;
  assign det_mdll_q = dut.u_pd.det_mdll;

  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge phases[0]) begin
    t_loop = $realtime;
    if (!pd_rst) edges_since_rst++;
  end
  always @(posedge pd_rst) edges_since_rst = 0;

  // Pulses seen on the output ports.
  int n_dn_port, n_up_port;
  always @(posedge dn) n_dn_port++;
  always @(posedge up) n_up_port++;

  always @(posedge det_mdll_q) if (rst_n && $realtime > 1.0) begin
    n_dn++;
    check(t_loop == $realtime, "DN starts on a loop edge");
    check(edges_since_rst == 4, $sformatf("DN on loop edge %0d after reset", edges_since_rst));
  end
  always @(negedge det_mdll_q) if (rst_n && $realtime > 1.0) check(t_ref == $realtime, "DN ends on a reference edge");
  always @(posedge det_ref_q) if (rst_n && $realtime > 1.0) begin
    n_up_pd++;
    check(t_ref == $realtime, "UP starts on a reference edge");
    check(edges_since_rst >= 3, "UP only after the enable");
  end
  always @(negedge det_ref_q) if (rst_n && $realtime > 1.0) check(t_loop == $realtime, "UP ends on a loop edge");

  // Recovery register rule: inputs read at the reference edge, before the
  // register updates, and the result checked 1 ps later.
  logic en_before, rec_before;
  always @(posedge ref_clk) if (rst_n && $realtime > 1.0) begin
    en_before  = pd_en;
    rec_before = recover;
    #1;
    check(recover == (!en_before && !rec_before), "recovery register rule");
    if (recover) n_rec++;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real v, output int dn_o, output int up_o, output int rec_o);
    vrail = v;
    #20000;
    n_dn = 0; n_up_pd = 0; n_rec = 0; n_dn_port = 0; n_up_port = 0;
    #60000;
    dn_o = n_dn; up_o = n_up_pd; rec_o = n_rec;
    $display("vrail=%0.2f: DN %0d, UP %0d, recovery %0d", v, dn_o, up_o, rec_o);
  endtask

  initial begin
    int d, u, r;
    #3500 rst_n = 1'b1;
    run(1.0, d, u, r);
    check(d >= 25 && u == 0 && r == 0, "fast ring: DN only");
    check(n_dn_port == d && n_up_port == 0, "fast ring: DN port only");
    run(0.80, d, u, r);
    check(d == 0 && u >= 25 && r == 0, "slow ring: detector UP only");
    check(n_up_port == u && n_dn_port == 0, "slow ring: UP port only");
    run(0.55, d, u, r);
    check(r >= 10, "very slow ring: recovery");
    check(n_up_port >= r, "very slow ring: recovery drives the UP port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
