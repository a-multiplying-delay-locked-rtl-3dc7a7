// Multiplying delay-locked loop: a ring oscillator that runs MULT times faster
// than its reference and is re-aligned to it by injection on every reference
// rising edge (behavioural model: it contains the analog parts).
//
// A pulse generator opens the injection multiplexers of the ring for
// INJ_PULSE_PS after each reference rising edge. The digital controller
// compares every MULT-th edge of ring stage 0 with the reference edge and
// issues UP/DN; a second pulse generator shapes the detector's reset. The
// charge pump and filter turn UP/DN into the control voltage, and the LDO
// turns that into the ring's rail voltage, closing the loop. With MULT = 4
// and a 500 MHz reference the ring locks near 2 GHz and gives 16 phases.
//
// Interface: ref_clk (reference), rst_n (power-on reset of the controller),
// phases (the 16 ring phases, phases[0] is the injected stage), and for
// observation up, dn, pd_en, recover, vctrl, vrail.
`timescale 1ps / 1fs
module mdll
  import mdll_pkg::*;
#(
  parameter int unsigned MULT          = mdll_pkg::DEFAULT_MULT,
  parameter realtime     INJ_PULSE_PS  = 60.0,
  parameter realtime     RST_PULSE_PS  = 70.0,
  parameter real         SLEW_V_PER_PS = 1.0e-5
) (
  input  logic                  ref_clk,
  input  logic                  rst_n,
  output logic [NUM_PHASES-1:0] phases,
  output logic                  up,
  output logic                  dn,
  output logic                  pd_en,
  output logic                  recover,
  output real                   vctrl,
  output real                   vrail
);

  logic               inj;
  logic               rst_req, pd_rst;

  pulse_gen #(.WIDTH_PS(INJ_PULSE_PS)) u_inj_pulse (
    .trig (ref_clk),
    .pulse(inj)
  );

  ring_oscillator u_ring (
    .ref_clk(ref_clk),
    .inj    (inj),
    .vrail  (vrail),
    .phases (phases)
  );

  mdll_controller #(.MULT(MULT)) u_ctrl (
    .ref_clk (ref_clk),
    .mdll_clk(phases[0]),
    .pd_rst  (pd_rst),
    .rst_n   (rst_n),
    .up      (up),
    .dn      (dn),
    .pd_en   (pd_en),
    .recover (recover),
    .rst_req (rst_req),
    .count   ()
  );

  pulse_gen #(.WIDTH_PS(RST_PULSE_PS)) u_rst_pulse (
    .trig (rst_req),
    .pulse(pd_rst)
  );

  charge_pump_filter #(.SLEW_V_PER_PS(SLEW_V_PER_PS)) u_cp (
    .up   (up),
    .dn   (dn),
    .vctrl(vctrl)
  );

  ldo u_ldo (
    .vctrl(vctrl),
    .vrail(vrail)
  );

endmodule
