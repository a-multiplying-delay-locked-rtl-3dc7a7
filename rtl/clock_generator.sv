// Self-adjustable clock generator built around a multiplying delay-locked
// loop (behavioural model at this level, since the MDLL and TRCs are analog).
//
// A slow reference (500 MHz) is distributed to the core; the MDLL multiplies
// it by four and gives 16 phases of 2 GHz that stay phase-related to the
// reference because the reference is injected on every rising edge. The
// processor clock is made by the controller's flip-flop: the output clock
// runs through the first tunable replica circuit (TRC), whose pulse resets
// the flip-flop (falling edge), and on through the second, whose pulse picks
// the next MDLL phase to set it again (rising edge). Both TRCs sit on the
// processor supply, so the high time and the period follow that supply the
// way the processor's critical path does. The TRC select codes would come
// from a calibration circuit that is not part of this design; they are ports.
//
// Interface: ref_clk, rst_n, vproc (processor supply, volts), trc1_sel and
// trc2_sel (TRC chain selections), clk_out (processor clock), phases (MDLL
// phases) and, for observation, tp1, tp2, wd_fire, up, dn, pd_en, recover,
// vctrl, vrail.
`timescale 1ps / 1fs
module clock_generator
  import mdll_pkg::*;
#(
  parameter int unsigned MULT     = mdll_pkg::DEFAULT_MULT,
  parameter int unsigned WD_LIMIT = 8
) (
  input  logic                  ref_clk,
  input  logic                  rst_n,
  input  real                   vproc,
  input  logic [4:0]            trc1_sel,
  input  logic [4:0]            trc2_sel,
  output logic                  clk_out,
  output logic [NUM_PHASES-1:0] phases,
  output logic                  tp1,
  output logic                  tp2,
  output logic                  wd_fire,
  output logic                  up,
  output logic                  dn,
  output logic                  pd_en,
  output logic                  recover,
  output real                   vctrl,
  output real                   vrail
);

  mdll #(.MULT(MULT)) u_mdll (
    .ref_clk(ref_clk),
    .rst_n  (rst_n),
    .phases (phases),
    .up     (up),
    .dn     (dn),
    .pd_en  (pd_en),
    .recover(recover),
    .vctrl  (vctrl),
    .vrail  (vrail)
  );

  trc u_trc1 (
    .in   (clk_out),
    .sel  (trc1_sel),
    .vproc(vproc),
    .pulse(tp1)
  );

  trc u_trc2 (
    .in   (tp1),
    .sel  (trc2_sel),
    .vproc(vproc),
    .pulse(tp2)
  );

  clock_controller #(.WD_LIMIT(WD_LIMIT)) u_ctrl (
    .rst_n  (rst_n),
    .phases (phases),
    .tp1    (tp1),
    .tp2    (tp2),
    .clk_out(clk_out),
    .ci     (),
    .sel    (),
    .wd_fire(wd_fire)
  );

endmodule
