// Digital controller of the MDLL: edge counter, enabled phase detector and
// false-lock recovery, combined into the UP/DN commands of the charge pump.
//
// The counter counts rising edges of the monitored ring stage since the last
// comparison and enables the phase detector after MULT-1 of them. The phase
// detector then compares the next reference edge with the next loop edge:
// loop first gives DN (ring too fast), reference first gives UP (ring too
// slow). When both have arrived it requests a reset; the external pulse
// generator returns pd_rst, which clears the detector and the counter. The
// recovery register adds an UP lasting a whole reference period whenever a
// reference edge finds the detector disabled. UP = recover | det_ref,
// DN = det_mdll.
//
// Interface: ref_clk, mdll_clk, pd_rst (reset pulse back from the pulse
// generator), rst_n (power-on reset), up, dn, pd_en, recover, rst_req,
// count. MULT sets the multiplication factor (4 in the main configuration,
// 5 in the document's 400 MHz example). The reset pulse generator is a delay
// element and stays outside this synthesizable block. The detector outputs
// feed back, through rst_req and that pulse generator, to the asynchronous
// clear of the same flip-flops; this self-reset loop is how the document's
// phase detector works and is intended (a lint tool reports it as a signal
// used both as data and as an asynchronous reset).
`timescale 1ps / 1fs
module mdll_controller
  import mdll_pkg::*;
#(
  parameter int unsigned MULT = mdll_pkg::DEFAULT_MULT
) (
  input  logic               ref_clk,
  input  logic               mdll_clk,
  input  logic               pd_rst,
  input  logic               rst_n,
  output logic               up,
  output logic               dn,
  output logic               pd_en,
  output logic               recover,
  output logic               rst_req,
  output logic [COUNT_W-1:0] count
);

  logic det_ref, det_mdll;

  gray_edge_counter #(.MULT(MULT)) u_counter (
    .mdll_clk(mdll_clk),
    .pd_rst  (pd_rst),
    .rst_n   (rst_n),
    .count   (count),
    .pd_en   (pd_en)
  );

  phase_detector u_pd (
    .ref_clk (ref_clk),
    .mdll_clk(mdll_clk),
    .en      (pd_en),
    .pd_rst  (pd_rst),
    .rst_n   (rst_n),
    .det_ref (det_ref),
    .det_mdll(det_mdll),
    .rst_req (rst_req)
  );

  recovery_reg u_recovery (
    .ref_clk(ref_clk),
    .pd_en  (pd_en),
    .rst_n  (rst_n),
    .recover(recover)
  );

  assign up = recover || det_ref;
  assign dn = det_mdll;

endmodule
