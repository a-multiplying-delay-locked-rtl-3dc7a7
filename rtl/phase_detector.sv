// Enabled bang-bang phase detector of the MDLL controller.
//
// Two flip-flops race: one is clocked by the reference, the other by the
// monitored ring oscillator stage. Each captures a 1 only when the phase
// detector is enabled and the other flip-flop has not captured yet, so the
// first edge to arrive wins and locks the other out. Reference first means the
// loop is late and raises UP (det_ref); loop first means it is early and
// raises DN (det_mdll). Once the winning flip-flop is set and a rising edge of
// the other input follows, rst_req is raised; an external pulse generator turns it into a
// reset pulse of fixed width (pd_rst) that clears both flip-flops and the edge
// counter, so the output pulse lasts exactly the phase error.
//
// Interface: ref_clk, mdll_clk (clocks of the two flip-flops), en (from the
// edge counter), pd_rst (reset pulse, active high, asynchronous), rst_n
// (power-on reset), det_ref/det_mdll (UP/DN requests), rst_req (to the pulse
// generator). The power-on reset is this design's addition, and so are the two
// flip-flops that record the losing input's rising edge after a detection
// (seen_ref, seen_mdll): they make the reset wait for that edge rather than
// for the losing input merely being high, which would cut the pulse to zero
// whenever the monitored stage is already high when the reference rises.
`timescale 1ps / 1fs
module phase_detector (
  input  logic ref_clk,
  input  logic mdll_clk,
  input  logic en,
  input  logic pd_rst,
  input  logic rst_n,
  output logic det_ref,
  output logic det_mdll,
  output logic rst_req
);

  logic clr;
  assign clr = pd_rst || !rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) det_ref <= 1'b0;
    else     det_ref <= en && !det_mdll;
  end

  always_ff @(posedge mdll_clk or posedge clr) begin
    if (clr) det_mdll <= 1'b0;
    else     det_mdll <= en && !det_ref;
  end

  // Rising edge of the losing input after the winner was set.
  logic seen_ref, seen_mdll;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) seen_ref <= 1'b0;
    else     seen_ref <= det_mdll;
  end

  always_ff @(posedge mdll_clk or posedge clr) begin
    if (clr) seen_mdll <= 1'b0;
    else     seen_mdll <= det_ref;
  end

  // Both edges of the comparison have been seen.
  assign rst_req = (det_ref && seen_mdll) || (det_mdll && seen_ref);

  // Simulation check, armed by the first reset so that the arbitrary state
  // before it is not judged.
  logic chk_armed;
  initial chk_armed = 1'b0;
  always @(negedge rst_n) chk_armed <= 1'b1;

  // Only one side may ever win a comparison.
  always_comb if (chk_armed && rst_n) assert (!(det_ref && det_mdll))
    else $error("phase_detector: both UP and DN detected");

endmodule
