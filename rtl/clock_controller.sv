// Output-clock controller of the self-adjustable clock generator: edge
// detector, edge selector, clock flip-flop and watchdog.
//
// The processor clock comes straight from a flip-flop whose data input is
// tied high. The pulse of the first TRC (tp1) resets it, which makes the
// falling edge. The pulse of the second TRC (tp2) makes the rising edge: at
// its rising edge the 16 MDLL phases are sampled, the phase that is still low
// while the phase before it is already high is the one that rises next
// (s[n] = q[n-1] & !q[n]), and its rising edge, passed while tp2 is high,
// clocks the flip-flop (ci). So each rising edge of the output is aligned to
// the nearest following MDLL phase. The sampled phases are cleared while tp2
// is low, standing for the precharge phase of the dynamic edge selector, so
// a stale selection cannot produce an edge. Since the phases and the TRC
// pulses are asynchronous, a sample may go metastable and an edge be lost; a
// watchdog counts rising edges of phase 0 while the output is low and, after
// WD_LIMIT of them, gives the flip-flop an extra clock so the output cannot
// stop. The limit is this design's choice.
//
// Interface: phases (16 MDLL phases, phases[k+1] rises one step after
// phases[k]), tp1, tp2 (TRC pulses), rst_n (power-on reset), clk_out
// (processor clock), ci (selected edge), sel (one-hot selected phase),
// wd_fire (watchdog pulse).
//
// Clocks are generated here from data signals on purpose: this is an
// edge-aligning clock circuit, not a synchronous block.
`timescale 1ps / 1fs
module clock_controller
  import mdll_pkg::*;
#(
  parameter int unsigned WD_LIMIT = 8
) (
  input  logic                  rst_n,
  input  logic [NUM_PHASES-1:0] phases,
  input  logic                  tp1,
  input  logic                  tp2,
  output logic                  clk_out,
  output logic                  ci,
  output logic [NUM_PHASES-1:0] sel,
  output logic                  wd_fire
);

  localparam int unsigned WD_W = $clog2(WD_LIMIT + 1);

  // Edge detector: sample the phases on tp2, clear while tp2 is low and on
  // reset.
  logic                  armed;
  logic [NUM_PHASES-1:0] q;

  assign armed = tp2 && rst_n;

  always_ff @(posedge tp2 or negedge armed or negedge rst_n) begin
    if (!armed) q <= '0;
    else        q <= phases;
  end

  always_comb begin
    for (int n = 0; n < NUM_PHASES; n++)
      sel[n] = q[(n + NUM_PHASES - 1) % NUM_PHASES] && !q[n];
  end

  // Edge selector: the selected phase, passed while tp2 is high.
  assign ci = tp2 && |(sel & phases);

  // Clock flip-flop: set by the selected edge or the watchdog, reset by tp1.
  logic set_clk, clr;
  assign set_clk = ci || wd_fire;
  assign clr     = tp1 || !rst_n;

  always_ff @(posedge set_clk or posedge clr) begin
    if (clr) clk_out <= 1'b0;
    else     clk_out <= 1'b1;
  end

  // Watchdog: phase-0 edges counted while the output stays low.
  logic [WD_W-1:0] wd_count;
  logic            wd_clr;
  assign wd_clr = clk_out || !rst_n;

  always_ff @(posedge phases[0] or posedge wd_clr) begin
    if (wd_clr)                           wd_count <= '0;
    else if (wd_count != WD_W'(WD_LIMIT)) wd_count <= wd_count + 1'b1;
  end

  assign wd_fire = (wd_count == WD_W'(WD_LIMIT));

  // Simulation check, armed by the first reset so that the arbitrary state
  // before it is not judged.
  logic chk_armed;
  initial chk_armed = 1'b0;
  always @(negedge rst_n) chk_armed <= 1'b1;

  always @(posedge ci) if (chk_armed) assert ($countones(sel) <= 1)
    else $error("clock_controller: more than one phase selected");

endmodule
