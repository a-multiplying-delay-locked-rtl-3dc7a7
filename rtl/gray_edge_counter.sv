// Loop-edge counter of the MDLL controller, with the "count >= MULT-1" compare
// that produces the phase detector enable.
//
// The counter advances on every rising edge of the monitored ring oscillator
// stage. It is cleared by the phase detector's reset pulse, which fires once
// the reference edge and the loop edge of one comparison have both been seen.
// Because the injected reference edge itself stands in for one loop edge, the
// enable rises after MULT-1 loop edges (3 for a x4 loop). The state is held in
// Gray code so that only one bit changes per edge and the combinational
// compare that drives the enable cannot glitch low between counts (as binary
// 3 -> 4 would). The count saturates at its largest value instead of wrapping,
// so a very fast loop never sees its enable drop; the document does not say
// what happens at the end of the range, so this is a choice of this design.
//
// Interface: mdll_clk (monitored ring stage), pd_rst (phase detector reset
// pulse, active high, asynchronous), rst_n (power-on reset, asynchronous),
// count (Gray code), pd_en (phase detector enable, combinational from count).
// Timing: count changes on each mdll_clk rising edge; pd_en follows count.
`timescale 1ps / 1fs
module gray_edge_counter
  import mdll_pkg::*;
#(
  parameter int unsigned MULT = mdll_pkg::DEFAULT_MULT
) (
  input  logic               mdll_clk,
  input  logic               pd_rst,
  input  logic               rst_n,
  output logic [COUNT_W-1:0] count,
  output logic               pd_en
);

  localparam logic [COUNT_W-1:0] LAST = '1;
  localparam logic [COUNT_W-1:0] THRESH = COUNT_W'(MULT - 1);

  logic [COUNT_W-1:0] bin;
  logic               clr;

  assign clr = pd_rst || !rst_n;
  assign bin = gray2bin(count);

  always_ff @(posedge mdll_clk or posedge clr) begin
    if (clr) count <= '0;
    else if (bin != LAST) count <= bin2gray(bin + 1'b1);
  end

  assign pd_en = (bin >= THRESH);

  initial assert (MULT >= 2 && MULT - 1 <= 2 ** COUNT_W - 1)
    else $error("gray_edge_counter: MULT out of range");

endmodule
