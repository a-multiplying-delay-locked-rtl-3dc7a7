// False-lock recovery register of the MDLL controller.
//
// If the ring slows to three (or fewer) edges per reference period, the edge
// counter never reaches its threshold, the phase detector stays disabled and
// no feedback would ever occur. This register is clocked by the reference: at
// a reference edge that finds the phase detector disabled and the register
// clear, it sets and raises UP on the charge pump for one whole reference
// period; the next reference edge clears it. If the loop is still too slow the
// following edge sets it again. D = !(pd_en || recover).
//
// Interface: ref_clk, pd_en (phase detector enable), rst_n (power-on reset,
// this design's addition), recover (UP request). Timing: changes only on
// rising reference edges.
`timescale 1ps / 1fs
module recovery_reg (
  input  logic ref_clk,
  input  logic pd_en,
  input  logic rst_n,
  output logic recover
);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) recover <= 1'b0;
    else        recover <= !(pd_en || recover);
  end

endmodule
