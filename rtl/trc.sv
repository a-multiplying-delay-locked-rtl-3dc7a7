// Behavioural model of a tunable replica circuit (TRC): a configurable
// inverter chain on the processor supply whose delay tracks that supply the
// way the processor's critical path does (analog: not synthesizable).
//
// Three multiplexer stages are cascaded. The first two each choose between a
// straight path and three delay chains; the last chooses between a straight
// path and one chain. The chain lengths are not given, so this design uses
// LEN_A, 2*LEN_A, 3*LEN_A buffers in the first stage, the same with LEN_B in
// the second and LEN_C in the third, which with the defaults covers 0 to 62
// buffer delays in steps of 2. The buffer delay scales with the processor
// supply: t = T_BUF_NOM_PS * (V_NOM - V_TH) / (vproc - V_TH), plus a fixed
// T_MUX_PS per multiplexer. At the output, a rising edge becomes a pulse of
// PULSE_PS (the TRC's "pulse" to the controller); the pulse shaping is this
// design's reading of the controller's TP1/TP2 inputs.
//
// Interface: in (edge to be delayed), sel = {a[1:0], b[1:0], c} chain
// selection, vproc (processor supply), pulse (delayed pulse).
`timescale 1ps / 1fs
module trc #(
  parameter int unsigned LEN_A        = 16,
  parameter int unsigned LEN_B        = 4,
  parameter int unsigned LEN_C        = 2,
  parameter real         T_BUF_NOM_PS = 20.0,
  parameter real         T_MUX_PS     = 15.0,
  parameter real         V_NOM        = 1.0,
  parameter real         V_TH         = 0.3,
  parameter realtime     PULSE_PS     = 80.0
) (
  input  logic       in,
  input  logic [4:0] sel,
  input  real        vproc,
  output logic       pulse
);

  real delay_ps;

  // Delay of the selected path at the present processor supply.
  always_comb begin
    real v;
    int unsigned nbuf;
    v        = (vproc < V_TH + 0.05) ? V_TH + 0.05 : vproc;
    nbuf     = int'(sel[4:3]) * LEN_A + int'(sel[2:1]) * LEN_B + int'(sel[0]) * LEN_C;
    delay_ps = 3.0 * T_MUX_PS
             + real'(nbuf) * T_BUF_NOM_PS * (V_NOM - V_TH) / (v - V_TH);
  end

  // Each rising input edge travels down the chain on its own, so several
  // edges may be in flight at once, and leaves it as a pulse.
  initial pulse = 1'b0;
  always @(posedge in) begin
    fork
      begin
        #(delay_ps);
        pulse = 1'b1;
        #(PULSE_PS);
        pulse = 1'b0;
      end
    join_none
  end

endmodule
