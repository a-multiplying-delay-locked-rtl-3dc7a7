// Behavioural model of a delay-based pulse generator (not synthesizable: the
// pulse width comes from a delay element).
//
// Each rising edge of trig produces one high pulse of WIDTH_PS picoseconds on
// pulse. A rising edge that arrives while a pulse is running is absorbed. The
// MDLL uses two of these: one drives the injection multiplexers of the ring
// oscillator from the reference, the other stretches the phase detector's
// reset request so the detector flip-flops see a reset of usable length. The
// widths are this design's choice.
`timescale 1ps / 1fs
module pulse_gen #(
  parameter realtime WIDTH_PS = 20.0
) (
  input  logic trig,
  output logic pulse
);

  initial pulse = 1'b0;

  always @(posedge trig) begin
    pulse <= 1'b1;
    #(WIDTH_PS);
    pulse <= 1'b0;
  end

endmodule
