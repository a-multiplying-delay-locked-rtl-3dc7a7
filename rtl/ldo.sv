// Behavioural model of the low-dropout regulator that sets the ring
// oscillator's rail (analog: not synthesizable).
//
// The regulator drives the rail towards the control voltage from the loop
// filter, limited by its supply V_SUPPLY, as a first-order system with time
// constant TAU_PS, updated every STEP_PS. The rail starts at the supply. The
// time constant is this model's choice; the regulator's own circuit (an
// operational amplifier driving a PMOS pass device) is not modelled.
`timescale 1ps / 1fs
module ldo #(
  parameter real     V_SUPPLY = 1.0,
  parameter real     TAU_PS   = 200.0,
  parameter realtime STEP_PS  = 10.0
) (
  input  real vctrl,
  output real vrail
);

  initial begin
    vrail = V_SUPPLY;
    forever begin
      real target;
      #(STEP_PS);
      target = (vctrl > V_SUPPLY) ? V_SUPPLY : vctrl;
      vrail  = vrail + (target - vrail) * (real'(STEP_PS) / TAU_PS);
    end
  end

endmodule
