// Behavioural model of the MDLL charge pump and loop filter (analog: not
// synthesizable).
//
// While up is high the pump charges the filter capacitance and the control
// voltage rises at SLEW_V_PER_PS; while dn is high it falls at the same rate;
// both or neither hold it. The voltage is integrated exactly between input
// changes and refreshed every STEP_PS so that a long UP (the one-period
// recovery pulse) shows as a ramp. It is clamped to [V_LO, V_HI]. The control
// voltage starts at V_INIT, the 1 V supply, as the document assumes. The slew
// rate and limits are this model's choice.
`timescale 1ps / 1fs
module charge_pump_filter #(
  parameter real     SLEW_V_PER_PS = 1.0e-5,
  parameter real     V_INIT        = 1.0,
  parameter real     V_LO          = 0.3,
  parameter real     V_HI          = 1.0,
  parameter realtime STEP_PS       = 10.0
) (
  input  logic up,
  input  logic dn,
  output real  vctrl
);

  realtime t_last;
  int      dir;

  task automatic integrate();
    real v;
    v = vctrl + SLEW_V_PER_PS * real'(dir) * real'($realtime - t_last);
    if (v > V_HI) v = V_HI;
    if (v < V_LO) v = V_LO;
    vctrl  = v;
    t_last = $realtime;
    dir    = int'(up) - int'(dn);
  endtask

  initial begin
    vctrl  = V_INIT;
    t_last = 0.0;
    dir    = 0;
  end

  always @(up or dn) integrate();

  initial forever begin
    #(STEP_PS);
    integrate();
  end

endmodule
