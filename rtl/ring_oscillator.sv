// Behavioural model of the MDLL's injection-locked differential ring
// oscillator (analog: not synthesizable).
//
// Eight differential stages of cross-coupled inverters form a ring whose two
// rails are crossed at the end, giving 16 phases spaced by one stage delay;
// one period is 16 stage delays. The ring is modelled by its wavefront
// position k (0..15): every stage delay the wavefront advances one step,
// phases[k] rises and phases[k-8] falls, so phases[j] is high exactly when
// (k - j) mod 16 < 8. phases[0..7] are the true outputs of stages 0..7 and
// phases[8..15] their complements.
//
// Injection: the first stage's inputs come from multiplexers that, while inj
// is high, take the reference and its complement instead of closing the ring.
// A rising reference edge therefore makes phases[0] rise one stage delay later
// (the multiplexer and first stage). If the ring is ahead, phases[0] is
// already high and nothing changes; if it lags, the wavefront is pulled to
// that forced edge (k = 0) and the ring runs on from there, so the phase error
// is cleared on every injection. The pull only happens if inj is still high
// one stage delay after it rose, so the injection pulse must outlast a stage.
//
// The stage delay follows the rail voltage from the LDO:
// td = TD_NOM_PS * (V_NOM - V_TH) / (vrail - V_TH), with the rail clamped
// below at V_MIN. The delay law and its constants are this model's choice
// (25 ps at 1 V, i.e. 2.5 GHz, so the ring starts faster than 4 x 500 MHz as
// the document describes for a 1 V start). Modelling the ring by its
// wavefront keeps it in its fundamental mode, as strong injection does.
`timescale 1ps / 1fs
module ring_oscillator
  import mdll_pkg::*;
#(
  parameter real TD_NOM_PS = 25.0,
  parameter real V_NOM     = 1.0,
  parameter real V_TH      = 0.3,
  parameter real V_MIN     = 0.35
) (
  input  logic                  ref_clk,
  input  logic                  inj,
  input  real                   vrail,
  output logic [NUM_PHASES-1:0] phases
);

  localparam int unsigned HALF = NUM_PHASES / 2;

  int unsigned k;           // index of the most recently risen phase
  int unsigned gen;         // bumped whenever an injection pulls the ring
  realtime     t_pull;      // time of the last pull
  real         td;

  // Stage delay at the present rail voltage.
  always_comb begin
    real v;
    v  = (vrail < V_MIN) ? V_MIN : vrail;
    td = TD_NOM_PS * (V_NOM - V_TH) / (v - V_TH);
  end

  always_comb begin
    for (int j = 0; j < NUM_PHASES; j++)
      phases[j] = ((k + NUM_PHASES - j) % NUM_PHASES) < HALF;
  end

  initial begin
    k      = 0;
    gen    = 0;
    t_pull = 0.0;
  end

  // The multiplexer passes the reference while inj is high; its rising edge
  // reaches phases[0] one stage delay later.
  logic inj_edge;
  assign inj_edge = inj && ref_clk;

  always @(posedge inj_edge) begin
    #(td);
    if (inj && k >= HALF) begin
      k      = 0;
      gen    = gen + 1;
      t_pull = $realtime;
    end
  end

  // Free-running wavefront, restarted from the pull time after a pull.
  initial begin
    #1;
    forever begin
      automatic int unsigned g = gen;
      automatic bit          go = 1'b0;
      #(td);
      while (!go) begin
        if (g == gen) go = 1'b1;
        else begin
          realtime rest;
          g    = gen;
          rest = t_pull + td - $realtime;
          if (rest > 0.0) #(rest);
          else go = 1'b1;
        end
      end
      k = (k + 1) % NUM_PHASES;
    end
  end

endmodule
