// Shared constants and helpers for the multiplying delay-locked loop (MDLL)
// clock generator.
//
// The loop is an 8-stage differential ring oscillator that yields 16 phases;
// a 500 MHz reference is injected into its first stage and the ring runs four
// times faster (2 GHz). The controller counts loop edges with a 4-bit
// Gray-coded counter, so Gray/binary conversion lives here, and the
// multiplication factor is a package constant that modules take as their
// parameter default.
`timescale 1ps / 1fs
package mdll_pkg;

  // Ring oscillator size: 8 differential stages, two phases per stage.
  localparam int unsigned NUM_STAGES = 8;
  localparam int unsigned NUM_PHASES = 2 * NUM_STAGES;

  // Default ring frequency over reference frequency (4: 500 MHz in, 2 GHz out).
  localparam int unsigned DEFAULT_MULT = 4;

  // Width of the loop-edge counter in the controller.
  localparam int unsigned COUNT_W = 4;

  // Gray code of a binary value.
  function automatic logic [COUNT_W-1:0] bin2gray(input logic [COUNT_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Binary value of a Gray code.
  function automatic logic [COUNT_W-1:0] gray2bin(input logic [COUNT_W-1:0] g);
    logic [COUNT_W-1:0] b;
    b[COUNT_W-1] = g[COUNT_W-1];
    for (int i = COUNT_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
