// Shared types and default sizes of the variable-frequency variable-duty-cycle
// modulator. Commands are K+P bits: the K upper bits count half periods of the
// ring oscillator (2^P delay elements each), the P lower bits select a tap.
// The defaults follow the 13-bit, 128-element configuration; the dead-time
// width and the dither-factor width are this design's choices.
package vfvdm_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned K_DEF       = 6;    // coarse bits
  localparam int unsigned P_DEF       = 7;    // fine bits, ring of 2^P elements
  localparam int unsigned D_DEF       = 6;    // dead-time select bits, 2^D elements
  localparam int unsigned NFRAC_W_DEF = 4;    // signed dither factor, -7..7
  localparam int unsigned T_DE_PS_DEF = 200;  // delay of one element in ps

  // Timing markers for the controller that feeds the modulator.
  typedef struct packed {
    logic cycle_start;  // high from the start of a cycle until hs_i falls (on_trg)
    logic hs_fall;      // high from the fall of hs_i until the cycle ends (off_trg)
    logic mode;         // which counter-comparator set runs the present cycle
    logic lim_reject;   // the command sampled last was refused by the limiter
    logic dither_f;     // the command sampled last carried a period dither step
    logic dither_d;     // the command sampled last carried a duty dither step
  } vfvdm_flags_t;
endpackage
