// Counter array and comparison logic of one mode (instantiated twice, MODE_ID 0
// and 1). The two modes take turns: while one runs the present switching cycle
// the other is cleared and loaded with the pointers and thresholds of the next.
//
// How it works. p_off (p1 or p3) and p_end (p2 or p4) are taps of the ring
// oscillator, so each shows one edge every 2^P element delays, phase-shifted
// by its pointer. A positive-edge and a negative-edge counter count the edges
// of p_off while this mode is active; their sum is the number of half periods
// seen. When the sum reaches cmp_on the high-side segment is over (hs_off).
// From then on a second counter pair counts the edges of p_end; when its sum
// reaches cmp_off the cycle is over (hs_on, which starts the next cycle in the
// other mode). Only edges strictly after the start of a segment are counted:
// the enable (mode, or this mode's own hs_off) changes after the edge that
// caused it, so a tap edge coinciding with the segment start is not counted.
// The counters are cleared asynchronously when off_trg rises while the other
// mode is active, which is also when the pointers of this mode may change.
// Because hs_off of a mode is only ever high while that mode is active,
// "off_trg AND other mode active" equals the other mode's hs_off, and that is
// the signal used here (off_other): same function, but no path from a
// counter through off_trg back to its own clear.
//
// Interface: cmp_on/cmp_off must be stable while this mode is active. hs_off is
// qualified by this mode being active, so the OR of both modes' hs_off has a
// clean rising edge in every cycle; hs_on stays high until the counters are
// cleared. Counter widths (K+P-1 per counter, K+P for the sum) and the clear
// condition (off_trg while the other mode runs) follow the published diagram;
// the qualification of hs_off, the enabling of the end counters by hs_off and
// the use of ">=" for the comparison are this design's choices. The glitch
// filters of the original are not modelled: the sums only count upward
// against a stable threshold, so the flags change once per cycle.
module counter_comparator #(
  parameter int unsigned K       = 6,
  parameter int unsigned P       = 7,
  parameter bit          MODE_ID = 1'b0
) (
  input  logic         rst,
  input  logic         mode,
  input  logic         off_other,
  input  logic         p_off,
  input  logic         p_end,
  input  logic [K+P-1:0] cmp_on,
  input  logic [K+P-1:0] cmp_off,
  output logic         hs_off,
  output logic         hs_on
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned CW = K + P - 1;

  logic          active, clr;
  logic          off_hit, end_en;
  logic [CW-1:0] pos_cnt_off, neg_cnt_off, pos_cnt_end, neg_cnt_end;
  logic [K+P-1:0] sum_off, sum_end;

  assign active = (mode == MODE_ID);
  assign clr    = rst | off_other;

  always_ff @(posedge p_off or posedge clr)
    if (clr)         pos_cnt_off <= '0;
    else if (active) pos_cnt_off <= pos_cnt_off + 1'b1;

  always_ff @(negedge p_off or posedge clr)
    if (clr)         neg_cnt_off <= '0;
    else if (active) neg_cnt_off <= neg_cnt_off + 1'b1;

  assign sum_off = {1'b0, pos_cnt_off} + {1'b0, neg_cnt_off};
  assign off_hit = (sum_off >= cmp_on);
  assign end_en  = active & off_hit;

  always_ff @(posedge p_end or posedge clr)
    if (clr)         pos_cnt_end <= '0;
    else if (end_en) pos_cnt_end <= pos_cnt_end + 1'b1;

  always_ff @(negedge p_end or posedge clr)
    if (clr)         neg_cnt_end <= '0;
    else if (end_en) neg_cnt_end <= neg_cnt_end + 1'b1;

  assign sum_end = {1'b0, pos_cnt_end} + {1'b0, neg_cnt_end};

  assign hs_off = off_hit & active;
  assign hs_on  = off_hit & (sum_end >= cmp_off);
endmodule
