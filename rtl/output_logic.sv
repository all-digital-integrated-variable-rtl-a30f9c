// Output logic: merges the per-mode segment flags and forms hs_i.
// on_trg is the OR of both modes' hs_on, off_trg the OR of both modes' hs_off.
// Every rising on_trg starts a new switching cycle: the mode flip-flop toggles
// (handing the cycle to the other counter-comparator set) and the SR
// flip-flop is set; every rising off_trg resets it. The SR element is a
// reset-dominant latch: at a cycle start off_trg is still high for the moment
// the mode takes to flip, and hs_i rises as soon as it drops. That latch is
// intended (it is the SR flip-flop of the architecture) and is the only one in
// the design. ls_i is the complement of hs_i. The structure (two OR gates, an
// SR element, a toggling mode flip-flop clocked by on_trg) follows the
// published block diagram; the reset-dominant choice and the asynchronous
// reset (mode 0, hs_i low) are this design's.
module output_logic (
  input  logic       rst,
  input  logic [1:0] hs_on,
  input  logic [1:0] hs_off,
  output logic       on_trg,
  output logic       off_trg,
  output logic       mode,
  output logic       hs_i,
  output logic       ls_i
);
  timeunit 1ps; timeprecision 1ps;

  assign on_trg  = hs_on[0]  | hs_on[1];
  assign off_trg = hs_off[0] | hs_off[1];

  always_ff @(posedge on_trg or posedge rst)
    if (rst) mode <= 1'b0;
    else     mode <= ~mode;

  always_latch
    if (rst || off_trg) hs_i = 1'b0;
    else if (on_trg)    hs_i = 1'b1;

  assign ls_i = ~hs_i;
endmodule
