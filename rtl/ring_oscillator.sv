// Behavioural model of the ring oscillator (relies on element delays).
// A delay line of 2^P elements is closed into a ring through an inverting
// enable gate: while en is high the ring runs with a half period of exactly
// 2^P element delays, so clk_base = 1/(2^(P+1) * t_de). Tap i carries the ring
// signal delayed by i element delays against tap 0; the tap i+2^P would be the
// inverse of tap i, which is why counters that count both edges see one event
// every 2^P element delays on any tap. While en is low the ring is flushed to
// all zeros. The inverter is folded into the enable gate, so the loop delay is
// 2^P elements, as in the frequency relation of the design; the enable is
// this design's addition to start the ring from a known state.
// The path feedback -> element line -> feedback is a deliberate combinational
// loop: it is the oscillator itself, and timing tools will report it.
module ring_oscillator #(
  parameter int unsigned P       = 7,
  parameter int unsigned T_DE_PS = 200
) (
  input  logic              en,
  output logic [2**P-1:0]   taps,
  output logic              clk_base
);
  timeunit 1ps; timeprecision 1ps;

  logic feedback;
  assign feedback = en & ~taps[2**P-1];
  assign clk_base = taps[0];

  delay_line #(.N(2**P), .T_DE_PS(T_DE_PS)) u_line (.din(feedback), .taps(taps));
endmodule
