// 2^W:1 multiplexer that picks one delay-line tap. Purely combinational; the
// select must be stable while the picked tap is in use (the modulator changes
// a pointer only while the counters it clocks are held in reset).
module tap_mux #(
  parameter int unsigned W = 7
) (
  input  logic [2**W-1:0] taps,
  input  logic [W-1:0]    sel,
  output logic            y
);
  timeunit 1ps; timeprecision 1ps;

  always_comb y = taps[sel];
endmodule
