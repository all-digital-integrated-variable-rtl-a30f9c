// Multiplexer array: four 2^P:1 tap multiplexers that turn the pointers s1..s4
// into the counter clocks p1..p4. Each p is the ring signal delayed by s
// element delays. p1/p2 clock mode 0 (hs end / cycle end), p3/p4 mode 1.
// Combinational; s[0..3] hold s1..s4.
module mux_array #(
  parameter int unsigned P = 7
) (
  input  logic [2**P-1:0] taps,
  input  logic [P-1:0]    s [4],
  output logic [3:0]      p
);
  timeunit 1ps; timeprecision 1ps;

  for (genvar i = 0; i < 4; i++) begin : g_mux
    tap_mux #(.W(P)) u_mux (.taps(taps), .sel(s[i]), .y(p[i]));
  end
endmodule
