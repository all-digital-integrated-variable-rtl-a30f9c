// Programmable dead time. hs_i runs through a line of 2^D delay elements; a
// 2^D:1 multiplexer picks element dt, whose output hs_d is hs_i delayed by
// (dt+1) element delays. hs = hs_i AND hs_d rises (dt+1) element delays after
// hs_i and falls with it; ls = NOT hs_i AND NOT hs_d rises (dt+1) element
// delays after hs_i falls and falls with its rise. Both outputs are never high
// together. dt may change at any time; the new value takes effect for the next
// edge of hs_i still inside the line. The line and multiplexer follow the
// published dead-time schematic; reading mux input j as the output of element
// j (so dt = 0 gives one element of dead time) is this design's choice.
module dead_time #(
  parameter int unsigned D       = 6,
  parameter int unsigned T_DE_PS = 200
) (
  input  logic         hs_i,
  input  logic [D-1:0] dt,
  output logic         hs,
  output logic         ls
);
  timeunit 1ps; timeprecision 1ps;

  logic [2**D-1:0] taps;
  logic            hs_d;

  delay_line #(.N(2**D), .T_DE_PS(T_DE_PS)) u_line (.din(hs_i), .taps(taps));
  tap_mux    #(.W(D))                       u_mux  (.taps(taps), .sel(dt), .y(hs_d));

  assign hs = hs_i & hs_d;
  assign ls = ~hs_i & ~hs_d;
endmodule
