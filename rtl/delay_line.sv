// Behavioural model of a standard-cell delay line (not synthesizable as is).
// N identical delay elements in series; taps[j] is din delayed by (j+1) element
// delays of T_DE_PS picoseconds. On silicon each element is one symmetrical
// buffer cell placed in a tight row; here every element is a transport delay,
// so all elements are exactly equal and pulses of any width propagate. Each
// element also copies its input once at time zero, so a line that starts from
// arbitrary values settles to its input like real buffers do.
// The ring oscillator and the dead-time generator both build on this line.
module delay_line #(
  parameter int unsigned N       = 128,
  parameter int unsigned T_DE_PS = 200
) (
  input  logic         din,
  output logic [N-1:0] taps
);
  timeunit 1ps; timeprecision 1ps;

  for (genvar j = 0; j < N; j++) begin : g_de
    if (j == 0) begin : g_first
      always begin
        taps[0] <= #(T_DE_PS) din;
        @(din);
      end
    end else begin : g_next
      always begin
        taps[j] <= #(T_DE_PS) taps[j-1];
        @(taps[j-1]);
      end
    end
  end
endmodule
