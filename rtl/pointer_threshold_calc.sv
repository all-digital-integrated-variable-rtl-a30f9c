// Input registers, limiter, pointer and threshold calculation.
//
// On every rising edge of off_trg (the fall of hs_i) the commands hs_cmd,
// ls_cmd and dt_in are sampled. A command pair is refused, and the previous
// one kept, when its period hs+ls is below lim or either segment is zero; this
// bounds the switching frequency to at most 1/(lim * t_de). The sampled pair
// then prepares the mode that is idle (the one that runs the next cycle):
//   next cycle in mode 1:  s3 = s2 + hs[P-1:0],  s4 = s3 + ls[P-1:0]
//   next cycle in mode 0:  s1 = s4 + hs[P-1:0],  s2 = s1 + ls[P-1:0]
// (all modulo 2^P), so each pointer sits exactly the fine part of the segment
// after the pointer that ends the preceding segment. The thresholds are the
// number of pointer-tap edges in a segment of x element delays counted
// strictly after its start: ceil(x / 2^P) = x[K+P-1:P] + (x[P-1:0] != 0).
// Pointer recursion follows the published equations; the ceiling form of the
// thresholds, the refusal rule and the reset values (pointers 0, a command of
// one half period per segment, thresholds 1) are this design's choices.
// Timing: all outputs change only at off_trg, when the idle mode is cleared.
module pointer_threshold_calc #(
  parameter int unsigned K = 6,
  parameter int unsigned P = 7,
  parameter int unsigned D = 6
) (
  input  logic           rst,
  input  logic           off_trg,
  input  logic           mode,
  input  logic [K+P-1:0] hs_cmd,
  input  logic [K+P-1:0] ls_cmd,
  input  logic [D-1:0]   dt_in,
  input  logic [K+P-1:0] lim,
  output logic [P-1:0]   s [4],
  output logic [K+P-1:0] cmp_on [2],
  output logic [K+P-1:0] cmp_off [2],
  output logic [D-1:0]   dt_q,
  output logic           lim_reject
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W = K + P;
  localparam logic [W-1:0] RESET_CMD = W'(2**P);

  function automatic logic [W-1:0] thr(input logic [W-1:0] x);
    return W'(x[W-1:P]) + W'(x[P-1:0] != '0);
  endfunction

  logic         accept;
  logic [W:0]   period;
  logic [W-1:0] hs_n, ls_n, hs_q, ls_q;

  assign period = {1'b0, hs_cmd} + {1'b0, ls_cmd};
  assign accept = (period >= {1'b0, lim}) && (hs_cmd != '0) && (ls_cmd != '0);
  assign hs_n   = accept ? hs_cmd : hs_q;
  assign ls_n   = accept ? ls_cmd : ls_q;

  always_ff @(posedge off_trg or posedge rst)
    if (rst) begin
      s          <= '{default: '0};
      cmp_on     <= '{default: W'(1)};
      cmp_off    <= '{default: W'(1)};
      hs_q       <= RESET_CMD;
      ls_q       <= RESET_CMD;
      dt_q       <= '0;
      lim_reject <= 1'b0;
    end else begin
      hs_q       <= hs_n;
      ls_q       <= ls_n;
      dt_q       <= dt_in;
      lim_reject <= ~accept;
      if (mode == 1'b0) begin
        s[2]       <= s[1] + hs_n[P-1:0];
        s[3]       <= s[1] + hs_n[P-1:0] + ls_n[P-1:0];
        cmp_on[1]  <= thr(hs_n);
        cmp_off[1] <= thr(ls_n);
      end else begin
        s[0]       <= s[3] + hs_n[P-1:0];
        s[1]       <= s[3] + hs_n[P-1:0] + ls_n[P-1:0];
        cmp_on[0]  <= thr(hs_n);
        cmp_off[0] <= thr(ls_n);
      end
    end
endmodule
