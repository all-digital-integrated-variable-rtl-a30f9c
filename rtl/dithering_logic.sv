// Dithering logic: raises the average resolution below one element delay.
// Two independent signed dither factors are given. For n = nfrac_f != 0, one
// switching cycle in every |n| gets a period of T + sgn(n) (the step is put on
// the low-side segment, so the high-side on-time is unchanged). For
// n = nfrac_d != 0, one cycle in every |n| moves sgn(n) element delays from the
// low side to the high side, so the period is unchanged and the average duty
// cycle becomes (hs + 1/n)/T. A factor of 0 switches that dither off.
// Each factor has a cycle counter that advances on every rising off_trg, the
// same edge at which the modulator samples hs_out/ls_out; the modified cycle
// is the last of each group of |n|. Results are clamped to the command range.
// The one-in-|n| rule follows the average-frequency and average-duty
// relations of the design; which segment takes the frequency step is this
// design's choice. dither_f/dither_d mark the command just sampled.
module dithering_logic #(
  parameter int unsigned K       = 6,
  parameter int unsigned P       = 7,
  parameter int unsigned NFRAC_W = 4
) (
  input  logic                      rst,
  input  logic                      off_trg,
  input  logic [K+P-1:0]            hs_in,
  input  logic [K+P-1:0]            ls_in,
  input  logic signed [NFRAC_W-1:0] nfrac_f,
  input  logic signed [NFRAC_W-1:0] nfrac_d,
  output logic [K+P-1:0]            hs_out,
  output logic [K+P-1:0]            ls_out,
  output logic                      dither_f,
  output logic                      dither_d
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W = K + P;

  logic [NFRAC_W-1:0] mag_f, mag_d, cnt_f, cnt_d;
  logic               hit_f, hit_d;
  logic signed [W+1:0] hs_x, ls_x;

  assign mag_f = nfrac_f[NFRAC_W-1] ? NFRAC_W'(-nfrac_f) : nfrac_f;
  assign mag_d = nfrac_d[NFRAC_W-1] ? NFRAC_W'(-nfrac_d) : nfrac_d;
  assign hit_f = (mag_f != '0) && (cnt_f + 1'b1 >= mag_f);
  assign hit_d = (mag_d != '0) && (cnt_d + 1'b1 >= mag_d);

  function automatic logic [W-1:0] clamp(input logic signed [W+1:0] v);
    if (v < 0)                  return '0;
    else if (v > (2**W) - 1)    return '1;
    else                        return v[W-1:0];
  endfunction

  always_comb begin
    hs_x = $signed({2'b00, hs_in});
    ls_x = $signed({2'b00, ls_in});
    if (hit_f) ls_x = ls_x + (nfrac_f[NFRAC_W-1] ? -1 : 1);
    if (hit_d) begin
      hs_x = hs_x + (nfrac_d[NFRAC_W-1] ? -1 : 1);
      ls_x = ls_x - (nfrac_d[NFRAC_W-1] ? -1 : 1);
    end
    hs_out = clamp(hs_x);
    ls_out = clamp(ls_x);
  end

  always_ff @(posedge off_trg or posedge rst)
    if (rst) begin
      cnt_f    <= '0;
      cnt_d    <= '0;
      dither_f <= 1'b0;
      dither_d <= 1'b0;
    end else begin
      cnt_f    <= hit_f || (mag_f == '0) ? '0 : cnt_f + 1'b1;
      cnt_d    <= hit_d || (mag_d == '0) ? '0 : cnt_d + 1'b1;
      dither_f <= hit_f;
      dither_d <= hit_d;
    end
endmodule
