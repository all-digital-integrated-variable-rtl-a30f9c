// High-resolution variable-frequency variable-duty-cycle modulator (top).
//
// Produces a pair of complementary gate signals hs/ls whose high-side on-time
// is hs_in element delays and whose low-side time is ls_in element delays,
// i.e. f_sw = 1/((hs_in+ls_in) t_de) and D = hs_in/(hs_in+ls_in), with a
// resolution of one delay element for both, and no external clock. A new
// command takes effect in the very next switching cycle.
//
// How it works. A ring oscillator of 2^P delay elements provides 2^P phases
// of one slow clock (half period 2^P t_de). Each command is split into a
// coarse part (half periods, counted by edge counters) and a fine part (P
// bits, realised by choosing which ring tap clocks the counters). Because each
// segment ends on an edge of a tap chosen relative to the tap that ended the
// previous segment, fine offsets accumulate along the ring (pointers s1..s4)
// and every segment is exact. Two identical counter-comparator sets (modes 0
// and 1) alternate cycle by cycle: while one times the present cycle, the
// other is cleared and loaded at the fall of hs_i with the pointers and
// thresholds of the next cycle, so its inputs are settled when it starts.
//
// Blocks: dithering_logic -> pointer_threshold_calc (input registers, limiter,
// pointers, thresholds) -> mux_array (p1..p4 from the ring_oscillator taps)
// -> two counter_comparator -> output_logic (on_trg/off_trg, mode, hs_i)
// -> dead_time (hs, ls).
//
// Interface and timing. rst is asynchronous, active high, and also stops the
// ring; hold it for at least 2^P element delays. Commands (hs_in, ls_in, dt,
// and the dither factors via the dither logic) are sampled at each fall of
// hs_i (flags.hs_fall rising) and govern the following cycle; sample-to-use
// is therefore at least ls_in element delays. The first cycle after reset is
// a start-up cycle with hs_i low and a length of about two half periods.
// Valid commands have hs_in >= 1, ls_in >= 1 and hs_in + ls_in >= lim;
// others are refused (flags.lim_reject) and the previous command repeats.
// The architecture, the pointer recursion and the parameter values K = 6,
// P = 7 (13-bit commands, 128-element ring) and t_de = 200 ps follow the
// published design; D = 6, the dither factor width, the reset behaviour and
// the flag encoding are this design's choices.
//
// Intended loops. Each mode's counters are asynchronously cleared by the
// other mode's hs_off. A structural analysis therefore sees a loop from the
// mode-0 counters through its comparator, the mode-1 clear, the mode-1
// counters and back. It never closes in operation: a mode's hs_off is gated
// by that mode being active, only one mode is active at a time, and the mode
// flip-flop changes only on the rise of on_trg, long after a clear has
// finished. The ring oscillator is the other intended loop.
module hr_vfvdm
  import vfvdm_pkg::*;
#(
  parameter int unsigned K       = K_DEF,
  parameter int unsigned P       = P_DEF,
  parameter int unsigned D       = D_DEF,
  parameter int unsigned NFRAC_W = NFRAC_W_DEF,
  parameter int unsigned T_DE_PS = T_DE_PS_DEF
) (
  input  logic                      rst,
  input  logic [K+P-1:0]            hs_in,
  input  logic [K+P-1:0]            ls_in,
  input  logic [D-1:0]              dt,
  input  logic [K+P-1:0]            lim,
  input  logic signed [NFRAC_W-1:0] nfrac_f,
  input  logic signed [NFRAC_W-1:0] nfrac_d,
  output logic                      hs,
  output logic                      ls,
  output logic                      hs_i,
  output logic                      ls_i,
  output logic                      clk_base,
  output vfvdm_flags_t              flags
);
  timeunit 1ps; timeprecision 1ps;

  logic [2**P-1:0] taps;
  logic [3:0]      p;
  logic [P-1:0]    s [4];
  logic [K+P-1:0]  cmp_on [2];
  logic [K+P-1:0]  cmp_off [2];
  logic [K+P-1:0]  hs_cmd, ls_cmd;
  logic [D-1:0]    dt_q;
  logic [1:0]      hs_on, hs_off;
  logic            on_trg, off_trg, mode;
  logic            lim_reject, dither_f, dither_d;

  ring_oscillator #(.P(P), .T_DE_PS(T_DE_PS)) u_ring (
    .en(~rst), .taps(taps), .clk_base(clk_base));

  dithering_logic #(.K(K), .P(P), .NFRAC_W(NFRAC_W)) u_dither (
    .rst(rst), .off_trg(off_trg), .hs_in(hs_in), .ls_in(ls_in),
    .nfrac_f(nfrac_f), .nfrac_d(nfrac_d), .hs_out(hs_cmd), .ls_out(ls_cmd),
    .dither_f(dither_f), .dither_d(dither_d));

  pointer_threshold_calc #(.K(K), .P(P), .D(D)) u_calc (
    .rst(rst), .off_trg(off_trg), .mode(mode), .hs_cmd(hs_cmd), .ls_cmd(ls_cmd),
    .dt_in(dt), .lim(lim), .s(s), .cmp_on(cmp_on), .cmp_off(cmp_off),
    .dt_q(dt_q), .lim_reject(lim_reject));

  mux_array #(.P(P)) u_mux (.taps(taps), .s(s), .p(p));

  counter_comparator #(.K(K), .P(P), .MODE_ID(1'b0)) u_mode0 (
    .rst(rst), .mode(mode), .off_other(hs_off[1]), .p_off(p[0]), .p_end(p[1]),
    .cmp_on(cmp_on[0]), .cmp_off(cmp_off[0]), .hs_off(hs_off[0]), .hs_on(hs_on[0]));

  counter_comparator #(.K(K), .P(P), .MODE_ID(1'b1)) u_mode1 (
    .rst(rst), .mode(mode), .off_other(hs_off[0]), .p_off(p[2]), .p_end(p[3]),
    .cmp_on(cmp_on[1]), .cmp_off(cmp_off[1]), .hs_off(hs_off[1]), .hs_on(hs_on[1]));

  output_logic u_out (
    .rst(rst), .hs_on(hs_on), .hs_off(hs_off), .on_trg(on_trg), .off_trg(off_trg),
    .mode(mode), .hs_i(hs_i), .ls_i(ls_i));

  dead_time #(.D(D), .T_DE_PS(T_DE_PS)) u_dt (.hs_i(hs_i), .dt(dt_q), .hs(hs), .ls(ls));

  always_comb begin
    flags.cycle_start = on_trg;
    flags.hs_fall     = off_trg;
    flags.mode        = mode;
    flags.lim_reject  = lim_reject;
    flags.dither_f    = dither_f;
    flags.dither_d    = dither_d;
  end
endmodule
