// Dithering run of the whole modulator with a 64-element ring (P = 6, K = 7,
// so commands stay 13 bits) and 200 ps elements, the size used to show the
// extra frequency steps that dithering gives. For every dither factor
// n = 2..7 and -2..-7, first as a frequency factor and then as a duty
// factor, the modulator runs 8 groups of cycles at a fixed command and the
// testbench measures every period and on-time from hs_i:
//  - frequency dither: every |n|-th period is one element longer (n > 0) or
//    shorter (n < 0), all others are exact, and the on-time never changes;
//  - duty dither: the period never changes, and every |n|-th on-time is one
//    element longer (n > 0) or shorter (n < 0).
// The spacing of the modified cycles is measured, so the testbench does not
// depend on where a group starts. The average period over a group is
// (hs + ls) + sign(n)/|n| elements, i.e. a step of 1/|n| element.
module hr_vfvdm_dither_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int T = 200, K = 7, P = 6, W = K + P;
  localparam int HS = 700, LS = 650;

  logic rst;
  logic [W-1:0] hs_in, ls_in, lim;
  logic [5:0] dt;
  logic signed [3:0] nfrac_f, nfrac_d;
  logic hs, ls, hs_i, ls_i, clk_base;
  vfvdm_pkg::vfvdm_flags_t flags;

  hr_vfvdm #(.K(K), .P(P)) dut (.*);

  int checks = 0, failures = 0;
  time t_rise = 0, width = 0, period = 0;
  int  n_groups_f = 0, n_groups_d = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge hs_i) width = $time - t_rise;
  always @(posedge hs_i) begin
    if (t_rise != 0) period = $time - t_rise;
    t_rise = $time;
  end

  // Run 8*|n|+2 cycles; the first two settle the new factor. Collect which
  // cycles were modified and check their spacing and sizes.
  task automatic run_factor(input int n, input bit duty);
    int mag, idx, last_mod, mods;
    time base_p, base_w, mod_p, mod_w;
    mag = n < 0 ? -n : n;
    if (duty) begin nfrac_f = 0; nfrac_d = 4'(n); end
    else      begin nfrac_f = 4'(n); nfrac_d = 0; end
    base_p = time'((HS + LS) * T);
    base_w = time'(HS * T);
    mod_p  = duty ? base_p : time'((HS + LS + (n < 0 ? -1 : 1)) * T);
    mod_w  = duty ? time'((HS + (n < 0 ? -1 : 1)) * T) : base_w;
    repeat (3) @(posedge hs_i);
    last_mod = -1; mods = 0;
    for (idx = 0; idx < 8 * mag; idx++) begin
      @(posedge hs_i); #1;
      // the cycle that just ended: width was measured at its fall
      if (period != base_p || width != base_w) begin
        check(period == mod_p && width == mod_w, "modified cycle size");
        if (last_mod >= 0) check(idx - last_mod == mag, "dither spacing");
        last_mod = idx; mods++;
      end else begin
        check(period == base_p && width == base_w, "plain cycle size");
      end
    end
    check(mods == 8, "one modified cycle per group");
    if (duty) n_groups_d += mods; else n_groups_f += mods;
  endtask

  initial begin
    rst = 0; lim = 0; dt = 6'd5; nfrac_f = 0; nfrac_d = 0;
    hs_in = W'(HS); ls_in = W'(LS);
    #(T) rst = 1;
    #(20000 + T / 2) rst = 0;
    repeat (3) @(posedge hs_i);
    for (int m = 2; m <= 7; m++) begin
      run_factor(m, 0); run_factor(-m, 0);
    end
    for (int m = 2; m <= 7; m++) begin
      run_factor(m, 1); run_factor(-m, 1);
    end
    check(n_groups_f == 96 && n_groups_d == 96, "all groups seen");
    $display("groups frequency=%0d duty=%0d", n_groups_f, n_groups_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(500000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
