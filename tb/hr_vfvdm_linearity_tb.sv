// Linearity and monotonicity runs of the modulator at its default size:
//  1. full-range sweep of the 13-bit hs command with ls constant (pulse width
//     against command, which must be a straight line of slope t_de);
//  2. two consecutive 100-element steps of hs (width must grow by
//     100 * t_de = 20 ns each time);
//  3. a triangular sweep at a constant period of 2331 elements (about
//     2.1 MHz at 200 ps): hs rises by one element every ten cycles while ls
//     falls by one, then back; every width and every period is checked.
// A reference records the command at each rising hs_fall flag (the sampling
// edge) and expects exactly that command in the next cycle.
module hr_vfvdm_linearity_tb;
  timeunit 1ps; timeprecision 1ps;
  import vfvdm_pkg::*;
  localparam int T = 200, W = 13;

  logic rst;
  logic [W-1:0] hs_in, ls_in, lim;
  logic [5:0] dt;
  logic signed [3:0] nfrac_f, nfrac_d;
  logic hs, ls, hs_i, ls_i, clk_base;
  vfvdm_flags_t flags;

  hr_vfvdm dut (.*);

  int checks = 0, failures = 0;
  int pend_h, pend_l, cur_h, cur_l;
  bit pend_v = 0, cur_v = 0;
  time t_rise, t_fall, last_w = 0, last_period = 0;
  int  last_cmd = 0;
  int  n_slope = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge flags.hs_fall) if (!rst) begin
    pend_h = hs_in; pend_l = ls_in; pend_v = 1;
  end
  always @(posedge hs_i) begin
    if (cur_v) begin
      check($time - t_fall == time'(cur_l * T), "ls width");
      last_period = $time - t_rise;
    end
    cur_v = pend_v; cur_h = pend_h; cur_l = pend_l; pend_v = 0;
    t_rise = $time;
  end
  always @(negedge hs_i) begin
    if (cur_v) begin
      time w;
      w = $time - t_rise;
      check(w == time'(cur_h * T), "hs width");
      // slope between consecutive distinct commands must be one element
      if (last_w != 0 && cur_h != last_cmd) begin
        check((w - last_w) == time'((cur_h - last_cmd) * T), "slope");
        n_slope++;
      end
      last_w = w; last_cmd = cur_h;
    end
    t_fall = $time;
  end

  task automatic run_cycles(input int n);
    repeat (n) @(posedge hs_i);
    #(T / 2 + T * 3);
  endtask

  initial begin
    rst = 0; lim = 0; dt = 6'd10; nfrac_f = 0; nfrac_d = 0;
    hs_in = 13'd1000; ls_in = 13'd1000;
    #(T) rst = 1;
    #(40000 + T / 2) rst = 0;
    run_cycles(3);
    // 1. full-range sweep
    for (int h = 1; h <= 8191; h += 273) begin
      hs_in = W'(h); ls_in = 13'd2000;
      run_cycles(2);
    end
    hs_in = 13'd8191; run_cycles(2);
    // 2. two 100-element steps
    hs_in = 13'd1000; ls_in = 13'd1000; run_cycles(3);
    hs_in = 13'd1100; run_cycles(3);
    hs_in = 13'd1200; run_cycles(3);
    // 3. triangular sweep at constant period
    for (int k = 0; k <= 30; k++) begin
      hs_in = W'(932 + k); ls_in = W'(2331 - 932 - k);
      run_cycles(10);
      check(last_period == time'(2331 * T), "constant period");
    end
    for (int k = 30; k >= 0; k--) begin
      hs_in = W'(932 + k); ls_in = W'(2331 - 932 - k);
      run_cycles(10);
      check(last_period == time'(2331 * T), "constant period");
    end
    check(n_slope > 60, "slope measured");
    $display("slope points=%0d", n_slope);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
