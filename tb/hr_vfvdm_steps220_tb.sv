// Stepwise change of frequency and duty cycle with 220 ps elements (the
// element delay of the programmable-logic prototype), other parameters at
// their defaults. Three operating points are visited, each held for six
// cycles:
//   1546/1546 elements: period 3092 * 220 ps = 680 ns (1.47 MHz), D = 0.5
//   2500/1558 elements: period 4058 * 220 ps = 893 ns (1.12 MHz), D = 0.616
//   3394/ 935 elements: period 4329 * 220 ps = 952 ns (1.05 MHz), D = 0.784
// and back to the first. A reference takes the command present at each rising
// hs_fall flag (the sampling edge) and expects exactly that on-time and
// low-side time in the next cycle, which also checks that each change takes
// effect within one switching cycle.
module hr_vfvdm_steps220_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int T = 220, W = 13;

  logic rst;
  logic [W-1:0] hs_in, ls_in, lim;
  logic [5:0] dt;
  logic signed [3:0] nfrac_f, nfrac_d;
  logic hs, ls, hs_i, ls_i, clk_base;
  vfvdm_pkg::vfvdm_flags_t flags;

  hr_vfvdm #(.T_DE_PS(T)) dut (.*);

  int checks = 0, failures = 0, n_conv = 0;
  int pend_h, pend_l, cur_h, cur_l, prev_h = 0;
  bit pend_v = 0, cur_v = 0;
  time t_rise, t_fall;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge flags.hs_fall) if (!rst) begin
    pend_h = hs_in; pend_l = ls_in; pend_v = 1;
  end
  always @(posedge hs_i) begin
    if (cur_v) check($time - t_fall == time'(cur_l * T), "ls width");
    cur_v = pend_v; cur_h = pend_h; cur_l = pend_l; pend_v = 0;
    t_rise = $time;
  end
  always @(negedge hs_i) begin
    if (cur_v) begin
      check($time - t_rise == time'(cur_h * T), "hs width");
      if (prev_h != 0 && cur_h != prev_h) n_conv++;
      prev_h = cur_h;
    end
    t_fall = $time;
  end

  task automatic hold(input int h, input int l);
    hs_in = W'(h); ls_in = W'(l);
    repeat (6) @(posedge hs_i);
    #(T * 3);
  endtask

  initial begin
    rst = 0; lim = 0; dt = 6'd20; nfrac_f = 0; nfrac_d = 0;
    hs_in = 13'd1546; ls_in = 13'd1546;
    #(T) rst = 1;
    #(40000) rst = 0;
    repeat (2) @(posedge hs_i);
    hold(1546, 1546);
    hold(2500, 1558);
    hold(3394, 935);
    hold(1546, 1546);
    // each of the three changes must have produced a cycle at the new
    // command directly after the sampling edge
    check(n_conv == 3, "command changes applied");
    $display("changes=%0d", n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
