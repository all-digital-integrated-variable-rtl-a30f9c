// Testbench of one mode's counter array and comparison logic (K=6, P=7), with
// a second instance of the other mode driven with the opposite mode value.
// p_off and p_end are square waves with a half period H, p_end lagging by
// 300 ps, standing in for two ring taps. Each trial clears the idle instance,
// loads random thresholds and activates it at a time between tap edges, then
// checks that hs_off rises exactly at the cmp_on-th p_off edge after
// activation, hs_on exactly at the cmp_off-th p_end edge after that, that
// hs_off drops and the counters freeze when the mode changes, and that the
// clear removes hs_on.
module counter_comparator_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int K = 6, P = 7, H = 1000, LAG = 300;

  logic rst, mode, p_off, p_end;
  logic [K+P-1:0] cmp_on, cmp_off;
  logic clr0, clr1;
  logic hs_off0, hs_on0, hs_off1, hs_on1;
  int checks = 0, failures = 0;

  counter_comparator #(.K(K), .P(P), .MODE_ID(1'b0)) dut0 (
    .rst(rst), .mode(mode), .off_other(clr0), .p_off(p_off), .p_end(p_end),
    .cmp_on(cmp_on), .cmp_off(cmp_off), .hs_off(hs_off0), .hs_on(hs_on0));
  counter_comparator #(.K(K), .P(P), .MODE_ID(1'b1)) dut1 (
    .rst(rst), .mode(mode), .off_other(clr1), .p_off(p_off), .p_end(p_end),
    .cmp_on(cmp_on), .cmp_off(cmp_off), .hs_off(hs_off1), .hs_on(hs_on1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin p_off = 0; forever #(H) p_off = ~p_off; end
  initial begin p_end = 0; #(LAG); forever #(H) p_end = ~p_end; end

  time t_off, t_on;
  always @(posedge hs_off0 or posedge hs_off1) t_off = $time;
  always @(posedge hs_on0 or posedge hs_on1) t_on = $time;

  task automatic trial(input bit m);
    int a, b;
    time t0, exp_off, exp_on;
    logic hs_off_m, hs_on_m;
    a = $urandom_range(1, 40);
    b = $urandom_range(1, 40);
    // clear the instance that is about to run, while it is idle
    if (m) clr1 = 1; else clr0 = 1;
    cmp_on = (K+P)'(a); cmp_off = (K+P)'(b);
    #(H / 4);
    clr0 = 0; clr1 = 0;
    check((m ? hs_on1 : hs_on0) == 0, "cleared");
    // activate half-way between p_off edges
    begin
      int d = int'((H + H / 2 - ($time % H)) % H);
      #(d == 0 ? H : d);
    end
    t0 = $time;
    mode = m;
    exp_off = t0 + H / 2 + (a - 1) * H;
    exp_on = exp_off + LAG + (b - 1) * H;
    t_off = 0; t_on = 0;
    #(exp_on - t0 + H / 2);
    check(t_off == exp_off, $sformatf("hs_off time %0t exp %0t", t_off, exp_off));
    check(t_on == exp_on, $sformatf("hs_on time %0t exp %0t", t_on, exp_on));
    hs_off_m = m ? hs_off1 : hs_off0;
    hs_on_m = m ? hs_on1 : hs_on0;
    check(hs_off_m && hs_on_m, "flags high at end");
    // hand over to the other mode: hs_off drops, hs_on holds
    mode = ~m;
    #(H / 4);
    check((m ? hs_off1 : hs_off0) == 0, "hs_off qualified by mode");
    #(5 * H);
    check((m ? hs_on1 : hs_on0) == 1, "hs_on held while idle");
  endtask

  initial begin
    rst = 0; clr0 = 0; clr1 = 0; mode = 1; cmp_on = 1; cmp_off = 1;
    #(H / 4) rst = 1;
    #(H) rst = 0;
    check(!hs_off0 && !hs_off1 && !hs_on0 && !hs_on1, "reset");
    repeat (30) begin
      trial(1'b0);
      trial(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60 * 100 * H);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
