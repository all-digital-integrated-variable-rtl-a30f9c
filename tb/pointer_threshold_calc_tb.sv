// Testbench of the input registers, limiter and pointer/threshold calculation
// (K=6, P=7, D=6). Random commands, limits and modes are applied before each
// rising off_trg; a reference model keeps its own pointers and previous
// command and predicts s1..s4, both modes' thresholds (ceil(x/2^P)), the
// sampled dead time and the refusal flag. Also replays the published 3-bit
// pointer example scaled to P = 7 (fine parts 1 and 2).
module pointer_threshold_calc_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int K = 6, P = 7, D = 6, W = K + P;

  logic rst, off_trg, mode;
  logic [W-1:0] hs_cmd, ls_cmd, lim;
  logic [D-1:0] dt_in, dt_q;
  logic [P-1:0] s [4];
  logic [W-1:0] cmp_on [2], cmp_off [2];
  logic lim_reject;
  int checks = 0, failures = 0;

  pointer_threshold_calc #(.K(K), .P(P), .D(D)) dut (.*);

  int ms[4], mon[2], moff[2], mh, ml, mdt;
  bit mrej;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ceil_div(int x); return (x + (1 << P) - 1) >> P; endfunction

  task automatic step(input int h, input int l, input int lm, input bit md, input int d);
    bit acc;
    hs_cmd = W'(h); ls_cmd = W'(l); lim = W'(lm); mode = md; dt_in = D'(d);
    #10;
    off_trg = 1;
    acc = (h + l >= lm) && h != 0 && l != 0;
    mrej = !acc;
    if (acc) begin mh = h; ml = l; end
    mdt = d;
    if (md == 0) begin
      ms[2] = (ms[1] + mh) % (1 << P);
      ms[3] = (ms[2] + ml) % (1 << P);
      mon[1] = ceil_div(mh); moff[1] = ceil_div(ml);
    end else begin
      ms[0] = (ms[3] + mh) % (1 << P);
      ms[1] = (ms[0] + ml) % (1 << P);
      mon[0] = ceil_div(mh); moff[0] = ceil_div(ml);
    end
    #10;
    off_trg = 0;
    for (int i = 0; i < 4; i++) check(int'(s[i]) == ms[i], $sformatf("s%0d", i + 1));
    for (int i = 0; i < 2; i++) begin
      check(int'(cmp_on[i]) == mon[i], "cmp_on");
      check(int'(cmp_off[i]) == moff[i], "cmp_off");
    end
    check(int'(dt_q) == mdt, "dt sampled");
    check(lim_reject == mrej, "lim_reject");
    #10;
  endtask

  initial begin
    rst = 0; off_trg = 0; mode = 0; hs_cmd = 0; ls_cmd = 0; lim = 0; dt_in = 0;
    #5 rst = 1;
    #10 rst = 0;
    ms = '{0, 0, 0, 0}; mon = '{1, 1}; moff = '{1, 1}; mh = 128; ml = 128; mdt = 0;
    for (int i = 0; i < 4; i++) check(s[i] == 0, "reset pointers");
    check(cmp_on[0] == 1 && cmp_off[1] == 1, "reset thresholds");
    // example of the pointer walk: fine parts 1 and 2 (s3=3,s4=5 / s1=6,s2=8...)
    step(2 * 128 + 1, 3 * 128 + 2, 0, 0, 3);
    step(2 * 128 + 1, 3 * 128 + 2, 0, 1, 3);
    step(2 * 128 + 1, 3 * 128 + 2, 0, 0, 3);
    step(5664, 1644, 0, 1, 62);
    step(664, 644, 0, 0, 62);
    step(1280, 1024, 0, 1, 1);     // fine parts zero: thresholds 10 and 8
    step(300, 300, 1000, 0, 1);    // refused
    step(0, 500, 0, 1, 1);         // refused, zero segment
    repeat (2000) begin
      step($urandom_range(0, 8191), $urandom_range(0, 8191),
           ($urandom_range(0, 3) == 0) ? $urandom_range(0, 8191) : 0,
           $urandom_range(0, 1), $urandom_range(0, 63));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
