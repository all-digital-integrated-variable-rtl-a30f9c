// End-to-end testbench of the modulator at its default size (K=6, P=7, D=6,
// t_de = 200 ps). A reference model samples the command inputs at every rising
// hs_fall flag, applies its own limiter and dither rules and predicts the next
// cycle: hs_i high for hs element delays, low for ls element delays, and hs/ls
// each delayed by (dt+1) element delays after their edge of hs_i. Every cycle
// after reset is checked exactly (single-cycle convergence), so every command
// change is also a convergence check. Inputs change only at times that are
// odd multiples of half an element delay, never together with a sampling edge.
// Scenarios: the published example commands, a fine part of zero, pointer
// wrap-around, limiter refusal, positive and negative frequency and duty
// dithering, dead-time changes, and random commands down to one element.
module hr_vfvdm_tb;
  timeunit 1ps; timeprecision 1ps;
  import vfvdm_pkg::*;

  localparam int T  = 200;
  localparam int W  = 13;
  localparam int PP = 7;

  logic rst;
  logic [W-1:0] hs_in, ls_in, lim;
  logic [5:0] dt;
  logic signed [3:0] nfrac_f, nfrac_d;
  logic hs, ls, hs_i, ls_i, clk_base;
  vfvdm_flags_t flags;

  hr_vfvdm dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mode0 = 0, n_mode1 = 0, n_wrap = 0, n_fine0 = 0, n_reject = 0;
  int n_dfp = 0, n_dfn = 0, n_ddp = 0, n_ddn = 0, n_dtchg = 0, n_conv = 0, n_min = 0;
  int n_cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model ----------------
  typedef struct { int hs; int ls; int dt; } cyc_t;
  cyc_t pend, cur, prev_acc;
  bit   pend_v = 0, cur_v = 0;
  int   cnt_f = 0, cnt_d = 0, phase = 0, prev_dt = 0;
  time  t_rise, t_fall;
  bit   seen_rise = 0, seen_fall = 0;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int sgn(int v); return v < 0 ? -1 : 1; endfunction

  always @(posedge flags.hs_fall) if (!rst) begin
    int h, l, mf, md, nf, nd;
    bit hf, hd, acc;
    h = hs_in; l = ls_in; nf = nfrac_f; nd = nfrac_d;
    mf = iabs(nf); md = iabs(nd);
    hf = (mf != 0) && (cnt_f + 1 >= mf);
    hd = (md != 0) && (cnt_d + 1 >= md);
    if (hf) l = l + sgn(nf);
    if (hd) begin h = h + sgn(nd); l = l - sgn(nd); end
    if (h < 0) h = 0; if (h > 8191) h = 8191;
    if (l < 0) l = 0; if (l > 8191) l = 8191;
    cnt_f = (hf || mf == 0) ? 0 : cnt_f + 1;
    cnt_d = (hd || md == 0) ? 0 : cnt_d + 1;
    acc = (h + l >= lim) && h != 0 && l != 0;
    if (acc) begin
      prev_acc.hs = h; prev_acc.ls = l;
      if (hf) begin if (nf > 0) n_dfp++; else n_dfn++; end
      if (hd) begin if (nd > 0) n_ddp++; else n_ddn++; end
    end else n_reject++;
    pend.hs = prev_acc.hs; pend.ls = prev_acc.ls; pend.dt = dt;
    if (pend.dt != prev_dt) n_dtchg++;
    prev_dt = pend.dt;
    pend_v = 1;
    #1;
    check(flags.lim_reject == !acc, "lim_reject flag");
  end

  always @(posedge hs_i) begin
    prev_ls = cur_v ? cur.ls : 0;
    if (seen_fall && cur_v) begin
      check($time - t_fall == time'(cur.ls * T), $sformatf("ls time %0d exp %0d", ($time - t_fall) / T, cur.ls));
    end
    if (pend_v) begin
      if (cur_v && (pend.hs != cur.hs || pend.ls != cur.ls)) n_conv++;
      // pointer bookkeeping for coverage: fine parts advance the ring phase
      if (phase + pend.hs % 128 >= 128 || (phase + pend.hs) % 128 + pend.ls % 128 >= 128) n_wrap++;
      phase = (phase + pend.hs + pend.ls) % 128;
      if (pend.hs % 128 == 0 || pend.ls % 128 == 0) n_fine0++;
      if (pend.hs <= 2 || pend.ls <= 2) n_min++;
      cur = pend; cur_v = 1; pend_v = 0;
    end else cur_v = 0;
    t_rise = $time; seen_rise = 1;
    n_cycles++;
    #1;
    if (flags.mode) n_mode1++; else n_mode0++;
  end

  always @(negedge hs_i) begin
    if (seen_rise && cur_v)
      check($time - t_rise == time'(cur.hs * T), $sformatf("hs time %0d exp %0d", ($time - t_rise) / T, cur.hs));
    t_fall = $time; seen_fall = 1;
  end

  // dead time: hs rises (dt+1) elements after hs_i, ls (dt+1) after its fall
  // (only where both the pulse and the gap before it are longer than the
  // dead time; shorter pulses are swallowed or merged by design)
  int prev_ls = 0;
  always @(posedge hs) if (cur_v && cur.dt + 1 < cur.hs && cur.dt + 1 <= prev_ls)
    check($time - t_rise == time'((cur.dt + 1) * T), "hs dead time");
  always @(posedge ls) if (pend_v && cur_v && pend.dt + 1 < cur.ls && pend.dt + 1 <= cur.hs && cur.dt + 1 <= cur.hs)
    check($time - t_fall == time'((pend.dt + 1) * T), "ls dead time");
  always @(hs or ls) if (!rst) check(!(hs && ls), "hs and ls overlap");

  // ---------------- stimulus ----------------
  task automatic cycles(input int n);
    repeat (n) @(posedge hs_i);
    #(T * $urandom_range(0, 30) + T / 2);
  endtask

  task automatic cmd(input int h, input int l);
    hs_in = W'(h); ls_in = W'(l);
  endtask

  initial begin
    rst = 0; lim = 0; dt = 6'd20; nfrac_f = 0; nfrac_d = 0;
    #(T) rst = 1;   // give the asynchronous resets an edge
    cmd(664, 644);
    #(40000 + T / 2);
    rst = 0;
    cycles(6);
    cmd(1328, 1288);           cycles(5);
    cmd(5664, 1644);           cycles(4);
    cmd(2280, 1720); dt = 40;  cycles(4);
    cmd(959, 4721);            cycles(3);
    cmd(3193, 7746);           cycles(3);
    cmd(1280, 1024); dt = 5;   cycles(3);     // fine parts zero
    cmd(128, 128);             cycles(3);
    lim = 1000;
    cmd(300, 300);             cycles(3);     // refused, previous repeats
    cmd(700, 400);             cycles(3);
    lim = 0;
    cmd(1000, 1000);
    nfrac_f = 4;               cycles(9);
    nfrac_f = -3;              cycles(7);
    nfrac_f = 0; nfrac_d = 5;  cycles(11);
    nfrac_d = -2;              cycles(5);
    nfrac_f = 7;               cycles(8);
    nfrac_f = 0; nfrac_d = 0;
    repeat (150) begin
      int h, l;
      case ($urandom_range(0, 3))
        0: begin h = $urandom_range(1, 6);    l = $urandom_range(1, 6); end
        1: begin h = $urandom_range(1, 8191); l = $urandom_range(1, 8191); end
        2: begin h = 128 * $urandom_range(1, 63); l = $urandom_range(1, 700); end
        default: begin h = $urandom_range(100, 2000); l = $urandom_range(100, 2000); end
      endcase
      cmd(h, l);
      if ($urandom_range(0, 3) == 0) dt = 6'($urandom);
      cycles($urandom_range(1, 2));
    end
    cycles(2);
    check(n_mode0 > 5,  "mode 0 cycles seen");
    check(n_mode1 > 5,  "mode 1 cycles seen");
    check(n_wrap > 0,   "pointer wrap-around seen");
    check(n_fine0 > 0,  "zero fine part seen");
    check(n_reject > 0, "limiter refusal seen");
    check(n_dfp > 0 && n_dfn > 0, "frequency dither both signs seen");
    check(n_ddp > 0 && n_ddn > 0, "duty dither both signs seen");
    check(n_dtchg > 0,  "dead-time change seen");
    check(n_conv > 10,  "command changes seen");
    check(n_min > 0,    "one- or two-element segments seen");
    $display("cycles=%0d mode0=%0d mode1=%0d wrap=%0d fine0=%0d reject=%0d dither_f=+%0d/-%0d dither_d=+%0d/-%0d dt_changes=%0d cmd_changes=%0d tiny=%0d",
             n_cycles, n_mode0, n_mode1, n_wrap, n_fine0, n_reject, n_dfp, n_dfn, n_ddp, n_ddn, n_dtchg, n_conv, n_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: the whole run is well under 2 ms of simulated time; also every
  // cycle is at most 2*8191 element delays long
  initial begin
    #(2000000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial forever begin
    #(20 * 8192 * T);
    if (!rst && $time - t_rise > 3 * 8192 * T) begin
      failures++;
      $display("FAIL watchdog: hs_i stalled");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
