// Testbench of the dithering logic (K=6, P=7, 4-bit factors). For each
// factor pair the block is reset and stepped with off_trg; the expected
// outputs come from the average-value definition: with n != 0 exactly one
// cycle in every |n| (the last of each group) carries the step sgn(n) -
// period step on the low side for frequency dithering, one element moved
// from low to high side for duty dithering. Also checks that the average
// period over |n| cycles is T + sgn(n)/|n| per cycle, and the clamping at
// the ends of the command range.
module dithering_logic_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int K = 6, P = 7, NW = 4, W = K + P;

  logic rst, off_trg;
  logic [W-1:0] hs_in, ls_in, hs_out, ls_out;
  logic signed [NW-1:0] nfrac_f, nfrac_d;
  logic dither_f, dither_d;
  int checks = 0, failures = 0;

  dithering_logic #(.K(K), .P(P), .NFRAC_W(NW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input int nf, input int nd, input int h, input int l, input int ncyc);
    int mf, md, sum_t, sum_h, eh, el;
    bit hf, hd;
    rst = 1; #5 rst = 0;
    nfrac_f = NW'(nf); nfrac_d = NW'(nd); hs_in = W'(h); ls_in = W'(l);
    mf = nf < 0 ? -nf : nf;
    md = nd < 0 ? -nd : nd;
    sum_t = 0; sum_h = 0;
    for (int c = 0; c < ncyc; c++) begin
      #5;
      hf = mf != 0 && (c % mf) == mf - 1;
      hd = md != 0 && (c % md) == md - 1;
      eh = h + (hd ? (nd > 0 ? 1 : -1) : 0);
      el = l + (hf ? (nf > 0 ? 1 : -1) : 0) - (hd ? (nd > 0 ? 1 : -1) : 0);
      if (eh < 0) eh = 0; if (eh > 8191) eh = 8191;
      if (el < 0) el = 0; if (el > 8191) el = 8191;
      check(int'(hs_out) == eh && int'(ls_out) == el,
            $sformatf("nf=%0d nd=%0d cycle %0d: %0d/%0d exp %0d/%0d", nf, nd, c, hs_out, ls_out, eh, el));
      sum_t += int'(hs_out) + int'(ls_out);
      sum_h += int'(hs_out);
      off_trg = 1; #5;
      check(dither_f == hf && dither_d == hd, "dither flags");
      off_trg = 0;
    end
    if (mf != 0 && ncyc % mf == 0 && h > 1 && l > 1 && h < 8190 && l < 8190)
      check(sum_t == ncyc * (h + l) + (ncyc / mf) * (nf > 0 ? 1 : -1), "average period");
    if (md != 0 && ncyc % md == 0 && h > 1 && l > 1 && h < 8190 && l < 8190)
      check(sum_h == ncyc * h + (ncyc / md) * (nd > 0 ? 1 : -1), "average high time");
  endtask

  initial begin
    rst = 0; off_trg = 0; nfrac_f = 0; nfrac_d = 0; hs_in = 0; ls_in = 0;
    run(4, 0, 1000, 1000, 24);
    run(-3, 0, 1000, 1000, 24);
    run(0, 4, 1000, 1000, 24);
    run(0, -2, 1000, 1000, 24);
    run(7, -5, 700, 900, 70);
    run(1, 1, 100, 100, 6);
    run(0, 0, 1234, 567, 6);
    run(-1, 0, 5, 0, 4);           // clamp at zero
    run(0, 1, 8191, 10, 4);        // clamp at the top
    repeat (60) run($urandom_range(0, 14) - 7, $urandom_range(0, 14) - 7,
                    $urandom_range(1, 8190), $urandom_range(1, 8190), 42);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
