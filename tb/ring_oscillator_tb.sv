// Testbench of the ring oscillator (default 128 elements, 200 ps): with en
// low the ring settles to all zeros; once enabled clk_base toggles every
// 2^P element delays (f_base = 1/(2^(P+1) t_de)) and tap i follows tap 0 by
// i element delays. Disabling flushes the ring again.
module ring_oscillator_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int P = 7, T = 200, HALF = (2 ** P) * T;

  logic en;
  logic [2**P-1:0] taps;
  logic clk_base;
  int checks = 0, failures = 0;

  ring_oscillator #(.P(P), .T_DE_PS(T)) dut (.en(en), .taps(taps), .clk_base(clk_base));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  time last = 0;
  int  edges = 0;
  always @(clk_base) if (en) begin
    if (edges > 0) check($time - last == HALF, "half period");
    last = $time; edges++;
  end

  // tap i must equal tap 0 as it was i element delays earlier
  always @(clk_base) if (en && edges > 2) begin
    int i;
    bit v0;
    i = $urandom_range(1, 2 ** P - 1);
    v0 = clk_base;
    fork
      automatic int ii = i;
      automatic bit vv = v0;
      begin
        #(ii * T + T / 2);
        check(taps[ii] == vv, "tap lag");
      end
    join_none
  end

  initial begin
    en = 1;
    #(T);
    en = 0;
    #(HALF + T);
    check(taps == '0, "flushed while disabled");
    edges = 0;
    #(T / 2) en = 1;
    #(40 * HALF);
    check(edges >= 39, "ring runs");
    en = 0; edges = 0;
    #(HALF + T);
    check(taps == '0, "flushed after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100 * HALF);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
