// Testbench of the output logic: drives the per-mode hs_on/hs_off flags in
// the order the counter-comparators produce them (including the overlap of a
// rising hs_on with a still-high off_trg at a cycle start) and checks on_trg,
// off_trg, the mode toggle on every cycle start, hs_i and ls_i.
module output_logic_tb;
  timeunit 1ps; timeprecision 1ps;
  logic rst;
  logic [1:0] hs_on, hs_off;
  logic on_trg, off_trg, mode, hs_i, ls_i;
  int checks = 0, failures = 0;

  output_logic dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    bit m;
    rst = 0; hs_on = 0; hs_off = 0;
    #5 rst = 1;
    #10;
    check(mode == 0 && hs_i == 0 && ls_i == 1, "reset state");
    rst = 0;
    #10;
    m = 0;
    for (int c = 0; c < 40; c++) begin
      // high-side segment of mode m ends: hs_off[m] rises, clears the other
      hs_off[m] = 1;
      #1;
      hs_on[!m] = 0;             // other mode cleared by this off_trg
      #9;
      check(off_trg && !on_trg, "off_trg high, on_trg low");
      check(hs_i == 0 && ls_i == 1, "hs_i low after hs_off");
      // cycle ends: hs_on[m] rises; mode flips; hs_off[m] drops (qualified)
      hs_on[m] = 1;
      #1;
      check(mode == !m, "mode toggled on cycle start");
      hs_off[m] = 0;
      #1;
      check(hs_i == 1 && ls_i == 0 && on_trg && !off_trg, "hs_i high in new cycle");
      m = !m;
      #8;
      check(mode == m, "mode stable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
