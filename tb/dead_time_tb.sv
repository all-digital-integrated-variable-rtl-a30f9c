// Testbench of the programmable dead time (D = 6, 200 ps elements). hs_i gets
// random high and low segments longer than the dead time; dt changes at
// random while the line is settled. Checks: hs rises (dt+1) element delays
// after hs_i rises and falls with it, ls rises (dt+1) element delays after
// hs_i falls and falls with its rise, and hs and ls are never high together.
module dead_time_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int D = 6, T = 200;

  logic hs_i, hs, ls;
  logic [D-1:0] dt;
  int checks = 0, failures = 0;
  time t_r, t_f;
  int n_pulses = 0, n_hs = 0, n_ls = 0;
  always @(posedge hs) n_hs++;
  always @(posedge ls) if ($time > 0) n_ls++;

  dead_time #(.D(D), .T_DE_PS(T)) dut (.hs_i(hs_i), .dt(dt), .hs(hs), .ls(ls));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge hs) check($time - t_r == time'((int'(dt) + 1) * T), "hs dead time");
  always @(posedge ls) if ($time > 0) check($time - t_f == time'((int'(dt) + 1) * T), "ls dead time");
  always @(negedge hs) check($time == t_f, "hs falls with hs_i");
  always @(negedge ls) if ($time > 0) check($time == t_r, "ls falls with hs_i");
  always @(hs or ls) check(!(hs && ls), "no overlap");

  initial begin
    hs_i = 0; dt = 0;
    #(70 * T);
    repeat (300) begin
      // settled line: change dt
      if ($urandom_range(0, 1) == 1) dt = D'($urandom);
      #(T / 2);
      hs_i = 1; t_r = $time;
      n_pulses++;
      #(T * (int'(dt) + 1) + T / 2);
      check(hs == 1 && ls == 0, "hs on after dead time");
      #(T * $urandom_range(1, 134));
      hs_i = 0; t_f = $time;
      #(T / 2);
      check(hs == 0 && ls == 0, "both off during dead time");
      #(T * (int'(dt) + 1));
      check(hs == 0 && ls == 1, "ls on after dead time");
      #(T * $urandom_range(64, 134));   // line settled before dt may change
    end
    check(n_hs == n_pulses && n_ls == n_pulses, "one hs and one ls pulse per hs_i pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 500 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
