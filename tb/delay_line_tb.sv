// Testbench of the behavioural delay line (default 128 elements, 200 ps).
// din gets random pulses of 1 to 6 element delays on a 100 ps grid; a history
// of din is kept and every tap is compared with din as it was (j+1) element
// delays earlier, at points between the grid steps.
module delay_line_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 128, T = 200, STEPS = 6000;

  logic din;
  logic [N-1:0] taps;
  bit hist [STEPS];   // din per 100 ps step
  int checks = 0, failures = 0;

  delay_line #(.N(N), .T_DE_PS(T)) dut (.din(din), .taps(taps));

  initial begin
    int k = 0;
    din = 0;
    while (k < STEPS) begin
      int len;
      bit v;
      len = $urandom_range(2, 12);
      v = ($urandom_range(0, 1) == 1);
      repeat (len) if (k < STEPS) begin
        din = v; hist[k] = v; k++; #(T / 2);
      end
    end
  end

  initial begin
    #(T / 4);
    for (int step = 0; step < STEPS; step++) begin
      int j, back;
      j = $urandom_range(0, N - 1);
      back = step - 2 * (j + 1);
      if (back >= 0) begin
        checks++;
        if (taps[j] !== hist[back]) begin
          failures++;
          if (failures < 10) $display("FAIL tap %0d at %0t", j, $time);
        end
      end
      #(T / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(STEPS * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
