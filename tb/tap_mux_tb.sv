// Testbench of the 2^W:1 tap multiplexer (default W = 7): random tap vectors,
// every select value, result compared with a shift of the vector.
module tap_mux_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 7;
  logic [2**W-1:0] taps;
  logic [W-1:0] sel;
  logic y;
  int checks = 0, failures = 0;

  tap_mux #(.W(W)) dut (.taps(taps), .sel(sel), .y(y));

  initial begin
    repeat (20) begin
      for (int i = 0; i < 2 ** W; i += 32) taps[i +: 32] = $urandom;
      for (int s = 0; s < 2 ** W; s++) begin
        sel = W'(s);
        #1;
        checks++;
        if (y != ((taps >> s) & 1'b1)) begin failures++; $display("FAIL sel %0d", s); end
      end
    end
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
