// Testbench of the multiplexer array (default P = 7): four independent random
// pointers over random tap vectors; p[i] must be tap s[i].
module mux_array_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int P = 7;
  logic [2**P-1:0] taps;
  logic [P-1:0] s [4];
  logic [3:0] p;
  int checks = 0, failures = 0;

  mux_array #(.P(P)) dut (.taps(taps), .s(s), .p(p));

  initial begin
    repeat (2000) begin
      for (int i = 0; i < 2 ** P; i += 32) taps[i +: 32] = $urandom;
      for (int i = 0; i < 4; i++) s[i] = P'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (p[i] != ((taps >> s[i]) & 1'b1)) begin failures++; $display("FAIL p%0d", i + 1); end
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
