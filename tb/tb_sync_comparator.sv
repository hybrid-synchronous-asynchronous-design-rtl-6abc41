`timescale 1ps / 1ps
// Exhaustive test of the release-time comparator: for every pair of T-bit
// DRTV and timer values, match must be high exactly when they are equal.
module tb_sync_comparator;
  localparam int unsigned T = 5;
  logic [T-1:0] drtv, timer_value;
  logic         match;
  int checks = 0, failures = 0;

  sync_comparator u_dut (.drtv(drtv), .timer_value(timer_value), .match(match));

  initial begin
    for (int a = 0; a < 2**T; a++)
      for (int b = 0; b < 2**T; b++) begin
        drtv = T'(a);
        timer_value = T'(b);
        #10;
        checks++;
        if (match !== (a == b)) begin
          failures++;
          $display("FAIL: drtv=%0d timer=%0d match=%b", a, b, match);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
