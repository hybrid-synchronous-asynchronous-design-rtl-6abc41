`timescale 1ps / 1ps
// Test of the clock delay line model: both edges of CLK_delayed must follow
// the edges of CLK by exactly 9 pairs x 44 ps = 396 ps, the value worked out
// from the default parameters, for a clock period of 4 ns.
module tb_clk_delay;
  localparam int EXPECTED = 9 * 44;
  logic clk = 1'b0, clk_delayed;
  int checks = 0, failures = 0;
  time t_clk;

  clk_delay u_dut (.clk(clk), .clk_delayed(clk_delayed));

  always #2000 clk = ~clk;

  always @(posedge clk or negedge clk) t_clk = $time;
  always @(clk_delayed) if ($time > 2000) begin
    checks++;
    if ($time - t_clk != EXPECTED || clk_delayed !== clk) begin
      failures++;
      $display("FAIL @%0t: delay %0t, expected %0d", $time, $time - t_clk, EXPECTED);
    end
  end

  initial begin
    #50_000;
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
