`timescale 1ps / 1ps
// Test of the global synchronous timer: zero after reset, then one step per
// rising clock edge, wrapping modulo 2**T, checked against a counter kept in
// the testbench over several wraps; a second reset returns it to zero.
module tb_global_timer;
  localparam int unsigned T = 5;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [T-1:0] value;
  int checks = 0, failures = 0;

  global_timer u_dut (.clk(clk), .rst_n(rst_n), .value(value));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int unsigned ref_count;
    repeat (2) @(posedge clk);
    #100 check(value == '0, "not zero in reset");
    rst_n = 1'b1;
    ref_count = 0;
    for (int k = 0; k < 3 * 2**T + 7; k++) begin
      @(posedge clk);
      ref_count++;
      #100 check(value == T'(ref_count % 2**T),
                 $sformatf("value %0d, expected %0d", value, ref_count % 2**T));
    end
    rst_n = 1'b0;
    #100 check(value == '0, "asynchronous reset did not clear");
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
