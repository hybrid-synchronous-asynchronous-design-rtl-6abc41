`timescale 1ps / 1ps
// Test of the synchronizer flip-flop: random data and random asynchronous
// reset pulses; after each rising clock edge q must equal d sampled at the
// edge, and while the reset is high q must be zero, checked against a model
// kept in the testbench.
module tb_c2mos_dff;
  logic clk = 1'b0, rst = 1'b1, d = 1'b0, q;
  logic expected;
  int checks = 0, failures = 0;

  c2mos_dff u_dut (.clk(clk), .rst(rst), .d(d), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    expected = 1'b0;
    #100 check(q == 1'b0, "reset");
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      d = 1'($urandom);
      #400 clk = 1'b1;
      expected = d;
      #10 check(q == expected, "q after rising edge");
      d = ~d;                     // a change while clock is high is not taken
      #400 check(q == expected, "q changed without an edge");
      if ($urandom_range(0, 3) == 0) begin
        rst = 1'b1;
        expected = 1'b0;
        #10 check(q == 1'b0, "q not cleared by reset");
        #50 rst = 1'b0;
      end
      #200 clk = 1'b0;
      #10 check(q == expected, "q changed on falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
