`timescale 1ps / 1ps
// Test of the validity synchronizer with its neutral-phase reset. The
// testbench plays the input buffer (raises data_v at a random phase of the
// clock, lowers it after sync_enable falls) and the PCEHB (lowers
// sync_enable a little after data_v_sync rises, raises it again later).
// Checked: data_v_sync rises exactly on the SYNC_STAGES-th rising edge after
// data_v; it never falls while CLK is high or while sync_enable is high; it
// falls in the first low clock phase in which sync_enable is low, so the
// neutral phase costs no clock cycle.
module tb_validity_sync;
  localparam int unsigned STAGES = 2;
  localparam int PERIOD = 4000;
  logic clk = 1'b0, rst_n = 1'b0, data_v = 1'b0, sync_enable = 1'b1, data_v_sync;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  validity_sync u_dut (
    .clk(clk), .rst_n(rst_n), .data_v(data_v), .sync_enable(sync_enable),
    .data_v_sync(data_v_sync));

  always #(PERIOD/2) clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(negedge data_v_sync) if (rst_n) begin
    check(clk == 1'b0, "data_v_sync fell while CLK high");
    check(sync_enable == 1'b0, "data_v_sync fell while sync_enable high");
  end

  initial begin
    int unsigned c0;
    bit slow;
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    #100 check(data_v_sync == 1'b0, "not low after reset");
    for (int k = 0; k < 100; k++) begin
      @(posedge clk);
      #($urandom_range(50, PERIOD - 50));
      c0 = cycle;
      data_v = 1'b1;
      wait (data_v_sync === 1'b1);
      check(cycle - c0 == STAGES, $sformatf("synchronized after %0d edges", cycle - c0));
      slow = ($urandom_range(0, 2) == 0);
      if (slow) begin
        @(negedge clk);
        #300 check(data_v_sync == 1'b1, "cleared before sync_enable fell");
      end else begin
        #($urandom_range(20, 200));
      end
      sync_enable = 1'b0;
      #30 data_v = 1'b0;
      if (slow) begin
        #10 check(data_v_sync == 1'b0, "not cleared at once in the low phase");
      end else begin
        @(negedge clk);
        #10 check(data_v_sync == 1'b0, "not cleared at the falling clock edge");
      end
      c0 = cycle;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      @(negedge clk);
      #($urandom_range(50, PERIOD/2 - 50));
      check(data_v_sync == 1'b0, "set again with no data");
      sync_enable = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 10000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
