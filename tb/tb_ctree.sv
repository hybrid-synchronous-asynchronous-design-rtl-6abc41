`timescale 1ps / 1ps
// Test of the completion tree: bits become valid one at a time in random
// order and then neutral one at a time in random order. The output must stay
// low until the last bit is valid, rise then, stay high until the last bit is
// neutral, and fall then (hysteresis of the C-elements).
module tb_ctree;
  localparam int unsigned W = 13;
  logic         rst_n = 1'b0;
  logic [W-1:0] bit_v = '0;
  logic         v;
  int checks = 0, failures = 0;

  ctree u_dut (.rst_n(rst_n), .bit_v(bit_v), .v(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic shuffle(ref int unsigned order [W]);
    for (int i = 0; i < W; i++) order[i] = i;
    for (int i = W - 1; i > 0; i--) begin
      int unsigned j;
      int unsigned tmp;
      j = $urandom_range(0, i);
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
  endtask

  initial begin
    int unsigned order [W];
    #100 check(v == 1'b0, "not low in reset");
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      shuffle(order);
      for (int i = 0; i < W; i++) begin
        bit_v[order[i]] = 1'b1;
        #10 check(v == (i == W - 1), $sformatf("rising: %0d of %0d valid, v=%b", i + 1, W, v));
      end
      shuffle(order);
      for (int i = 0; i < W; i++) begin
        bit_v[order[i]] = 1'b0;
        #10 check(v == (i != W - 1), $sformatf("falling: %0d of %0d neutral, v=%b", i + 1, W, v));
      end
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
