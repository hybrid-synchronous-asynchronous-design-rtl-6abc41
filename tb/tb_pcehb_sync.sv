`timescale 1ps / 1ps
// Test of the modified PCEHB with rail converter. For each token the data
// rails are made valid first while the synchronized validity lv is still low:
// the output must stay neutral (the token may not pass before it is
// synchronized). When lv rises the single-rail output must equal the true
// rails, valid must rise and the left enable (sync_enable) fall. As a half
// buffer it must keep the token while the right enable is high, and return
// to neutral only when both the right enable is low and lv is low.
module tb_pcehb_sync;
  localparam int unsigned W = 13;
  logic         rst_n = 1'b0;
  logic [W-1:0] l_t = '0, l_f = '0, data;
  logic         lv = 1'b0, l_e, r_e = 1'b1, valid;
  int checks = 0, failures = 0;

  pcehb_sync u_dut (.rst_n(rst_n), .l_t(l_t), .l_f(l_f), .lv(lv), .l_e(l_e),
                             .r_e(r_e), .data(data), .valid(valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic [W-1:0] tok;
    #100 rst_n = 1'b1;
    #10 check(valid == 1'b0 && l_e == 1'b1 && data == '0, "reset state");
    for (int k = 0; k < 200; k++) begin
      tok = W'($urandom);
      l_t = tok; l_f = ~tok;
      #($urandom_range(10, 500));
      check(valid == 1'b0 && data == '0 && l_e == 1'b1, "output evaluated before lv");
      lv = 1'b1;
      #10 check(valid == 1'b1 && data == tok, $sformatf("data %h expected %h", data, tok));
      check(l_e == 1'b0, "sync_enable did not fall");
      // left side goes neutral and lv is cleared while the right side still holds
      #($urandom_range(10, 300));
      l_t = '0; l_f = '0;
      lv = 1'b0;
      #($urandom_range(10, 300));
      check(valid == 1'b1 && data == tok, "token lost before the right side acknowledged");
      r_e = 1'b0;
      #10 check(valid == 1'b0 && data == '0 && l_e == 1'b1, "did not return to neutral");
      #($urandom_range(10, 300));
      // right side released while lv is high again: no second evaluation
      // without new data rails
      r_e = 1'b1;
      #10 check(valid == 1'b0, "valid without a token");
    end
    // right side acknowledges first while lv still high: hold until lv falls
    tok = W'($urandom);
    l_t = tok; l_f = ~tok;
    #50 lv = 1'b1;
    #50 r_e = 1'b0;
    #50 check(valid == 1'b1, "reset while lv still high");
    lv = 1'b0;
    #10 check(valid == 1'b0, "no reset after lv fell");
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
