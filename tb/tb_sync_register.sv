`timescale 1ps / 1ps
// Test of the N-bit synchronous register / rail converter: after a rising
// edge of the gated clock the dual-rail outputs must carry the single-rail
// input (true rail = d, false rail = ~d); the reset pulse must return every
// rail to zero (neutral); input changes without a clock edge must not pass.
module tb_sync_register;
  localparam int unsigned N = 8;
  logic         reg_clk = 1'b0, reg_rst = 1'b1, rst_n = 1'b0;
  logic [N-1:0] d = '0, q_t, q_f;
  int checks = 0, failures = 0;

  sync_register u_dut (.reg_clk(reg_clk), .reg_rst(reg_rst), .rst_n(rst_n),
                                .d(d), .q_t(q_t), .q_f(q_f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic [N-1:0] v;
    #100 rst_n = 1'b1;
    reg_rst = 1'b0;
    check(q_t == '0 && q_f == '0, "not neutral after reset");
    for (int k = 0; k < 100; k++) begin
      v = N'($urandom);
      d = v;
      #100 check(q_t == '0 && q_f == '0, "data passed without a clock edge");
      reg_clk = 1'b1;
      #10 check(q_t == v && q_f == ~v, $sformatf("q_t=%h q_f=%h for d=%h", q_t, q_f, v));
      d = ~v;
      #100 check(q_t == v && q_f == ~v, "output followed d while clock high");
      reg_clk = 1'b0;
      #100 reg_rst = 1'b1;
      #10 check(q_t == '0 && q_f == '0, "reset pulse did not neutralize");
      #100 reg_rst = 1'b0;
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
