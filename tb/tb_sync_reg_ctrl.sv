`timescale 1ps / 1ps
// Exhaustive test of the synchronous register's clock and reset generator:
// reg_clk = valid & match & CLK_delayed and reg_rst = NOR(CLK, CLK_delayed)
// for all 16 input combinations.
module tb_sync_reg_ctrl;
  logic clk, clk_delayed, valid, match, reg_clk, reg_rst;
  int checks = 0, failures = 0;

  sync_reg_ctrl u_dut (.clk(clk), .clk_delayed(clk_delayed), .valid(valid),
                       .match(match), .reg_clk(reg_clk), .reg_rst(reg_rst));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {clk, clk_delayed, valid, match} = 4'(v);
      #10;
      checks += 2;
      if (reg_clk !== (valid && match && clk_delayed)) begin
        failures++;
        $display("FAIL: inputs %b reg_clk=%b", 4'(v), reg_clk);
      end
      if (reg_rst !== (!clk && !clk_delayed)) begin
        failures++;
        $display("FAIL: inputs %b reg_rst=%b", 4'(v), reg_rst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
