`timescale 1ps / 1ps
// Test of the pre-charge full buffer with a four-phase dual-rail sender and
// receiver. Tokens with random values pass with random delays on both sides;
// the receiver must see them complete, in order and unchanged. It also checks
// the full-buffer property: while the receiver stalls with a token at the
// output, the sender's handshake for that token still completes (l_e falls
// and rises again), and the next token is not copied to the output until the
// receiver has finished its handshake.
module tb_pcfb;
  localparam int unsigned W = 13;
  localparam int NTOK = 200;
  logic         rst_n = 1'b0;
  logic [W-1:0] l_t = '0, l_f = '0, r_t, r_f;
  logic         l_v = 1'b0, l_e, r_v, r_e = 1'b1;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  int n_recv = 0, n_decoupled = 0;
  bit stall_mode = 1'b0;

  pcfb u_dut (.rst_n(rst_n), .l_t(l_t), .l_f(l_f), .l_v(l_v), .l_e(l_e),
                       .r_t(r_t), .r_f(r_f), .r_v(r_v), .r_e(r_e));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic send(input logic [W-1:0] tok);
    wait (l_e === 1'b1);
    #($urandom_range(1, 300));
    sent.push_back(tok);
    l_t = tok; l_f = ~tok;
    #20 l_v = 1'b1;
    wait (l_e === 1'b0);
    #($urandom_range(1, 300));
    l_t = '0; l_f = '0;
    #20 l_v = 1'b0;
  endtask

  // receiver
  initial begin
    logic [W-1:0] exp_tok;
    forever begin
      wait (r_v === 1'b1);
      check((r_t & r_f) == '0 && (r_t | r_f) == '1, "output not a complete dual-rail word");
      exp_tok = sent.pop_front();
      check(r_t == exp_tok, $sformatf("got %h expected %h", r_t, exp_tok));
      n_recv++;
      if (stall_mode) begin
        // hold the token; the left side must still finish its handshake
        wait (l_e === 1'b0);
        wait (l_e === 1'b1);
        n_decoupled++;
        #500 check(r_v === 1'b1 && r_t == exp_tok, "output changed while receiver stalled");
      end else begin
        #($urandom_range(1, 300));
      end
      r_e = 1'b0;
      wait (r_v === 1'b0);
      check(r_t == '0 && r_f == '0, "output not neutral");
      #($urandom_range(1, 300));
      r_e = 1'b1;
    end
  end

  initial begin
    #100 rst_n = 1'b1;
    check(l_e === 1'b1 && r_v === 1'b0, "reset state");
    for (int k = 0; k < NTOK; k++) send(W'($urandom));
    wait (n_recv == NTOK);
    stall_mode = 1'b1;
    for (int k = 0; k < 20; k++) send(W'($urandom));
    wait (n_recv == NTOK + 20);
    #2000;
    check(n_decoupled == 20, $sformatf("left handshake completed under a stalled right side %0d of 20 times", n_decoupled));
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
