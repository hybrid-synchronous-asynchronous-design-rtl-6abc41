`timescale 1ps / 1ps
// End-to-end test of the asynchronous-to-synchronous interface, default parameters (two synchronizing flip-flops).
//
// A four-phase dual-rail sender feeds tokens {DRTV, data}; a fast receiver
// acknowledges each output token and records the data, the timer value and
// the clock cycle at which it appeared. Checked against values computed here:
//  * data arrive complete, in order, and each token appears in the cycle in
//    which the global timer equals its DRTV (exact release time);
//  * a token sent into an idle interface reaches the PCEHB after exactly
//    SYNC_STAGES rising clock edges (synchronization latency);
//  * back-to-back tokens whose DRTVs are SYNC_STAGES apart are released
//    exactly SYNC_STAGES cycles apart (the interface's peak rate);
//  * a token whose DRTV has just passed waits for the timer to wrap.
// The mechanisms of the design (hold for release time, release, neutral-phase
// flip-flop reset, register reset, input-side back-pressure, early release of
// the sender by the full buffer, timer wrap) are counted and each must occur.
module tb_async_sync_interface;
  localparam int unsigned N      = async_sync_pkg::N_DATA;
  localparam int unsigned T      = async_sync_pkg::T_BITS;
  localparam int unsigned W      = N + T;
  localparam int unsigned STAGES = async_sync_pkg::SYNC_STAGES;
  localparam int          PERIOD = 4000;  // ps
  localparam int          NTOK   = 48;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [W-1:0] in_t = '0, in_f = '0;
  logic         in_e;
  logic [N-1:0] out_t, out_f;
  logic         out_v;
  logic         out_e = 1'b1;
  logic [T-1:0] timer_value;

  async_sync_interface u_dut (
    .clk(clk), .rst_n(rst_n), .in_t(in_t), .in_f(in_f), .in_e(in_e),
    .out_t(out_t), .out_f(out_f), .out_v(out_v), .out_e(out_e),
    .timer_value(timer_value));

  always #(PERIOD/2) clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- sender ----------------
  logic [T-1:0] exp_drtv [$];
  logic [N-1:0] exp_data [$];

  task automatic send(input logic [T-1:0] drtv, input logic [N-1:0] data);
    logic [W-1:0] tok;
    tok = {drtv, data};
    exp_drtv.push_back(drtv);
    exp_data.push_back(data);
    wait (in_e === 1'b1);
    #50;
    in_t = tok;
    in_f = ~tok;
    wait (in_e === 1'b0);
    #50;
    in_t = '0;
    in_f = '0;
  endtask

  // ---------------- receiver ----------------
  int unsigned   n_recv = 0;
  int unsigned   rel_cycle [$];
  always @(posedge out_v) begin
    logic [T-1:0] d;
    logic [N-1:0] q;
    check((out_t & out_f) == '0 && (out_t | out_f) == '1, "output token not a complete dual-rail word");
    if (exp_drtv.size() == 0) begin
      check(1'b0, "unexpected output token");
    end else begin
      d = exp_drtv.pop_front();
      q = exp_data.pop_front();
      check(out_t == q, $sformatf("data %h, expected %h", out_t, q));
      check(timer_value == d, $sformatf("released at timer %0d, DRTV %0d", timer_value, d));
    end
    rel_cycle.push_back(cycle);
    n_recv++;
    #100 out_e = 1'b0;
    wait (out_v === 1'b0);
    #100 out_e = 1'b1;
  end

  // ---------------- mechanism counters ----------------
  int n_hold = 0, n_release = 0, n_ff_reset = 0, n_reg_reset = 0;
  int n_backpressure = 0, n_early_left = 0, n_wrap = 0;
  always @(posedge u_dut.clk_delayed) if (rst_n && u_dut.valid && !u_dut.match) n_hold++;
  always @(posedge u_dut.reg_clk) if (rst_n) n_release++;
  always @(posedge u_dut.u_vsync.ff_reset) if (rst_n) n_ff_reset++;
  always @(posedge u_dut.reg_rst) if (rst_n && u_dut.sreg_v) n_reg_reset++;
  always @(posedge clk) if (rst_n && u_dut.in_v && !u_dut.sync_enable) n_backpressure++;
  always @(posedge in_e) if (rst_n && u_dut.buf_v) n_early_left++;
  always @(posedge clk) if (rst_n && timer_value == '1) n_wrap++;

  // synchronization latency: rising edges from a token entering the input
  // buffer in an idle interface until the PCEHB holds it
  task automatic measure_latency(input logic [N-1:0] data);
    int unsigned c0;
    @(posedge clk);
    #(PERIOD/4);
    c0 = cycle;
    fork
      send(timer_value + T'(8), data);
      begin
        wait (u_dut.valid === 1'b1);
        check(cycle - c0 == STAGES,
              $sformatf("sync latency %0d cycles, expected %0d", cycle - c0, STAGES));
      end
    join
    wait (exp_drtv.size() == 0);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [T-1:0] base;
    int unsigned  first;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. isolated tokens: latency and exact release
    for (int k = 0; k < 4; k++) measure_latency(N'($urandom));

    // 2. a DRTV just in the past waits for the timer to wrap
    @(posedge clk);
    #(PERIOD/4);
    send(timer_value - T'(1), N'($urandom));
    wait (exp_drtv.size() == 0);
    repeat (2) @(posedge clk);

    // 3. back-to-back burst at the peak rate
    @(posedge clk);
    #(PERIOD/4);
    base  = timer_value + T'(6);
    first = n_recv;
    for (int k = 0; k < 10; k++) send(base + T'(STAGES * k), N'($urandom));
    wait (exp_drtv.size() == 0);
    for (int k = 1; k < 10; k++)
      check(rel_cycle[first+k] - rel_cycle[first+k-1] == STAGES,
            $sformatf("burst token %0d released %0d cycles after the previous one",
                      k, rel_cycle[first+k] - rel_cycle[first+k-1]));
    repeat (2) @(posedge clk);

    // 4. random tokens sent as fast as the interface takes them
    for (int k = 0; k < NTOK; k++) begin
      send(timer_value + T'($urandom_range(1, 12)), N'($urandom));
      if ($urandom_range(0, 3) == 0) #($urandom_range(100, 3 * PERIOD));
    end
    wait (exp_drtv.size() == 0);
    repeat (4) @(posedge clk);

    check(n_recv == 4 + 1 + 10 + NTOK, $sformatf("received %0d tokens", n_recv));
    check(n_release == n_recv, $sformatf("register clocked %0d times for %0d tokens", n_release, n_recv));
    $display("mechanisms: hold=%0d release=%0d ff_reset=%0d reg_reset=%0d backpressure=%0d early_left=%0d wrap=%0d",
             n_hold, n_release, n_ff_reset, n_reg_reset, n_backpressure, n_early_left, n_wrap);
    check(n_hold > 0, "no token was held for its release time");
    check(n_release > 0, "no token was released");
    check(n_ff_reset > 0, "no neutral-phase flip-flop reset");
    check(n_reg_reset > 0, "no register reset after a release");
    check(n_backpressure > 0, "no token waited behind a held token");
    check(n_early_left > 0, "the input full buffer never released the sender early");
    check(n_wrap > 0, "the timer never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 20000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
