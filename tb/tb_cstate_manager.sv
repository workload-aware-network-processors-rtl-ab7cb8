// tb_cstate_manager: 4 cores, C1 for 2 intervals, wake-up 5 clocks from C1
// and 20 from C2. Checks sleeping the highest cores to match C, the C1 -> C2
// step after two intervals, wake_one, wake latencies from each state, C1
// cores woken before C2 ones, and that core 0 stays on.
module tb_cstate_manager;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tick = 0, w1 = 0, evw, evs, evd;
  logic [2:0] creq = 3'd4, non;
  logic [3:0] act;
  cstate_e cs [4];

  cstate_manager #(.N_CORES(4), .C1_INTERVALS(2), .WAKE_C1_CYC(5), .WAKE_C2_CYC(20)) dut (
    .clk, .rst_n, .tick, .c_req(creq), .wake_one(w1), .cstate(cs), .active(act), .n_on(non),
    .ev_wake(evw), .ev_sleep(evs), .ev_deep(evd));
  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic do_tick();
    @(negedge clk); tick = 1; @(negedge clk); tick = 0;
  endtask
  task automatic wait_active(input int c, input int exp_cyc, input string what);
    int n = 0;
    while (!act[c] && n < 100) begin @(negedge clk); n++; end
    chk(n, exp_cyc, what);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); chk(int'(non), 4, "all on after reset");
    creq = 2; do_tick();
    chk(int'(act), 4'b0011, "cores 3,2 sleep"); chk(int'(cs[3]), int'(C1), "in C1"); chk(int'(evs), 1, "sleep event");
    do_tick(); chk(int'(cs[3]), int'(C1), "still C1 after 1 interval");
    do_tick(); chk(int'(cs[3]), int'(C2), "C2 after 2 intervals"); chk(int'(evd), 1, "deep event");
    creq = 1; do_tick();
    chk(int'(cs[1]), int'(C1), "core 1 to C1"); chk(int'(act), 4'b0001, "only core 0");
    creq = 0; do_tick(); chk(int'(act), 4'b0001, "core 0 never sleeps");
    // wake_one: core 1 in C1 first (5 clocks)
    @(negedge clk); w1 = 1; @(negedge clk); w1 = 0;
    chk(int'(cs[1]), int'(C_WAKE), "core 1 waking"); chk(int'(evw), 1, "wake event");
    wait_active(1, 5, "C1 wake-up latency");
    @(negedge clk); w1 = 1; @(negedge clk); w1 = 0;
    chk(int'(cs[2]), int'(C_WAKE), "then core 2 from C2");
    wait_active(2, 20, "C2 wake-up latency");
    chk(int'(non), 3, "three on");
    creq = 4; do_tick(); chk(int'(cs[3]), int'(C_WAKE), "tick wakes the rest");
    wait_active(3, 20, "core 3 from C2");
    chk(int'(non), 4, "all on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
