// tb_pstate_governor: 4 cores, thresholds low 10 / high 40. A low average
// slows the fastest core each tick (lowest index on ties) down to P4; a high
// average speeds up the slowest core; at all-P0 it asks for a wake-up; a
// middle average changes nothing; an inactive core is held at P0 and ignored.
module tb_pstate_governor;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tick = 0, wk, evs, evf;
  logic [6:0] avg = '0;
  logic [3:0] act = 4'hF;
  pstate_e ps [4];

  pstate_governor #(.N_CORES(4), .Q_W(7)) dut (.clk, .rst_n, .tick, .avg, .low_th(7'd10),
    .high_th(7'd40), .active(act), .pstate(ps), .wake_req(wk), .ev_slower(evs), .ev_faster(evf));
  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic do_tick();
    @(negedge clk); tick = 1; @(negedge clk); tick = 0;
  endtask
  function automatic int sum_ps();
    int s = 0;
    for (int c = 0; c < 4; c++) s += int'(ps[c]);
    return s;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    avg = 5;
    do_tick(); chk(int'(ps[0]), 1, "fastest core (0) slowed"); chk(int'(evs), 1, "slower event");
    do_tick(); chk(int'(ps[1]), 1, "next fastest (1) slowed");
    do_tick(); do_tick(); chk(sum_ps(), 4, "all at P1");
    do_tick(); chk(int'(ps[0]), 2, "core 0 to P2");
    repeat (20) do_tick(); chk(sum_ps(), 16, "all at P4, no further");
    avg = 20;
    do_tick(); chk(sum_ps(), 16, "between thresholds: no change");
    avg = 40;
    do_tick(); chk(int'(ps[0]), 3, "avg = high_th: slowest (lowest index) sped up"); chk(int'(evf), 1, "faster event");
    avg = 50;
    repeat (15) do_tick(); chk(sum_ps(), 0, "all back at P0");
    chk(int'(wk), 0, "no wake while a core could speed up");
    do_tick(); chk(int'(wk), 1, "all at P0: wake request");
    // core 3 inactive: forced to P0 and never chosen
    avg = 5; act = 4'b0111;
    repeat (3) do_tick(); chk(int'(ps[3]), 0, "inactive core held at P0");
    chk(sum_ps(), 3, "only active cores slowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
