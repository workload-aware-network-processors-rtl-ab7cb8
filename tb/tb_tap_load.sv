// tb_tap_load: load sweep of TAP on a 16-core pool at the default clock and
// intervals (200 MHz, 500 us core interval, 50 us P-state interval).
// The offered load is stepped through 10, 30, 50, 70 and 90 % of what the 16
// cores can carry at full speed, eight core intervals per step. The cores are
// modelled: an application of 4000 instructions per packet at CPI 1.0 (an
// IPV4-forwarding-sized packet cost, assumed) takes 4 us at P0, i.e. 800
// clocks, and 800*100/f% clocks at a slower P-state, so one core carries 125
// packets per interval and the pool 2000.
// Checks, per step, against values worked out from the offered load:
//   * the required core count C equals ceil(16 * load) within one core;
//   * no packet is dropped up to 70 % load once the step has settled (the
//     second half of each step is measured; a step up in load can overflow
//     the queue before the next interval re-plans, as the cores are sized
//     for the interval before);
//   * the powered cores, weighted by their clock, cover the offered load;
//   * the mean number of powered cores grows with the load until the pool is
//     full (15.5 of 16 cores on), and then stays at least 15;
//   * at low load the running cores are clocked below full speed (the
//     per-core DVFS saving), and the mean clock of the running cores is higher
//     at 90 % load than at 10 %;
// and overall that every packet is either dispatched once or dropped.
module tb_tap_load;
  import np_pkg::*;
  localparam int N       = 16;
  localparam int IV      = 100000;       // core interval in clocks
  localparam int SVC_CLK = 800;          // packet service time at P0
  localparam int NSTEP   = 5;
  localparam int LOAD_PCT [NSTEP] = '{10, 30, 50, 70, 90};
  localparam int STEP_IV = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_drop;
  pkt_desc_t in_desc;
  logic [N-1:0] core_idle, disp, active;
  pkt_desc_t disp_desc;
  pstate_e ps [N];
  cstate_e cs [N];
  logic [4:0] c_req, n_on;
  logic [16:0] beta;
  logic [31:0] pred;
  logic [6:0] qlen, avg_qlen, low_th, high_th, c_th;
  logic evct, evpt, evw, evs, evd, evsl, evf, evgw, evcw, evtd, evtu;

  tap_power_manager dut (
    .clk, .rst_n, .in_valid, .in_desc, .in_drop, .core_idle, .disp, .disp_desc,
    .pstate(ps), .cstate(cs), .alpha(16'd32768), .gamma(16'd16384), .ipp(16'd4000),
    .cpi(16'd256), .c_req, .beta, .pred, .qlen, .avg_qlen, .low_th, .high_th, .c_th,
    .active, .n_on, .ev_core_tick(evct), .ev_p_tick(evpt), .ev_wake(evw), .ev_sleep(evs),
    .ev_deep(evd), .ev_slower(evsl), .ev_faster(evf), .ev_gov_wake(evgw), .ev_cth_wake(evcw),
    .ev_th_down(evtd), .ev_th_up(evtu));
  always #2.5 clk = ~clk;

  int busy [N];
  int sent = 0, dispatched = 0, dropped = 0;
  // per-step accumulators, taken over the second half of each step
  bit measuring = 0;
  longint acc_on = 0, acc_fpct = 0, acc_n = 0;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  always_comb for (int c = 0; c < N; c++) core_idle[c] = (busy[c] == 0);

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      if (disp[c]) begin
        if (!active[c] || busy[c] != 0) begin
          failures++; $display("FAIL dispatch to core %0d active=%0d busy=%0d", c, active[c], busy[c]);
        end
        dispatched++;
        busy[c] = SVC_CLK * 100 / int'(pstate_freq_pct(ps[c]));
      end else if (busy[c] > 0) busy[c]--;
    end
    if (in_valid && in_drop) dropped++;
    if (measuring) begin
      acc_n++;
      acc_on += longint'(n_on);
      for (int c = 0; c < N; c++)
        if (active[c]) acc_fpct += longint'(pstate_freq_pct(ps[c]));
    end
  end

  // Poisson-like arrivals: mean gap in hundredths of a clock, uniform jitter
  task automatic traffic(input int gap100, input int cycles);
    int t = 0;
    longint nxt = 0;
    while (t < cycles) begin
      @(negedge clk);
      in_valid = 0;
      if (longint'(t) * 100 >= nxt) begin
        in_valid = 1;
        in_desc.flow = {$urandom, $urandom, $urandom, 8'($urandom)};
        in_desc.svc = '0;
        in_desc.len = 16'(sent);
        sent++;
        nxt = nxt + longint'(gap100 / 2) + longint'($urandom_range(0, gap100));
      end
      t++;
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (NSTEP * STEP_IV * IV + 400000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mean_on100 [NSTEP];
    int mean_f [NSTEP];
    for (int c = 0; c < N; c++) busy[c] = 0;
    in_desc = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < NSTEP; s++) begin
      int gap100, exp_c, drops0;
      // pool capacity 2000 packets per interval -> mean gap IV / (20 * load%)
      gap100 = IV * 100 / (20 * LOAD_PCT[s]);
      exp_c  = (N * LOAD_PCT[s] + 99) / 100;
      traffic(gap100, STEP_IV / 2 * IV);
      drops0 = dropped;
      acc_on = 0; acc_fpct = 0; acc_n = 0; measuring = 1;
      traffic(gap100, STEP_IV / 2 * IV);
      measuring = 0;
      mean_on100[s] = int'(acc_on * 100 / acc_n);
      mean_f[s]     = int'(acc_fpct * 100 / acc_on);
      $display("load %0d%%: C %0d (expected %0d), mean cores on %0d.%02d, mean clock of running cores %0d.%02d%%, drops %0d",
               LOAD_PCT[s], c_req, exp_c, mean_on100[s] / 100, mean_on100[s] % 100,
               mean_f[s] / 100, mean_f[s] % 100, dropped - drops0);
      checks++;
      if (int'(c_req) < exp_c - 1 || int'(c_req) > exp_c + 1) begin
        failures++; $display("FAIL load %0d%%: C = %0d, expected %0d +- 1", LOAD_PCT[s], c_req, exp_c);
      end
      if (LOAD_PCT[s] <= 70) chk(dropped - drops0, 0, "no drops up to 70% load");
      // cores on x mean clock (in 1/10000) against 16 x load
      checks++;
      if (mean_on100[s] * mean_f[s] < N * LOAD_PCT[s] * 10000) begin
        failures++; $display("FAIL load %0d%%: capacity below offered load", LOAD_PCT[s]);
      end
      if (s > 0) begin
        checks++;
        if (mean_on100[s-1] >= 1550 ? mean_on100[s] < 1500 : mean_on100[s] <= mean_on100[s-1]) begin
          failures++; $display("FAIL mean cores on did not grow from %0d%% to %0d%% load", LOAD_PCT[s-1], LOAD_PCT[s]);
        end
      end
    end
    checks++;
    if (mean_f[0] >= 10000) begin failures++; $display("FAIL no DVFS saving at 10%% load"); end
    checks++;
    if (mean_f[NSTEP-1] <= mean_f[0]) begin failures++; $display("FAIL clock at 90%% load not above 10%% load"); end
    // drain
    repeat (20000) @(negedge clk);
    chk(dispatched + dropped, sent, "every packet dispatched or dropped");
    $display("sent %0d dispatched %0d dropped %0d", sent, dispatched, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
