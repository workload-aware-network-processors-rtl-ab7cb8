// tb_tap_power_manager: TAP on a 4-core pool with a 1 MHz clock, so a core
// interval is 500 clocks and a P-state interval 50 clocks (the ratios to the
// 1 GHz cores are kept through IPP and CPI). The testbench models the cores:
// with IPP 20000 and CPI 1.0 a packet takes 20 clocks at P0 and 20*100/f% at
// a slower P-state, i.e. one core carries 25 packets per interval.
// Phases: light traffic (C = 1, cores sleep and go deep, P-states drop),
// heavy traffic (C rises to 4, cores wake, P-states rise), a burst past C_th
// (immediate wake) and a long burst that fills the queue (drops, thresholds
// lowered), then light traffic again (thresholds recover). Checks: every
// packet is either dispatched once or dropped, no dispatch to an inactive or
// busy core, FCFS order, C and beta in the steady phases, an immediate
// wake-up when the queue reaches C_th, and that every
// mechanism happened at least once.
module tb_tap_power_manager;
  import np_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_drop;
  pkt_desc_t in_desc;
  logic [N-1:0] core_idle, disp, active;
  pkt_desc_t disp_desc;
  pstate_e ps [N];
  cstate_e cs [N];
  logic [2:0] c_req, n_on;
  logic [16:0] beta;
  logic [31:0] pred;
  logic [6:0] qlen, avg_qlen, low_th, high_th, c_th;
  logic evct, evpt, evw, evs, evd, evsl, evf, evgw, evcw, evtd, evtu;

  tap_power_manager #(.N_CORES(N), .CLK_MHZ(1)) dut (
    .clk, .rst_n, .in_valid, .in_desc, .in_drop, .core_idle, .disp, .disp_desc,
    .pstate(ps), .cstate(cs), .alpha(16'd32768), .gamma(16'd16384), .ipp(16'd20000),
    .cpi(16'd256), .c_req, .beta, .pred, .qlen, .avg_qlen, .low_th, .high_th, .c_th,
    .active, .n_on, .ev_core_tick(evct), .ev_p_tick(evpt), .ev_wake(evw), .ev_sleep(evs),
    .ev_deep(evd), .ev_slower(evsl), .ev_faster(evf), .ev_gov_wake(evgw), .ev_cth_wake(evcw),
    .ev_th_down(evtd), .ev_th_up(evtu));
  always #5 clk = ~clk;

  int busy [N];
  int sent = 0, dispatched = 0, dropped = 0, next_exp = 0;
  int n_ev [11];
  logic [15:0] drop_ids [$];

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  always_comb for (int c = 0; c < N; c++) core_idle[c] = (busy[c] == 0);

  // core model and dispatch checks
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      if (disp[c]) begin
        if (!active[c] || busy[c] != 0) begin
          failures++; $display("FAIL dispatch to core %0d active=%0d busy=%0d", c, active[c], busy[c]);
        end
        // packets are numbered in len; drops are skipped in the expected order
        while (drop_ids.size() > 0 && int'(drop_ids[0]) == next_exp) begin
          void'(drop_ids.pop_front()); next_exp++;
        end
        if (int'(disp_desc.len) != next_exp) begin
          failures++; $display("FAIL order: got %0d exp %0d", disp_desc.len, next_exp);
        end
        next_exp = int'(disp_desc.len) + 1;
        dispatched++;
        busy[c] = 2000 / int'(pstate_freq_pct(ps[c]));
      end else if (busy[c] > 0) busy[c]--;
    end
    if (in_valid && in_drop) begin dropped++; drop_ids.push_back(in_desc.len); end
    n_ev[0] += int'(evct); n_ev[1] += int'(evpt); n_ev[2] += int'(evw); n_ev[3] += int'(evs);
    n_ev[4] += int'(evd); n_ev[5] += int'(evsl); n_ev[6] += int'(evf); n_ev[7] += int'(evgw);
    n_ev[8] += int'(evcw); n_ev[9] += int'(evtd); n_ev[10] += int'(evtu);
  end

  // the queue reaching C_th must start a wake-up at once (within two clocks)
  // whenever some core is still asleep
  int cth_pending = 0;
  logic cth_sleeper;
  always @(posedge clk) if (rst_n) begin
    if (cth_pending > 0) begin
      if (evw) cth_pending = 0;
      else if (cth_pending == 1) begin
        failures++; $display("FAIL queue reached C_th but no core was woken");
        cth_pending = 0;
      end else cth_pending--;
    end
    if (evcw && cth_sleeper) begin checks++; cth_pending = 3; end
  end
  always_comb begin
    cth_sleeper = 1'b0;
    for (int c = 0; c < N; c++) if (cs[c] == C1 || cs[c] == C2) cth_sleeper = 1'b1;
  end

  // send a packet every `gap` clocks (with +-gap/2 jitter) for `cycles` clocks
  task automatic traffic(input int gap, input int cycles);
    int t = 0, nxt = 0;
    while (t < cycles) begin
      @(negedge clk);
      in_valid = 0;
      if (t >= nxt) begin
        in_valid = 1;
        in_desc.flow = {$urandom, $urandom, $urandom, 8'($urandom)};
        in_desc.svc = '0;
        in_desc.len = 16'(sent);
        sent++;
        nxt = t + ((gap > 1) ? gap / 2 + int'($urandom_range(0, gap - 1)) : 1);
      end
      t++;
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string EVN [11] = '{"core_tick", "p_tick", "wake", "sleep", "deep", "slower",
                                 "faster", "gov_wake", "cth_wake", "th_down", "th_up"};
  initial begin
    int max_p;
    for (int c = 0; c < N; c++) busy[c] = 0;
    for (int e = 0; e < 11; e++) n_ev[e] = 0;
    in_desc = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(int'(c_th), 40, "C_th = Qmax - 40");
    // light: ~10 packets per interval -> C = 1
    traffic(50, 5000);
    chk(int'(c_req), 1, "light traffic: C = 1");
    chk(int'(n_on), 1, "light traffic: one core on");
    chk(int'(cs[3]), int'(C2), "idle core in deep sleep");
    max_p = 0;
    for (int c = 0; c < N; c++) if (int'(ps[c]) > max_p) max_p = int'(ps[c]);
    chk(int'(max_p > 0), 1, "light traffic: core slowed");
    // heavy: ~80 packets per interval = 3.2 cores -> C = 4
    traffic(6, 5000);
    chk(int'(c_req), 4, "heavy traffic: C = 4");
    chk(int'(n_on), 4, "heavy traffic: all on");
    checks++;
    if (beta < 17'd40000 || beta > 17'd65536) begin
      failures++; $display("FAIL heavy beta %0d (pred %0d)", beta, pred);
    end
    // light again to let cores sleep, then a burst of 60 back-to-back packets
    traffic(50, 2000);
    traffic(1, 60);
    traffic(50, 1000);
    // long overload: the queue fills and drops
    traffic(1, 400);
    traffic(200, 60000);
    repeat (500) @(negedge clk);
    chk(dispatched + dropped, sent, "every packet dispatched or dropped");
    chk(int'(dropped > 0), 1, "queue overflow dropped packets");
    chk(int'(high_th), 40, "thresholds recovered after quiet period");
    for (int e = 0; e < 11; e++) begin
      checks++;
      if (n_ev[e] == 0) begin failures++; $display("FAIL mechanism %s never happened", EVN[e]); end
    end
    $display("sent %0d dispatched %0d dropped %0d; events tick %0d wake %0d sleep %0d deep %0d slower %0d faster %0d govwake %0d cthwake %0d down %0d up %0d",
             sent, dispatched, dropped, n_ev[0], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7], n_ev[8], n_ev[9], n_ev[10]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
