// tb_np_top: end-to-end run of both subsystems at a reduced size.
// LAPS: 8 cores, 2 services starting with 2 cores each (cores 4-7 free and
// asleep), 16-entry core queues, imbalance at 12, small AFD/migration tables,
// 200-clock rate intervals. The testbench models the cores (8 clocks per
// packet, so Rd1 = 25 packets per interval) and sends:
//   A: service 0 at ~100 packets/interval, half of them from two heavy
//      flows, service 1 idle -> service 0 grows, service 1 shrinks and
//      releases a core, heavy flows are detected and migrated;
//   B: both services at ~67 packets/interval;
//   C: 1 packet per clock -> overload and drops;
//   then drains.
// TAP: 4 cores, 1 MHz clock (500-clock core interval), light, heavy, burst,
// overload and quiet phases at the same time.
// Checks: packet conservation in both subsystems, per-core FIFO order per
// flow, no dequeue from a sleeping core, no dispatch to an inactive or busy
// TAP core, and that every mechanism happened at least once.
module tb_np_top;
  import np_pkg::*;
  localparam int NC = 8, NS = 2, TN = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic pkt_valid = 0, pkt_drop;
  pkt_desc_t pkt_desc;
  logic [NC-1:0] deq_ready, deq_valid, core_sleep, core_owned;
  pkt_desc_t deq_desc [NC];
  logic core_svc [NC];
  logic [4:0] core_qlen [NC];
  logic [23:0] rd1 [NS] = '{24'd25, 24'd25};
  logic [3:0] svc_cores [NS], svc_need [NS];
  logic ev_imb, ev_mig, ev_mhit, ev_prom, ev_grow, ev_shr, ev_rel, ev_rmi;

  logic tap_valid = 0, tap_drop;
  pkt_desc_t tap_desc;
  logic [TN-1:0] tap_idle, tap_disp;
  pkt_desc_t tap_disp_desc;
  pstate_e tap_ps [TN];
  cstate_e tap_cs [TN];
  logic [2:0] tap_c_req, tap_n_on;
  logic [16:0] tap_beta;
  logic [31:0] tap_pred;
  logic [6:0] tap_qlen, tap_avg;
  logic [10:0] tap_ev;

  np_top #(.N_CORES(NC), .N_SERVICES(NS), .M_INIT(2), .DEPTH(16), .IMB_TH(12), .AFC_N(4),
           .ANNEX_N(16), .ANNEX_WAYS(4), .MIG_N(4), .RM_INTERVAL_CYC(200), .IDLE_TH_CYC(40),
           .HIGH_TH(8), .TAP_N_CORES(TN), .Q_MAX(80), .CLK_MHZ(1)) dut (
    .clk, .rst_n, .pkt_valid, .pkt_desc, .pkt_drop, .core_deq_ready(deq_ready),
    .core_deq_valid(deq_valid), .core_deq_desc(deq_desc), .core_sleep, .core_svc, .core_owned,
    .core_qlen, .rd1, .svc_cores, .svc_need, .ev_imbalance(ev_imb), .ev_migrate(ev_mig),
    .ev_mig_hit(ev_mhit), .ev_promote(ev_prom), .ev_grow(ev_grow), .ev_shrink(ev_shr),
    .ev_release(ev_rel), .ev_rm_interval(ev_rmi),
    .tap_in_valid(tap_valid), .tap_in_desc(tap_desc), .tap_in_drop(tap_drop),
    .tap_core_idle(tap_idle), .tap_disp, .tap_disp_desc, .tap_pstate(tap_ps), .tap_cstate(tap_cs),
    .tap_alpha(16'd32768), .tap_gamma(16'd16384), .tap_ipp(16'd20000), .tap_cpi(16'd256),
    .tap_c_req, .tap_beta, .tap_pred, .tap_qlen, .tap_avg_qlen(tap_avg), .tap_n_on,
    .tap_events(tap_ev));
  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // ---------------- LAPS side ----------------
  localparam int NFLOW = 66;           // flows 0,1: heavy (svc 0); 2..33 svc 0; 34..65 svc 1
  flow_id_t flows [NFLOW];
  int busy [NC];
  int last_seq [NC][NFLOW];
  int sent = 0, served = 0, dropped = 0, seq = 0;
  int n_imb = 0, n_mig = 0, n_mhit = 0, n_prom = 0, n_grow = 0, n_shr = 0, n_rel = 0, n_rmi = 0;
  int max_svc0 = 0;

  always_comb for (int c = 0; c < NC; c++) deq_ready[c] = deq_valid[c] && busy[c] == 0;

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (deq_valid[c] && core_sleep[c]) begin
        failures++; $display("FAIL core %0d asleep with packets queued", c);
      end
      if (deq_ready[c]) begin
        int f, s;
        f = int'(deq_desc[c].flow[7:0]);
        // len carries the low 16 bits of the sequence number; a queued packet
        // is far less than 2^16 packets old, so unwrap against the current one
        s = seq - int'(16'(seq - int'(deq_desc[c].len)));
        if (f < NFLOW) begin
          if (s <= last_seq[c][f]) begin
            failures++; $display("FAIL core %0d flow %0d out of order (%0d after %0d)", c, f, s, last_seq[c][f]);
          end
          last_seq[c][f] = s;
        end
        served++;
        busy[c] = 7;
      end else if (busy[c] > 0) busy[c]--;
    end
    if (pkt_drop) dropped++;
    n_imb += int'(ev_imb); n_mig += int'(ev_mig); n_mhit += int'(ev_mhit); n_prom += int'(ev_prom);
    n_grow += int'(ev_grow); n_shr += int'(ev_shr); n_rel += int'(ev_rel); n_rmi += int'(ev_rmi);
    if (int'(svc_cores[0]) > max_svc0) max_svc0 = int'(svc_cores[0]);
  end

  function automatic int pick_flow(input int svc);
    if (svc == 1) return 34 + int'($urandom_range(0, 31));
    if ($urandom_range(0, 1) == 0) return int'($urandom_range(0, 1));
    return 2 + int'($urandom_range(0, 31));
  endfunction

  // each clock: svc 0 packet with probability p0/100, else svc 1 with p1/100
  task automatic laps_traffic(input int p0, input int p1, input int cycles);
    for (int t = 0; t < cycles; t++) begin
      int r, f;
      @(negedge clk);
      pkt_valid = 0;
      r = int'($urandom_range(0, 99));
      f = -1;
      if (r < p0) f = pick_flow(0);
      else if (r < p0 + p1) f = pick_flow(1);
      if (f >= 0) begin
        pkt_valid = 1;
        pkt_desc.flow = flows[f];
        pkt_desc.svc = (f >= 34) ? 2'd1 : 2'd0;
        pkt_desc.len = 16'(seq);
        seq++; sent++;
      end
    end
    @(negedge clk); pkt_valid = 0;
  endtask

  // ---------------- TAP side ----------------
  int tbusy [TN];
  int tsent = 0, tdisp = 0, tdrop = 0;
  int tev [11];
  always_comb for (int c = 0; c < TN; c++) tap_idle[c] = (tbusy[c] == 0);

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < TN; c++) begin
      if (tap_disp[c]) begin
        if (tap_cs[c] != C0 || tbusy[c] != 0) begin
          failures++; $display("FAIL TAP dispatch to core %0d", c);
        end
        tdisp++;
        tbusy[c] = 2000 / int'(pstate_freq_pct(tap_ps[c]));
      end else if (tbusy[c] > 0) tbusy[c]--;
    end
    if (tap_valid && tap_drop) tdrop++;
    for (int e = 0; e < 11; e++) tev[e] += int'(tap_ev[e]);
  end

  task automatic tap_traffic(input int gap, input int cycles);
    int t = 0, nxt = 0;
    while (t < cycles) begin
      @(negedge clk);
      tap_valid = 0;
      if (t >= nxt) begin
        tap_valid = 1;
        tap_desc.flow = {$urandom, $urandom, $urandom, 8'($urandom)};
        tap_desc.len = 16'(tsent);
        tsent++;
        nxt = t + ((gap > 1) ? gap / 2 + int'($urandom_range(0, gap - 1)) : 1);
      end
      t++;
    end
    @(negedge clk); tap_valid = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string TEVN [11] = '{"tap core interval", "tap P-state interval", "tap wake",
    "tap sleep", "tap deep sleep", "tap slow down", "tap speed up", "tap governor wake",
    "tap C_th wake", "tap thresholds down", "tap thresholds up"};

  initial begin
    for (int f = 0; f < NFLOW; f++) flows[f] = {$urandom, $urandom, $urandom, 8'(f)};
    for (int c = 0; c < NC; c++) begin
      busy[c] = 0;
      for (int f = 0; f < NFLOW; f++) last_seq[c][f] = -1;
    end
    for (int c = 0; c < TN; c++) tbusy[c] = 0;
    for (int e = 0; e < 11; e++) tev[e] = 0;
    pkt_desc = '0; tap_desc = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      begin
        laps_traffic(50, 0, 3000);
        chk(int'(svc_cores[0] >= 3), 1, "service 0 grew");
        chk(int'(svc_cores[1] <= 1), 1, "idle service 1 shrank");
        laps_traffic(33, 33, 3000);
        laps_traffic(50, 50, 2000);
        repeat (3000) @(negedge clk);
      end
      begin
        tap_traffic(50, 5000);
        tap_traffic(6, 5000);
        tap_traffic(50, 2000);
        tap_traffic(1, 60);
        tap_traffic(50, 1000);
        tap_traffic(1, 400);
        tap_traffic(200, 60000);
        repeat (500) @(negedge clk);
      end
    join
    chk(served + dropped, sent, "LAPS: every packet served or dropped");
    chk(tdisp + tdrop, tsent, "TAP: every packet dispatched or dropped");
    begin
      int cnt [8];
      string nm [8];
      cnt = '{n_imb, n_mig, n_mhit, n_prom, n_grow, n_shr, n_rel, dropped};
      nm = '{"imbalance", "migration", "migration-table hit", "AFC promotion",
                        "core allocation", "core removal", "core release", "queue drop"};
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    checks++;
    if (tdrop == 0) begin failures++; $display("FAIL mechanism tap queue drop never happened"); end
    for (int e = 0; e < 11; e++) begin
      checks++;
      if (tev[e] == 0) begin failures++; $display("FAIL mechanism %s never happened", TEVN[e]); end
    end
    $display("LAPS sent %0d served %0d dropped %0d imb %0d mig %0d mhit %0d prom %0d grow %0d shrink %0d release %0d max_svc0 %0d",
             sent, served, dropped, n_imb, n_mig, n_mhit, n_prom, n_grow, n_shr, n_rel, max_svc0);
    $display("TAP sent %0d dispatched %0d dropped %0d", tsent, tdisp, tdrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
