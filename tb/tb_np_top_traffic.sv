// tb_np_top_traffic: the full-size LAPS half of np_top (default parameters)
// under the multi-service traffic model of the evaluation, once with the
// underload parameter set and once with the overload set.
//
// Traffic: service s receives y_s(t) = a + b*t + c*S(t mod m) + noise million
// packets per second, with t in seconds, S a sine of period m, and Gaussian
// noise of standard deviation sigma*a. The parameter sets are:
//            S1 (a b c m sigma)      S2               S3                S4
//   Set 1: .6 .03 .3 40 .1    .7 .025 .1 25 .05  .3 .01 .07 60 .25  .1 .005 .09 600 .3
//   Set 2: 1.2 .002 .3 100 .3 1.0 .02 .15 25 .05 .7 .004 .25 30 .25 .4 .01 .18 200 .3
// The 60 s of model time are compressed into SIM_CYC clocks (rates stay in
// real packets per second at the 200 MHz clock, only the slow trend and
// season are sped up).
// Core model: service times per packet at 200 MHz are
//   S1: 3.7 us + 0.23 us per 64 bytes, S2: 0.5 us, S3: 3.53 us,
//   S4: 5.8 us + 0.21 us per 64 bytes,
// plus a 10 us cold-instruction-cache penalty when a core runs a packet of
// another service than its previous one. Packet sizes are uniform in
// 64..1024 bytes; each service has 64 flows with a skewed (cubic) popularity.
// rd1 is each service's packets per 100 us interval at its mean service time.
// Checks per set: conservation, per-core FIFO order within each flow, no
// packet on a sleeping core, cores re-assigned between services at least
// once; across sets: the overload set loses a larger share of its packets.
module tb_np_top_traffic;
  import np_pkg::*;
  localparam int NC = 16, NS = 4, TN = 16;
  localparam int SIM_CYC = 3000000;       // 60 s of model time
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic pkt_valid = 0, pkt_drop;
  pkt_desc_t pkt_desc;
  logic [NC-1:0] deq_ready, deq_valid, core_sleep, core_owned;
  pkt_desc_t deq_desc [NC];
  logic [1:0] core_svc [NC];
  logic [6:0] core_qlen [NC];
  logic [23:0] rd1 [NS] = '{24'd17, 24'd200, 24'd28, 24'd13};
  logic [4:0] svc_cores [NS], svc_need [NS];
  logic ev_imb, ev_mig, ev_mhit, ev_prom, ev_grow, ev_shr, ev_rel, ev_rmi;
  logic tap_drop;
  logic [TN-1:0] tap_disp;
  pkt_desc_t tap_disp_desc;
  pstate_e tap_ps [TN];
  cstate_e tap_cs [TN];
  logic [4:0] tap_c_req, tap_n_on;
  logic [16:0] tap_beta;
  logic [31:0] tap_pred;
  logic [6:0] tap_qlen, tap_avg;
  logic [10:0] tap_ev;

  np_top dut (
    .clk, .rst_n, .pkt_valid, .pkt_desc, .pkt_drop, .core_deq_ready(deq_ready),
    .core_deq_valid(deq_valid), .core_deq_desc(deq_desc), .core_sleep, .core_svc, .core_owned,
    .core_qlen, .rd1, .svc_cores, .svc_need, .ev_imbalance(ev_imb), .ev_migrate(ev_mig),
    .ev_mig_hit(ev_mhit), .ev_promote(ev_prom), .ev_grow(ev_grow), .ev_shrink(ev_shr),
    .ev_release(ev_rel), .ev_rm_interval(ev_rmi),
    .tap_in_valid(1'b0), .tap_in_desc('0), .tap_in_drop(tap_drop),
    .tap_core_idle('1), .tap_disp, .tap_disp_desc, .tap_pstate(tap_ps), .tap_cstate(tap_cs),
    .tap_alpha(16'd32768), .tap_gamma(16'd16384), .tap_ipp(16'd2000), .tap_cpi(16'd256),
    .tap_c_req, .tap_beta, .tap_pred, .tap_qlen, .tap_avg_qlen(tap_avg), .tap_n_on,
    .tap_events(tap_ev));
  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  localparam int NFLOW = 64 * NS;
  flow_id_t flows [NFLOW];
  int busy [NC], last_svc [NC];
  int last_seq [NC][NFLOW];
  int sent, served, dropped, seq, cold, n_grow, n_shr, n_mig;

  always_comb for (int c = 0; c < NC; c++) deq_ready[c] = deq_valid[c] && busy[c] == 0;

  function automatic int svc_time(input int s, input int len);
    case (s)
      0: return 740 + (len * 46) / 64;
      1: return 100;
      2: return 706;
      default: return 1160 + (len * 42) / 64;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (deq_valid[c] && core_sleep[c]) begin
        failures++; $display("FAIL core %0d asleep with packets queued", c);
      end
      if (deq_ready[c]) begin
        int f, s, sv;
        f = int'(deq_desc[c].flow[15:0]);
        s = seq - int'(16'(seq - int'(deq_desc[c].len[15:0])));
        sv = int'(deq_desc[c].svc);
        if (s <= last_seq[c][f]) begin
          failures++; $display("FAIL core %0d flow %0d out of order", c, f);
        end
        last_seq[c][f] = s;
        served++;
        busy[c] = svc_time(sv, 64 + int'(deq_desc[c].flow[31:16]) % 961) - 1;
        if (last_svc[c] >= 0 && last_svc[c] != sv) begin busy[c] += 2000; cold++; end
        last_svc[c] = sv;
      end else if (busy[c] > 0) busy[c]--;
    end
    if (pkt_drop) dropped++;
    n_grow += int'(ev_grow); n_shr += int'(ev_shr); n_mig += int'(ev_mig);
  end

  // standard normal sample from twelve uniforms
  function automatic real gauss();
    real g = 0.0;
    for (int i = 0; i < 12; i++) g += real'($urandom_range(0, 65535)) / 65536.0;
    return g - 6.0;
  endfunction

  real pa [2][NS] = '{'{0.6, 0.7, 0.3, 0.1}, '{1.2, 1.0, 0.7, 0.4}};
  real pb [2][NS] = '{'{0.03, 0.025, 0.01, 0.005}, '{0.002, 0.02, 0.004, 0.01}};
  real pc [2][NS] = '{'{0.3, 0.1, 0.07, 0.09}, '{0.3, 0.15, 0.25, 0.18}};
  real pm [2][NS] = '{'{40.0, 25.0, 60.0, 600.0}, '{100.0, 25.0, 30.0, 200.0}};
  real ps [2][NS] = '{'{0.1, 0.05, 0.25, 0.3}, '{0.3, 0.05, 0.25, 0.3}};

  real loss [2];

  task automatic run_set(input int set);
    real rate [NS];
    int lsb;
    rst_n = 0;
    sent = 0; served = 0; dropped = 0; seq = 0; cold = 0; n_grow = 0; n_shr = 0; n_mig = 0;
    for (int c = 0; c < NC; c++) begin
      busy[c] = 0; last_svc[c] = -1;
      for (int f = 0; f < NFLOW; f++) last_seq[c][f] = -1;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < SIM_CYC; t++) begin
      @(negedge clk);
      pkt_valid = 0;
      // re-evaluate the rates every 20000 clocks (0.4 s of model time)
      if (t % 20000 == 0) begin
        real tm;
        tm = 60.0 * real'(t) / real'(SIM_CYC);
        for (int s = 0; s < NS; s++) begin
          rate[s] = pa[set][s] + pb[set][s] * tm
                    + pc[set][s] * $sin(2.0 * 3.14159265 * (tm - pm[set][s] * $floor(tm / pm[set][s])) / pm[set][s])
                    + ps[set][s] * pa[set][s] * gauss();
          if (rate[s] < 0.0) rate[s] = 0.0;
        end
      end
      begin
        int r, acc, f;
        r = int'($urandom_range(0, 1999999));     // per-clock probability in 1/2e6
        acc = 0; f = -1;
        for (int s = 0; s < NS; s++) begin
          int p;
          p = int'(rate[s] * 10000.0);              // rate Mpps / 200 MHz * 2e6
          if (f < 0 && r < acc + p) begin
            real u;
            u = real'($urandom_range(0, 65535)) / 65536.0;
            f = 64 * s + int'(64.0 * u * u * u);
            pkt_desc.svc = 2'(s);
          end
          acc += p;
        end
        if (f >= 0) begin
          pkt_valid = 1;
          pkt_desc.flow = flows[f];
          pkt_desc.len = 16'(seq);
          seq++; sent++;
        end
      end
    end
    @(negedge clk); pkt_valid = 0;
    // drain: wait until every queue is empty and every core idle
    for (int w = 0; w < 600000; w++) begin
      bit idle = (deq_valid == '0);
      for (int c = 0; c < NC; c++) if (busy[c] != 0) idle = 0;
      if (idle) break;
      @(negedge clk);
    end
    chk(served + dropped, sent, $sformatf("set %0d: every packet served or dropped", set + 1));
    checks++;
    if (n_grow == 0 || n_shr == 0) begin
      failures++; $display("FAIL set %0d: no core moved between services", set + 1);
    end
    loss[set] = real'(dropped) / real'(sent);
    $display("set %0d: sent %0d served %0d dropped %0d (%0.2f%%) cold %0d grow %0d shrink %0d migrations %0d",
             set + 1, sent, served, dropped, 100.0 * loss[set], cold, n_grow, n_shr, n_mig);
  endtask

  initial begin
    repeat (2 * SIM_CYC + 1300000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // flow IDs: random five-tuples; bits 15:0 carry the flow number, bits
    // 31:16 a random value that sets the packet size of the flow's packets
    for (int f = 0; f < NFLOW; f++) flows[f] = {$urandom, $urandom, $urandom, $urandom_range(0, 255)};
    for (int f = 0; f < NFLOW; f++) begin flows[f][15:0] = 16'(f); end
    pkt_desc = '0;
    run_set(0);
    run_set(1);
    checks++;
    if (!(loss[1] > loss[0])) begin
      failures++; $display("FAIL overload set does not lose more than the underload set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
