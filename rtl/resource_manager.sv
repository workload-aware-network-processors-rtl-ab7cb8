// resource_manager: dynamic allocation of cores to services.
//
// Keeps each service's share of the data-plane cores matched to its traffic
// so that every core runs only one service's code (instruction-cache
// locality) while no service runs short. Per rate interval of INTERVAL_CYC
// clocks it counts, from the queue manager's arrival/departure pulses, the
// arrivals Ra and departures Rd of every service and computes the cores a
// service needs, C = floor(Ra / Rd1), Rd1 being the packets one core of that
// service handles per interval (rd1 input, from profiling).
//   * Needy service: C > K (K = cores it holds), or Ra > Rd while one of its
//     queues has reached HIGH_TH.
//   * Surplus: while C < K a per-service timer runs; after IDLE_TH_CYC one of
//     the service's cores is marked surplus. The mark is dropped if C >= K
//     again (the core never left). A mark that survives SLEEP_INTERVALS rate
//     intervals releases the core: it leaves the bucket list and, once its
//     queue is empty, is put to sleep (core_sleep).
//   * Allocation to a needy service, one core per service per interval:
//     a sleeping/unowned core if there is one; otherwise, in underload
//     (sum C <= N), the marked core of the service that has been marked the
//     longest; otherwise, in overload, only if K_s/N < C_s/sum C, taking a
//     core from a service holding more than its share (K_v/N > C_v/sum C).
// A moved core is always the last bucket of the donor (see lh_map_table) and
// migration-table entries pointing at it are dropped (mig_inv_*).
// The policies follow the design; the interval length, HIGH_TH, one mark per
// service, and the release of unclaimed marked cores to sleep (the combined
// scheduler/power-management configuration) are this implementation's
// reading of them.
//
// Interface/timing: at the end of each interval the manager spends
// 2*N_SERVICES clocks walking the services (release pass, then allocation
// pass); grow_*/shrink_*/mig_inv_* are one-clock commands to the scheduler,
// and shrink_core is read back from it in the same clock.
module resource_manager #(
  parameter int N_CORES         = 16,
  parameter int N_SERVICES      = 4,
  parameter int M_INIT          = 4,
  parameter int DEPTH           = 100,
  parameter int INTERVAL_CYC    = 20000,
  parameter int IDLE_TH_CYC     = 2000,
  parameter int HIGH_TH         = 50,
  parameter int SLEEP_INTERVALS = 2,
  parameter int RATE_W          = 24,
  localparam int CORE_W         = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int SW             = (N_SERVICES > 1) ? $clog2(N_SERVICES) : 1,
  localparam int BW             = $clog2(N_CORES + 1),
  localparam int QW             = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [RATE_W-1:0]  rd1 [N_SERVICES],
  input  logic [N_CORES-1:0] arr,
  input  logic [N_CORES-1:0] dep,
  input  logic [QW-1:0]      qlen [N_CORES],
  input  logic [BW-1:0]      n_buckets [N_SERVICES],
  input  logic [CORE_W-1:0]  shrink_core,
  output logic               grow_valid,
  output logic [SW-1:0]      grow_svc,
  output logic [CORE_W-1:0]  grow_core,
  output logic               shrink_valid,
  output logic [SW-1:0]      shrink_svc,
  output logic               mig_inv_valid,
  output logic [CORE_W-1:0]  mig_inv_core,
  output logic [SW-1:0]      core_svc [N_CORES],
  output logic [N_CORES-1:0] core_owned,
  output logic [N_CORES-1:0] core_sleep,
  output logic [BW-1:0]      c_need [N_SERVICES],
  output logic [N_SERVICES-1:0] surplus_mark,
  output logic               ev_interval,
  output logic               ev_release
);
  typedef enum logic [1:0] {IDLE, REL, ALLOC} phase_e;

  localparam int TW = $clog2(INTERVAL_CYC + 1);
  localparam int IW = $clog2(IDLE_TH_CYC + 1);
  localparam int AGE_W = 8;
  localparam int PW = 2 * BW + 2 * SW + 4;   // width for share products

  phase_e            phase;
  logic [SW-1:0]     idx;
  logic [TW-1:0]     tmr;
  logic [RATE_W-1:0] cnt_a [N_SERVICES];
  logic [RATE_W-1:0] cnt_d [N_SERVICES];
  logic [N_SERVICES-1:0] needy;
  logic [IW-1:0]     sur_tmr [N_SERVICES];
  logic [AGE_W-1:0]  mark_age [N_SERVICES];
  logic [BW+SW-1:0]  sum_c;

  // ---- C = floor(Ra / Rd1), saturated at N_CORES ----
  function automatic logic [BW-1:0] cores_needed(input logic [RATE_W-1:0] ra, input logic [RATE_W-1:0] r1);
    logic [BW-1:0] c;
    c = '0;
    for (int k = 1; k <= N_CORES; k++)
      if (r1 != '0 && ({{BW{1'b0}}, ra} >= (RATE_W + BW)'(k) * {{BW{1'b0}}, r1})) c = BW'(k);
    return c;
  endfunction

  // largest queue of each service
  logic [QW-1:0] maxq [N_SERVICES];
  always_comb
    for (int s = 0; s < N_SERVICES; s++) begin
      maxq[s] = '0;
      for (int c = 0; c < N_CORES; c++)
        if (core_owned[c] && core_svc[c] == SW'(s) && qlen[c] > maxq[s]) maxq[s] = qlen[c];
    end

  // free (unowned) core, lowest index
  logic              free_f;
  logic [CORE_W-1:0] free_c;
  always_comb begin
    free_f = 1'b0; free_c = '0;
    for (int c = 0; c < N_CORES; c++)
      if (!core_owned[c] && !free_f) begin free_f = 1'b1; free_c = CORE_W'(c); end
  end

  // donor choice for the service under allocation (idx)
  logic          vic_f;
  logic [SW-1:0] vic_s;
  logic          underload, eligible;
  always_comb begin
    logic [AGE_W-1:0] best_age;
    logic [PW-1:0] lhs, rhs;
    underload = (sum_c <= (BW + SW)'(N_CORES));
    lhs = PW'(n_buckets[idx]) * PW'(sum_c);
    rhs = PW'(c_need[idx]) * PW'(N_CORES);
    eligible = underload || (lhs < rhs);
    vic_f = 1'b0; vic_s = '0; best_age = '0;
    for (int s = 0; s < N_SERVICES; s++) begin
      if (SW'(s) != idx && n_buckets[s] > BW'(1)) begin
        if (underload) begin
          if (surplus_mark[s] && (!vic_f || mark_age[s] > best_age)) begin
            vic_f = 1'b1; vic_s = SW'(s); best_age = mark_age[s];
          end
        end else begin
          if (!vic_f && PW'(n_buckets[s]) * PW'(sum_c) > PW'(c_need[s]) * PW'(N_CORES)) begin
            vic_f = 1'b1; vic_s = SW'(s);
          end
        end
      end
    end
  end

  // ---- commands for this clock ----
  logic rel_now, alloc_free, alloc_take;
  assign rel_now    = (phase == REL) && surplus_mark[idx] && mark_age[idx] >= AGE_W'(SLEEP_INTERVALS)
                      && n_buckets[idx] > BW'(1);
  assign alloc_free = (phase == ALLOC) && needy[idx] && free_f;
  assign alloc_take = (phase == ALLOC) && needy[idx] && !free_f && eligible && vic_f;

  assign shrink_valid  = rel_now || alloc_take;
  assign shrink_svc    = rel_now ? idx : vic_s;
  assign grow_valid    = alloc_free || alloc_take;
  assign grow_svc      = idx;
  assign grow_core     = alloc_free ? free_c : shrink_core;
  assign mig_inv_valid = shrink_valid;
  assign mig_inv_core  = shrink_core;
  assign ev_release    = rel_now;
  assign ev_interval   = (phase == IDLE) && (tmr == TW'(INTERVAL_CYC - 1));

  always_comb
    for (int c = 0; c < N_CORES; c++) core_sleep[c] = !core_owned[c] && qlen[c] == '0;

  // next rate counts and the per-service need at the end of an interval
  logic [RATE_W-1:0] a_nxt [N_SERVICES];
  logic [RATE_W-1:0] d_nxt [N_SERVICES];
  logic [BW-1:0]     c_now [N_SERVICES];
  logic [BW+SW-1:0]  sc_now;
  always_comb begin
    sc_now = '0;
    for (int s = 0; s < N_SERVICES; s++) begin
      a_nxt[s] = cnt_a[s]; d_nxt[s] = cnt_d[s];
      for (int c = 0; c < N_CORES; c++) begin
        if (arr[c] && core_svc[c] == SW'(s)) a_nxt[s] = a_nxt[s] + 1'b1;
        if (dep[c] && core_svc[c] == SW'(s)) d_nxt[s] = d_nxt[s] + 1'b1;
      end
      c_now[s] = cores_needed(cnt_a[s], rd1[s]);
      sc_now   = sc_now + (BW + SW)'(c_now[s]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= IDLE; idx <= '0; tmr <= '0; needy <= '0; surplus_mark <= '0; sum_c <= '0;
      for (int s = 0; s < N_SERVICES; s++) begin
        cnt_a[s] <= '0; cnt_d[s] <= '0; sur_tmr[s] <= '0; mark_age[s] <= '0;
        c_need[s] <= BW'(M_INIT);
      end
      for (int c = 0; c < N_CORES; c++) begin
        core_owned[c] <= (c < N_SERVICES * M_INIT);
        core_svc[c]    <= SW'(c / M_INIT);
      end
    end else begin
      // rate counters (attributed to the service owning the core)
      for (int s = 0; s < N_SERVICES; s++) begin
        cnt_a[s] <= a_nxt[s]; cnt_d[s] <= d_nxt[s];
      end
      // surplus timers and marks
      for (int s = 0; s < N_SERVICES; s++) begin
        if (c_need[s] >= n_buckets[s]) begin
          sur_tmr[s] <= '0; surplus_mark[s] <= 1'b0; mark_age[s] <= '0;
        end else if (!surplus_mark[s] && n_buckets[s] > BW'(1)) begin
          if (sur_tmr[s] == IW'(IDLE_TH_CYC - 1)) begin
            surplus_mark[s] <= 1'b1; sur_tmr[s] <= '0; mark_age[s] <= '0;
          end else sur_tmr[s] <= sur_tmr[s] + 1'b1;
        end
      end
      // interval sequencing
      case (phase)
        IDLE: begin
          if (tmr == TW'(INTERVAL_CYC - 1)) begin
            tmr <= '0;
            for (int s = 0; s < N_SERVICES; s++) begin
              c_need[s] <= c_now[s];
              needy[s] <= (c_now[s] > n_buckets[s]) ||
                          (cnt_a[s] > cnt_d[s] && maxq[s] >= QW'(HIGH_TH));
              cnt_a[s] <= '0; cnt_d[s] <= '0;
              if (surplus_mark[s] && mark_age[s] != '1) mark_age[s] <= mark_age[s] + 1'b1;
            end
            sum_c <= sc_now;
            phase <= REL; idx <= '0;
          end else tmr <= tmr + 1'b1;
        end
        REL, ALLOC: begin
          tmr <= tmr + 1'b1;
          if (idx == SW'(N_SERVICES - 1)) begin
            idx <= '0;
            phase <= (phase == REL) ? ALLOC : IDLE;
          end else idx <= idx + 1'b1;
        end
        default: phase <= IDLE;
      endcase
      // ownership bookkeeping and mark clearing
      if (shrink_valid) begin
        core_owned[shrink_core] <= 1'b0;
        surplus_mark[shrink_svc] <= 1'b0;
        mark_age[shrink_svc] <= '0;
        sur_tmr[shrink_svc] <= '0;
      end
      if (grow_valid) begin
        core_owned[grow_core] <= 1'b1;
        core_svc[grow_core]   <= grow_svc;
      end
    end
  end
endmodule
