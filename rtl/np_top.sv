// np_top: workload-aware network-processor front end.
//
// Two subsystems that share nothing but the clock and reset:
//
// 1. Data-plane scheduling (LAPS) for N_CORES single-service processing
//    cores. Every arriving packet descriptor is mapped by laps_scheduler
//    (CRC16 hash, per-service linear-hashing map table, migration table,
//    aggressive flow detector) to a core and written into that core's input
//    queue in queue_manager, which drops it if the queue is full. The queue
//    manager reports the longest queue (load imbalance) and the least loaded
//    core of each service back to the scheduler. resource_manager watches
//    per-service arrival/departure rates and queue lengths and moves cores
//    between services by growing/shrinking their map tables; cores nobody
//    needs are released and put to sleep (core_sleep).
//
// 2. Traffic-aware power management (TAP) for a pool of TAP_N_CORES
//    DVFS-capable cores fed FCFS from one global queue: tap_power_manager
//    predicts the load, keeps the right number of cores powered and sets each
//    core's P-state.
//
// The processing cores themselves are outside: they take packets through the
// per-core dequeue ports (LAPS) or the dispatch ports (TAP), and receive the
// sleep, C-state and P-state commands.
//
// Timing: one packet per clock into each subsystem; a LAPS packet enters its
// core queue two clocks after pkt_valid (decision register, queue write).
module np_top
  import np_pkg::*;
#(
  parameter int N_CORES         = 16,
  parameter int N_SERVICES      = 4,
  parameter int M_INIT          = 4,
  parameter int DEPTH           = 100,
  parameter int IMB_TH          = 75,
  parameter int AFC_N           = 16,
  parameter int ANNEX_N         = 512,
  parameter int ANNEX_WAYS      = 4,
  parameter int MIG_N           = 32,
  parameter int AFD_SAMPLE_LOG2 = 0,
  parameter int RM_INTERVAL_CYC = 20000,
  parameter int IDLE_TH_CYC     = 2000,
  parameter int HIGH_TH         = 50,
  parameter int TAP_N_CORES     = 16,
  parameter int Q_MAX           = 80,
  parameter int CLK_MHZ         = 200,
  localparam int CORE_W         = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int SW             = (N_SERVICES > 1) ? $clog2(N_SERVICES) : 1,
  localparam int BW             = $clog2(N_CORES + 1),
  localparam int QW             = $clog2(DEPTH + 1),
  localparam int TBW            = $clog2(TAP_N_CORES + 1),
  localparam int TQW            = $clog2(Q_MAX + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // ---- LAPS data plane ----
  input  logic                pkt_valid,
  input  pkt_desc_t           pkt_desc,
  output logic                pkt_drop,
  input  logic [N_CORES-1:0]  core_deq_ready,
  output logic [N_CORES-1:0]  core_deq_valid,
  output pkt_desc_t           core_deq_desc [N_CORES],
  output logic [N_CORES-1:0]  core_sleep,
  output logic [SW-1:0]       core_svc [N_CORES],
  output logic [N_CORES-1:0]  core_owned,
  output logic [QW-1:0]       core_qlen [N_CORES],
  input  logic [23:0]         rd1 [N_SERVICES],
  output logic [BW-1:0]       svc_cores [N_SERVICES],
  output logic [BW-1:0]       svc_need [N_SERVICES],
  output logic                ev_imbalance,
  output logic                ev_migrate,
  output logic                ev_mig_hit,
  output logic                ev_promote,
  output logic                ev_grow,
  output logic                ev_shrink,
  output logic                ev_release,
  output logic                ev_rm_interval,
  // ---- TAP core pool ----
  input  logic                tap_in_valid,
  input  pkt_desc_t           tap_in_desc,
  output logic                tap_in_drop,
  input  logic [TAP_N_CORES-1:0] tap_core_idle,
  output logic [TAP_N_CORES-1:0] tap_disp,
  output pkt_desc_t           tap_disp_desc,
  output pstate_e             tap_pstate [TAP_N_CORES],
  output cstate_e             tap_cstate [TAP_N_CORES],
  input  logic [15:0]         tap_alpha,
  input  logic [15:0]         tap_gamma,
  input  logic [15:0]         tap_ipp,
  input  logic [15:0]         tap_cpi,
  output logic [TBW-1:0]      tap_c_req,
  output logic [16:0]         tap_beta,
  output logic [31:0]         tap_pred,
  output logic [TQW-1:0]      tap_qlen,
  output logic [TQW-1:0]      tap_avg_qlen,
  output logic [TBW-1:0]      tap_n_on,
  output logic [10:0]         tap_events
);
  // ================= LAPS =================
  logic              s_valid, s_migrated, s_mig_hit;
  logic [CORE_W-1:0] s_core;
  pkt_desc_t         s_desc;
  logic              imbalance;
  logic [CORE_W-1:0] max_core;
  logic [CORE_W-1:0] least_core [N_SERVICES];
  logic [N_SERVICES-1:0] least_valid;
  logic              grow_valid, shrink_valid, mig_inv_valid;
  logic [SW-1:0]     grow_svc, shrink_svc;
  logic [CORE_W-1:0] grow_core, shrink_core, mig_inv_core;
  logic [N_CORES-1:0] arr, dep;
  logic [N_SERVICES-1:0] surplus_mark;

  laps_scheduler #(.N_CORES(N_CORES), .N_SERVICES(N_SERVICES), .M_INIT(M_INIT), .AFC_N(AFC_N),
                   .ANNEX_N(ANNEX_N), .ANNEX_WAYS(ANNEX_WAYS), .MIG_N(MIG_N),
                   .AFD_SAMPLE_LOG2(AFD_SAMPLE_LOG2)) u_laps (
    .clk, .rst_n, .in_valid(pkt_valid), .in_desc(pkt_desc),
    .out_valid(s_valid), .out_core(s_core), .out_desc(s_desc), .out_migrated(s_migrated),
    .out_mig_hit(s_mig_hit), .afd_promote(ev_promote),
    .imbalance, .max_core, .least_core, .least_valid,
    .grow_valid, .grow_svc, .grow_core, .shrink_valid, .shrink_svc, .shrink_core,
    .n_buckets(svc_cores), .mig_inv_valid, .mig_inv_core);

  queue_manager #(.N_CORES(N_CORES), .N_SERVICES(N_SERVICES), .DEPTH(DEPTH), .IMB_TH(IMB_TH)) u_qm (
    .clk, .rst_n, .enq_valid(s_valid), .enq_core(s_core), .enq_desc(s_desc), .enq_drop(pkt_drop),
    .deq_ready(core_deq_ready), .deq_valid(core_deq_valid), .deq_desc(core_deq_desc),
    .core_svc, .core_owned, .qlen(core_qlen), .arr, .dep,
    .imbalance, .max_core, .least_core, .least_valid);

  resource_manager #(.N_CORES(N_CORES), .N_SERVICES(N_SERVICES), .M_INIT(M_INIT), .DEPTH(DEPTH),
                     .INTERVAL_CYC(RM_INTERVAL_CYC), .IDLE_TH_CYC(IDLE_TH_CYC), .HIGH_TH(HIGH_TH),
                     .SLEEP_INTERVALS(2), .RATE_W(24)) u_rm (
    .clk, .rst_n, .rd1, .arr, .dep, .qlen(core_qlen), .n_buckets(svc_cores), .shrink_core,
    .grow_valid, .grow_svc, .grow_core, .shrink_valid, .shrink_svc, .mig_inv_valid, .mig_inv_core,
    .core_svc, .core_owned, .core_sleep, .c_need(svc_need), .surplus_mark,
    .ev_interval(ev_rm_interval), .ev_release);

  assign ev_imbalance = imbalance;
  assign ev_migrate   = s_migrated;
  assign ev_mig_hit   = s_mig_hit;
  assign ev_grow      = grow_valid;
  assign ev_shrink    = shrink_valid;

  // ================= TAP =================
  logic [TQW-1:0] low_th, high_th, c_th;
  logic [TAP_N_CORES-1:0] tap_active;

  tap_power_manager #(.N_CORES(TAP_N_CORES), .Q_MAX(Q_MAX), .CLK_MHZ(CLK_MHZ)) u_tap (
    .clk, .rst_n, .in_valid(tap_in_valid), .in_desc(tap_in_desc), .in_drop(tap_in_drop),
    .core_idle(tap_core_idle), .disp(tap_disp), .disp_desc(tap_disp_desc),
    .pstate(tap_pstate), .cstate(tap_cstate),
    .alpha(tap_alpha), .gamma(tap_gamma), .ipp(tap_ipp), .cpi(tap_cpi),
    .c_req(tap_c_req), .beta(tap_beta), .pred(tap_pred), .qlen(tap_qlen), .avg_qlen(tap_avg_qlen),
    .low_th, .high_th, .c_th, .active(tap_active), .n_on(tap_n_on),
    .ev_core_tick(tap_events[0]), .ev_p_tick(tap_events[1]), .ev_wake(tap_events[2]),
    .ev_sleep(tap_events[3]), .ev_deep(tap_events[4]), .ev_slower(tap_events[5]),
    .ev_faster(tap_events[6]), .ev_gov_wake(tap_events[7]), .ev_cth_wake(tap_events[8]),
    .ev_th_down(tap_events[9]), .ev_th_up(tap_events[10]));
endmodule
