// tap_power_manager: Traffic Aware Power management (TAP) for a core pool.
//
// Runs a pool of DVFS-capable cores fed first-come-first-served from one
// global input queue, and keeps as few cores powered, as slowly clocked, as
// the traffic allows:
//   * every core interval (500 us) the packets that arrived are counted; the
//     DES predictor forecasts the next interval's count, the traffic-factor
//     unit turns it (with the application's IPP and CPI) into beta and the
//     required core count C, and the C-state manager wakes or puts to sleep
//     cores to match C;
//   * the queue length is low-pass filtered at every arrival; every P-state
//     interval (50 us) the P-state governor slows the fastest core when the
//     average is below low_th and speeds up the slowest one above high_th,
//     asking for one more core when all already run at P0;
//   * the instantaneous queue reaching C_th wakes one more core at once;
//   * the thresholds adapt to the traffic (threshold_adapt).
// The scheme follows the design. The clock (CLK_MHZ), mapping the intervals
// and wake-up times to clock counts, and dispatching the queue head to the
// lowest-numbered idle running core are this implementation's choices.
//
// Interface/timing: in_valid/in_desc enqueue a packet (in_drop if the queue is
// full). Core c signals core_idle[c] when it can take a packet; disp[c]
// pulses for one clock with the head descriptor on disp_desc. pstate[] and
// cstate[] are the power-state commands to the cores' clock/voltage and
// power-gating controls. alpha/gamma (Q0.16), ipp and cpi (Q8.8) are
// configuration registers.
module tap_power_manager
  import np_pkg::*;
#(
  parameter int N_CORES         = 16,
  parameter int Q_MAX           = 80,
  parameter int CLK_MHZ         = 200,
  parameter int CORE_INTERVAL_US = 500,
  parameter int P_INTERVAL_US   = 50,
  parameter int F_MAX_MHZ       = 1000,
  parameter int C1_WAKE_US      = 10,
  parameter int C2_WAKE_US      = 100,
  localparam int BW             = $clog2(N_CORES + 1),
  localparam int Q_W            = $clog2(Q_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  pkt_desc_t          in_desc,
  output logic               in_drop,
  input  logic [N_CORES-1:0] core_idle,
  output logic [N_CORES-1:0] disp,
  output pkt_desc_t          disp_desc,
  output pstate_e            pstate [N_CORES],
  output cstate_e            cstate [N_CORES],
  input  logic [15:0]        alpha,
  input  logic [15:0]        gamma,
  input  logic [15:0]        ipp,
  input  logic [15:0]        cpi,
  output logic [BW-1:0]      c_req,
  output logic [16:0]        beta,
  output logic [31:0]        pred,
  output logic [Q_W-1:0]     qlen,
  output logic [Q_W-1:0]     avg_qlen,
  output logic [Q_W-1:0]     low_th,
  output logic [Q_W-1:0]     high_th,
  output logic [Q_W-1:0]     c_th,
  output logic [N_CORES-1:0] active,
  output logic [BW-1:0]      n_on,
  output logic               ev_core_tick,
  output logic               ev_p_tick,
  output logic               ev_wake,
  output logic               ev_sleep,
  output logic               ev_deep,
  output logic               ev_slower,
  output logic               ev_faster,
  output logic               ev_gov_wake,
  output logic               ev_cth_wake,
  output logic               ev_th_down,
  output logic               ev_th_up
);
  localparam int CORE_IV = CLK_MHZ * CORE_INTERVAL_US;
  localparam int P_IV    = CLK_MHZ * P_INTERVAL_US;
  localparam int CTW     = $clog2(CORE_IV + 1);
  localparam int PTW     = $clog2(P_IV + 1);
  localparam int CIDX_W  = (N_CORES > 1) ? $clog2(N_CORES) : 1;

  // ---- global FCFS queue and dispatcher ----
  logic     q_full, q_empty, q_pop;
  pkt_desc_t q_head;
  logic     disp_f;
  logic [CIDX_W-1:0] disp_c;

  pkt_fifo #(.W(DESC_W), .DEPTH(Q_MAX)) u_q (
    .clk, .rst_n, .push(in_valid), .din(in_desc), .full(q_full),
    .pop(q_pop), .dout(q_head), .empty(q_empty), .count(qlen));
  assign in_drop = in_valid && q_full;

  always_comb begin
    disp_f = 1'b0; disp_c = '0;
    for (int c = 0; c < N_CORES; c++)
      if (!disp_f && active[c] && core_idle[c]) begin disp_f = 1'b1; disp_c = CIDX_W'(c); end
  end
  assign q_pop = disp_f && !q_empty;
  always_comb begin
    disp = '0;
    if (q_pop) disp[disp_c] = 1'b1;
  end
  assign disp_desc = q_head;

  // ---- interval timers and arrival counter ----
  logic [CTW-1:0] ctmr;
  logic [PTW-1:0] ptmr;
  logic [31:0]    arrivals;
  assign ev_core_tick = (ctmr == CTW'(CORE_IV - 1));
  assign ev_p_tick    = (ptmr == PTW'(P_IV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctmr <= '0; ptmr <= '0; arrivals <= '0;
    end else begin
      ctmr <= ev_core_tick ? '0 : ctmr + 1'b1;
      ptmr <= ev_p_tick ? '0 : ptmr + 1'b1;
      if (ev_core_tick) arrivals <= 32'(in_valid);
      else if (in_valid) arrivals <= arrivals + 1'b1;
    end
  end

  // ---- prediction -> traffic factor -> core count ----
  logic pred_valid, tf_done;
  des_predictor #(.X_W(32), .FRAC(16)) u_des (
    .clk, .rst_n, .x_valid(ev_core_tick), .x(arrivals), .alpha, .gamma,
    .pred(pred), .pred_valid(pred_valid));

  traffic_factor #(.N_CORES(N_CORES), .CYC_PER_INTERVAL(F_MAX_MHZ * CORE_INTERVAL_US), .X_W(32)) u_tf (
    .clk, .rst_n, .start(pred_valid), .pred(pred), .ipp, .cpi,
    .done(tf_done), .c_req(c_req), .beta(beta));

  // ---- queue average, thresholds, P-states ----
  logic [Q_W+15:0] avg_full;
  logic            gov_wake;
  queue_avg #(.Q_W(Q_W), .ALPHA_Q16(1638)) u_avg (
    .clk, .rst_n, .sample(in_valid), .qlen(qlen), .avg_int(avg_qlen), .avg_q16(avg_full));

  threshold_adapt #(.Q_MAX(Q_MAX), .WAKE_BUF(40), .QUIET_INTERVALS(10)) u_th (
    .clk, .rst_n, .tick(ev_p_tick), .qlen(qlen), .low_th, .high_th, .c_th,
    .ev_down(ev_th_down), .ev_up(ev_th_up));

  pstate_governor #(.N_CORES(N_CORES), .N_PSTATES(5), .Q_W(Q_W)) u_gov (
    .clk, .rst_n, .tick(ev_p_tick), .avg(avg_qlen), .low_th, .high_th, .active,
    .pstate, .wake_req(gov_wake), .ev_slower, .ev_faster);
  assign ev_gov_wake = gov_wake;

  // queue crossing C_th wakes one core
  logic above_c;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) above_c <= 1'b0;
    else        above_c <= (qlen >= c_th);
  assign ev_cth_wake = (qlen >= c_th) && !above_c;

  cstate_manager #(.N_CORES(N_CORES), .C1_INTERVALS(2),
                   .WAKE_C1_CYC(CLK_MHZ * C1_WAKE_US), .WAKE_C2_CYC(CLK_MHZ * C2_WAKE_US)) u_cst (
    .clk, .rst_n, .tick(tf_done), .c_req(c_req), .wake_one(gov_wake || ev_cth_wake),
    .cstate, .active, .n_on, .ev_wake, .ev_sleep, .ev_deep);
endmodule
