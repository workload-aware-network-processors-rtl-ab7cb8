// pstate_governor: global queue-driven P-state (DVFS) governor.
//
// Corrects, at the short 50 us scale, for over-prediction and for traffic
// changing inside a 500 us core-count interval. On every tick it compares the
// filtered queue length avg with two thresholds:
//   * avg <  low_th : the fastest active core (lowest P-state number) steps
//                     one P-state down in speed (P-state number + 1), unless
//                     every active core is already at the slowest state;
//   * avg >= high_th: the slowest active core steps one P-state up in speed;
//                     if all active cores already run at P0, wake_req asks
//                     the C-state manager for one more core;
//   * otherwise nothing changes.
// One governor serves all cores. The rule follows the design; ties going to
// the lowest core index and inactive cores resting at P0 (a woken core starts
// at full speed) are this implementation's choices.
//
// Interface/timing: tick is a one-clock strobe; pstate[] changes and
// wake_req/ev_* pulse at the clock edge after it.
module pstate_governor
  import np_pkg::*;
#(
  parameter int N_CORES   = 16,
  parameter int N_PSTATES = 5,
  parameter int Q_W       = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic [Q_W-1:0]     avg,
  input  logic [Q_W-1:0]     low_th,
  input  logic [Q_W-1:0]     high_th,
  input  logic [N_CORES-1:0] active,
  output pstate_e            pstate [N_CORES],
  output logic               wake_req,
  output logic               ev_slower,
  output logic               ev_faster
);
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1;
  localparam pstate_e PSLOW = pstate_e'(N_PSTATES - 1);

  logic          fmin_f, fmax_f;
  logic [CW-1:0] fmin_i, fmax_i;
  always_comb begin
    pstate_e mn, mx;
    fmin_f = 1'b0; fmin_i = '0; mn = PSLOW;
    fmax_f = 1'b0; fmax_i = '0; mx = P0;
    for (int c = 0; c < N_CORES; c++) if (active[c]) begin
      if (pstate[c] < mn) begin mn = pstate[c]; fmin_i = CW'(c); fmin_f = 1'b1; end
      if (pstate[c] > mx) begin mx = pstate[c]; fmax_i = CW'(c); fmax_f = 1'b1; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CORES; c++) pstate[c] <= P0;
      wake_req <= 1'b0; ev_slower <= 1'b0; ev_faster <= 1'b0;
    end else begin
      wake_req <= 1'b0; ev_slower <= 1'b0; ev_faster <= 1'b0;
      for (int c = 0; c < N_CORES; c++) if (!active[c]) pstate[c] <= P0;
      if (tick) begin
        if (avg < low_th) begin
          if (fmin_f) begin
            pstate[fmin_i] <= pstate_e'(pstate[fmin_i] + 3'd1);
            ev_slower <= 1'b1;
          end
        end else if (avg >= high_th) begin
          if (fmax_f) begin
            pstate[fmax_i] <= pstate_e'(pstate[fmax_i] - 3'd1);
            ev_faster <= 1'b1;
          end else wake_req <= 1'b1;
        end
      end
    end
  end
endmodule
