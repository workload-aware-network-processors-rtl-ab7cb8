// cstate_manager: how many cores are powered, and their sleep states.
//
// Every core-count interval (tick) the number of powered cores is set to the
// required count C: if C is larger, C - on cores are woken; if smaller, the
// extra cores are put to sleep. A sleeping core enters C1, stays there for
// C1_INTERVALS intervals and then drops to C2, the deepest state. Waking takes
// WAKE_C1_CYC from C1 and WAKE_C2_CYC from C2 (10 us and 100 us at 200 MHz);
// meanwhile the core is in C_WAKE and takes no packets. Between ticks,
// wake_one wakes a single extra core (queue threshold reached, or the
// P-state governor found every core already at full speed).
// This follows the design; counting waking cores as on, waking C1 cores
// before C2 ones, putting the highest-numbered running cores to sleep first,
// keeping core 0 always on and ignoring wake_one when nobody sleeps are this
// implementation's choices.
//
// Interface/timing: tick and wake_one are one-clock strobes, c_req the target
// count (1..N_CORES). cstate[] and active[] (= C0) update at the clock edge;
// n_on counts cores in C0 or C_WAKE.
module cstate_manager
  import np_pkg::*;
#(
  parameter int N_CORES      = 16,
  parameter int C1_INTERVALS = 2,
  parameter int WAKE_C1_CYC  = 2000,
  parameter int WAKE_C2_CYC  = 20000,
  localparam int BW          = $clog2(N_CORES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic [BW-1:0]      c_req,
  input  logic               wake_one,
  output cstate_e            cstate [N_CORES],
  output logic [N_CORES-1:0] active,
  output logic [BW-1:0]      n_on,
  output logic               ev_wake,
  output logic               ev_sleep,
  output logic               ev_deep
);
  localparam int WW = $clog2(WAKE_C2_CYC + 1);
  localparam int AW = $clog2(C1_INTERVALS + 1);

  logic [WW-1:0] wcnt [N_CORES];
  logic [AW-1:0] age  [N_CORES];

  always_comb begin
    n_on = '0;
    for (int c = 0; c < N_CORES; c++) begin
      active[c] = (cstate[c] == C0);
      if (cstate[c] == C0 || cstate[c] == C_WAKE) n_on = n_on + 1'b1;
    end
  end

  logic [BW-1:0] n_wake, n_sleep;
  always_comb begin
    logic [BW-1:0] tgt;
    tgt     = (c_req == '0) ? BW'(1) : c_req;
    n_wake  = '0; n_sleep = '0;
    if (tick) begin
      if (tgt > n_on)      n_wake  = tgt - n_on;
      else if (tgt < n_on) n_sleep = n_on - tgt;
    end else if (wake_one) n_wake = BW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    logic [BW-1:0] to_wake, to_sleep;
    to_wake = n_wake; to_sleep = n_sleep;
    if (!rst_n) begin
      for (int c = 0; c < N_CORES; c++) begin cstate[c] <= C0; wcnt[c] <= '0; age[c] <= '0; end
      ev_wake <= 1'b0; ev_sleep <= 1'b0; ev_deep <= 1'b0;
    end else begin
      ev_wake <= 1'b0; ev_sleep <= 1'b0; ev_deep <= 1'b0;
      // waking cores finish their wake-up
      for (int c = 0; c < N_CORES; c++)
        if (cstate[c] == C_WAKE) begin
          if (wcnt[c] <= WW'(1)) cstate[c] <= C0;
          else wcnt[c] <= wcnt[c] - 1'b1;
        end
      // aging of C1 sleepers at each interval
      if (tick)
        for (int c = 0; c < N_CORES; c++)
          if (cstate[c] == C1) begin
            if (age[c] >= AW'(C1_INTERVALS - 1)) begin cstate[c] <= C2; ev_deep <= 1'b1; end
            else age[c] <= age[c] + 1'b1;
          end
      // wake: C1 first, then C2, lowest index first
      for (int c = 0; c < N_CORES; c++)
        if (to_wake != '0 && cstate[c] == C1) begin
          cstate[c] <= C_WAKE; wcnt[c] <= WW'(WAKE_C1_CYC); to_wake = to_wake - 1'b1; ev_wake <= 1'b1;
        end
      for (int c = 0; c < N_CORES; c++)
        if (to_wake != '0 && cstate[c] == C2) begin
          cstate[c] <= C_WAKE; wcnt[c] <= WW'(WAKE_C2_CYC); to_wake = to_wake - 1'b1; ev_wake <= 1'b1;
        end
      // sleep: highest-numbered running cores first, core 0 stays on
      for (int c = N_CORES - 1; c > 0; c--)
        if (to_sleep != '0 && cstate[c] == C0) begin
          cstate[c] <= C1; age[c] <= '0; to_sleep = to_sleep - 1'b1; ev_sleep <= 1'b1;
        end
    end
  end
endmodule
