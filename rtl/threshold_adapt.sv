// threshold_adapt: self-adjusting queue thresholds for the power manager.
//
// Holds high_th (start Q_MAX - WAKE_BUF: room for the packets that arrive
// while a sleeping core wakes), low_th (start high_th/4) and C_th (the queue
// length that wakes one more core, start = high_th). Per interval (tick):
//   * if the queue reached 95% of Q_MAX during the interval, a core was woken
//     too late: all three thresholds drop by 10%;
//   * if the queue has not reached C_th for QUIET_INTERVALS intervals in a
//     row, all three rise by 10%.
// The rule, Q_MAX = 80, the 40-packet wake-up buffer and the 4:1 ratio follow
// the design; C_th starting at high_th, a 10% step of x/10 rounded down but at
// least 1, a floor of 1 and capping rises at the starting values are this
// implementation's choices.
//
// Interface/timing: qlen is the instantaneous queue length, watched every
// clock; thresholds change at the clock edge of tick.
module threshold_adapt #(
  parameter int Q_MAX           = 80,
  parameter int WAKE_BUF        = 40,
  parameter int QUIET_INTERVALS = 10,
  localparam int Q_W            = $clog2(Q_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  logic [Q_W-1:0] qlen,
  output logic [Q_W-1:0] low_th,
  output logic [Q_W-1:0] high_th,
  output logic [Q_W-1:0] c_th,
  output logic           ev_down,
  output logic           ev_up
);
  localparam int HI0  = Q_MAX - WAKE_BUF;
  localparam int LO0  = HI0 / 4;
  localparam int FULL = (Q_MAX * 95 + 99) / 100;
  localparam int KW   = $clog2(QUIET_INTERVALS + 1);

  logic          seen_full, seen_c;
  logic [KW-1:0] quiet;

  function automatic logic [Q_W-1:0] dec(input logic [Q_W-1:0] v);
    logic [Q_W-1:0] st;
    st = (v / 10 == 0) ? Q_W'(1) : v / 10;
    return (v > st) ? v - st : Q_W'(1);
  endfunction
  function automatic logic [Q_W-1:0] inc(input logic [Q_W-1:0] v, input int cap);
    logic [Q_W:0] r;
    r = {1'b0, v} + ((v / 10 == 0) ? (Q_W + 1)'(1) : (Q_W + 1)'(v / 10));
    return (r > (Q_W + 1)'(cap)) ? Q_W'(cap) : Q_W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      high_th <= Q_W'(HI0); low_th <= Q_W'(LO0); c_th <= Q_W'(HI0);
      seen_full <= 1'b0; seen_c <= 1'b0; quiet <= '0; ev_down <= 1'b0; ev_up <= 1'b0;
    end else begin
      ev_down <= 1'b0; ev_up <= 1'b0;
      if (tick) begin
        seen_full <= 1'b0; seen_c <= 1'b0;
        if (seen_full || qlen >= Q_W'(FULL)) begin
          high_th <= dec(high_th); low_th <= dec(low_th); c_th <= dec(c_th);
          quiet <= '0; ev_down <= 1'b1;
        end else if (seen_c || qlen >= c_th) begin
          quiet <= '0;
        end else if (quiet == KW'(QUIET_INTERVALS - 1)) begin
          high_th <= inc(high_th, HI0); low_th <= inc(low_th, LO0); c_th <= inc(c_th, HI0);
          quiet <= '0; ev_up <= (high_th < Q_W'(HI0)) || (low_th < Q_W'(LO0));
        end else quiet <= quiet + 1'b1;
      end else begin
        if (qlen >= Q_W'(FULL)) seen_full <= 1'b1;
        if (qlen >= c_th)       seen_c <= 1'b1;
      end
    end
  end
endmodule
