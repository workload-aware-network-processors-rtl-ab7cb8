// queue_manager: per-core input queues with load monitoring.
//
// Holds one pkt_fifo per processing core. The scheduler enqueues each packet
// into the queue of the core it picked; a packet sent to a full queue is
// dropped. Because the queue manager already tracks every queue length (as a
// hardware queue manager does for congestion control), it also produces the
// signals load balancing and core allocation need:
//   * imbalance: the longest queue has reached IMB_TH entries,
//   * max_core:  the core with the longest queue (the overloaded core),
//   * least_core[s]: the owned core of service s with the shortest queue,
//   * arr/dep: one pulse per accepted arrival / departure, per core, from
//     which arrival and departure rates are counted.
// The imbalance rule (longest queue against a threshold) follows the design;
// the threshold value and lowest-index tie-breaking are this implementation's.
//
// Interface/timing: enq_drop is combinational on the enqueue request; the
// monitoring outputs are combinational from the registered queue counts.
// Core i takes its head with deq_ready[i] while deq_valid[i].
module queue_manager
  import np_pkg::*;
#(
  parameter int N_CORES    = 16,
  parameter int N_SERVICES = 4,
  parameter int DEPTH      = 100,
  parameter int IMB_TH     = 75,
  localparam int CORE_W    = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int SW        = (N_SERVICES > 1) ? $clog2(N_SERVICES) : 1,
  localparam int QW        = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enq_valid,
  input  logic [CORE_W-1:0] enq_core,
  input  pkt_desc_t         enq_desc,
  output logic              enq_drop,
  input  logic [N_CORES-1:0] deq_ready,
  output logic [N_CORES-1:0] deq_valid,
  output pkt_desc_t         deq_desc [N_CORES],
  input  logic [SW-1:0]     core_svc [N_CORES],
  input  logic [N_CORES-1:0] core_owned,
  output logic [QW-1:0]     qlen [N_CORES],
  output logic [N_CORES-1:0] arr,
  output logic [N_CORES-1:0] dep,
  output logic              imbalance,
  output logic [CORE_W-1:0] max_core,
  output logic [CORE_W-1:0] least_core [N_SERVICES],
  output logic [N_SERVICES-1:0] least_valid
);
  logic [N_CORES-1:0] full, empty;

  for (genvar c = 0; c < N_CORES; c++) begin : g_q
    logic push;
    assign push = enq_valid && enq_core == CORE_W'(c);
    pkt_fifo #(.W(DESC_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(push), .din(enq_desc), .full(full[c]),
      .pop(deq_ready[c]), .dout(deq_desc[c]), .empty(empty[c]), .count(qlen[c]));
    assign deq_valid[c] = !empty[c];
    assign arr[c] = push && !full[c];
    assign dep[c] = deq_ready[c] && !empty[c];
  end

  assign enq_drop = enq_valid && full[enq_core];

  always_comb begin
    logic [QW-1:0] mx;
    mx = qlen[0]; max_core = '0;
    for (int c = 1; c < N_CORES; c++)
      if (qlen[c] > mx) begin mx = qlen[c]; max_core = CORE_W'(c); end
    imbalance = (mx >= QW'(IMB_TH));
  end

  always_comb begin
    for (int s = 0; s < N_SERVICES; s++) begin
      logic [QW-1:0] mn;
      mn = '1; least_core[s] = '0; least_valid[s] = 1'b0;
      for (int c = 0; c < N_CORES; c++)
        if (core_owned[c] && core_svc[c] == SW'(s) && (!least_valid[s] || qlen[c] < mn)) begin
          mn = qlen[c]; least_core[s] = CORE_W'(c); least_valid[s] = 1'b1;
        end
    end
  end
endmodule
