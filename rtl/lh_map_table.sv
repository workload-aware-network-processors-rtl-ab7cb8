// lh_map_table: per-service map tables with linear (incremental) hashing.
//
// Each service owns a bucket list of core IDs; a packet of service s goes to
// the core in bucket h(k) of s's list, where k is the CRC16 of its flow.
// With b buckets, the round is i = floor(log2 b) and the split pointer is
// p = b - 2^i:
//     h(k) = k mod 2^(i+1)  if k mod 2^i < p   (bucket already split)
//            k mod 2^i      otherwise
// Adding a core appends it as bucket b (the split of bucket p); only flows of
// bucket p move, half of them on average, and all other flows stay put.
// Removing a core drops the last bucket, the exact reverse. For a power-of-two
// initial bucket count m this is the design's family h_i(k) = f(k) mod 2^i*m
// (2^i*m <= b < 2^(i+1)*m); counting rounds from one bucket instead of m makes
// it also defined when a service falls below m buckets, which is this
// implementation's choice, as are the one-bucket minimum and the reset
// layout (service s holds cores s*M_INIT .. s*M_INIT+M_INIT-1).
//
// Interface/timing: lookup (lk_svc, lk_hash -> lk_core, lk_bucket) is
// combinational: map-table access is the middle of the scheduler's one-cycle
// critical path. grow/shrink act at the clock edge (shrink wins if both name
// the same service); shrink_core shows, combinationally, the core that a
// shrink of shrink_svc would release.
module lh_map_table #(
  parameter int N_SERVICES = 4,
  parameter int N_CORES    = 16,
  parameter int M_INIT     = 4,
  localparam int CORE_W    = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int SVC_W     = (N_SERVICES > 1) ? $clog2(N_SERVICES) : 1,
  localparam int BW        = $clog2(N_CORES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SVC_W-1:0]  lk_svc,
  input  logic [15:0]       lk_hash,
  output logic [CORE_W-1:0] lk_core,
  output logic [CORE_W-1:0] lk_bucket,
  input  logic              grow_valid,
  input  logic [SVC_W-1:0]  grow_svc,
  input  logic [CORE_W-1:0] grow_core,
  input  logic              shrink_valid,
  input  logic [SVC_W-1:0]  shrink_svc,
  output logic [CORE_W-1:0] shrink_core,
  output logic [BW-1:0]     n_buckets [N_SERVICES]
);
  logic [CORE_W-1:0] bucket [N_SERVICES][N_CORES];
  logic [BW-1:0]     nb     [N_SERVICES];

  initial begin
    assert ((M_INIT & (M_INIT - 1)) == 0) else $error("M_INIT must be a power of two");
    assert (N_SERVICES * M_INIT <= N_CORES) else $error("not enough cores for M_INIT per service");
  end

  // linear-hashing bucket selection
  always_comb begin
    logic [16:0] b, lvl, p, hi;
    b = 17'(nb[lk_svc]);
    lvl = 17'd1;
    for (int j = 1; j < BW; j++)
      if (b >= (17'd1 << j)) lvl = 17'd1 << j;
    p  = b - lvl;
    hi = {1'b0, lk_hash} & (lvl - 17'd1);
    if (hi < p) hi = {1'b0, lk_hash} & ((lvl << 1) - 17'd1);
    lk_bucket = CORE_W'(hi);
    lk_core   = bucket[lk_svc][lk_bucket];
  end

  assign shrink_core = bucket[shrink_svc][CORE_W'(nb[shrink_svc] - 1'b1)];
  assign n_buckets   = nb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SERVICES; s++) begin
        nb[s] <= BW'(M_INIT);
        for (int j = 0; j < N_CORES; j++) bucket[s][j] <= CORE_W'(s * M_INIT + j);
      end
    end else begin
      if (grow_valid && !(shrink_valid && shrink_svc == grow_svc) && nb[grow_svc] < BW'(N_CORES)) begin
        bucket[grow_svc][CORE_W'(nb[grow_svc])] <= grow_core;
        nb[grow_svc] <= nb[grow_svc] + 1'b1;
      end
      if (shrink_valid && nb[shrink_svc] > BW'(1))
        nb[shrink_svc] <= nb[shrink_svc] - 1'b1;
    end
  end
endmodule
