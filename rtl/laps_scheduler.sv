// laps_scheduler: Locality Aware Packet Scheduler (LAPS).
//
// Picks the core for every arriving packet so that packets of one flow stay
// on one core (data-cache locality, packet order), packets of one service
// stay on that service's cores (instruction-cache locality), and heavy flows
// are moved away from an overloaded core. Per packet:
//   1. hash the flow five-tuple with CRC16;
//   2. if the flow hits in the migration table, use the core recorded there,
//      otherwise use bucket h(k) of the service's linear-hashing map table;
//   3. if load imbalance is signalled, that core is the one with the longest
//      queue and the flow is aggressive (it hits in the AFD's AFC), send the
//      packet to the least loaded core of its service instead and record the
//      migration, so the rest of the flow follows.
// Core allocation changes (grow/shrink of a service's bucket list) come from
// the resource manager; entries of the migration table that point at a core
// leaving its service are dropped (mig_inv_*).
// This structure follows the design; the one-cycle registered decision and
// re-migrating an already migrated flow whose core becomes the overloaded one
// are this implementation's choices.
//
// Interface/timing: one packet per clock (in_valid/in_desc); the decision
// appears one clock later on out_valid/out_core/out_desc. The hash -> map
// table -> mux path is combinational inside that clock; the AFD and table
// updates happen in the background at the same edge.
module laps_scheduler
  import np_pkg::*;
#(
  parameter int N_CORES    = 16,
  parameter int N_SERVICES = 4,
  parameter int M_INIT     = 4,
  parameter int AFC_N      = 16,
  parameter int ANNEX_N    = 512,
  parameter int ANNEX_WAYS = 4,
  parameter int MIG_N      = 32,
  parameter int AFD_SAMPLE_LOG2 = 0,
  localparam int CORE_W    = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int SW        = (N_SERVICES > 1) ? $clog2(N_SERVICES) : 1,
  localparam int BW        = $clog2(N_CORES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pkt_desc_t         in_desc,
  output logic              out_valid,
  output logic [CORE_W-1:0] out_core,
  output pkt_desc_t         out_desc,
  output logic              out_migrated,
  output logic              out_mig_hit,
  output logic              afd_promote,
  // from the queue manager
  input  logic              imbalance,
  input  logic [CORE_W-1:0] max_core,
  input  logic [CORE_W-1:0] least_core [N_SERVICES],
  input  logic [N_SERVICES-1:0] least_valid,
  // from the resource manager
  input  logic              grow_valid,
  input  logic [SW-1:0]     grow_svc,
  input  logic [CORE_W-1:0] grow_core,
  input  logic              shrink_valid,
  input  logic [SW-1:0]     shrink_svc,
  output logic [CORE_W-1:0] shrink_core,
  output logic [BW-1:0]     n_buckets [N_SERVICES],
  input  logic              mig_inv_valid,
  input  logic [CORE_W-1:0] mig_inv_core
);
  logic [15:0]       hash;
  localparam int AFD_CNT_W = 8;
  logic                 aggressive;
  logic [AFD_CNT_W-1:0] afd_lfu;
  logic              mt_hit;
  logic [CORE_W-1:0] mt_core, map_core, map_bucket, base_core, sel_core;
  logic              migrate;
  logic [SW-1:0]     svc;

  assign svc = SW'(in_desc.svc);

  crc16_hash #(.IN_W(FLOW_W)) u_hash (.key(in_desc.flow), .crc(hash));

  afd #(.AFC_N(AFC_N), .ANNEX_N(ANNEX_N), .ANNEX_WAYS(ANNEX_WAYS), .CNT_W(AFD_CNT_W),
        .FLOW_W(FLOW_W), .SAMPLE_LOG2(AFD_SAMPLE_LOG2)) u_afd (
    .clk, .rst_n, .lookup_valid(in_valid), .lookup_flow(in_desc.flow), .lookup_hash(hash),
    .aggressive(aggressive), .promote(afd_promote), .lfu_count(afd_lfu));

  migration_table #(.ENTRIES(MIG_N), .FLOW_W(FLOW_W), .CORE_W(CORE_W)) u_mig (
    .clk, .rst_n, .lookup_flow(in_desc.flow), .hit(mt_hit), .hit_core(mt_core),
    .ins_valid(migrate), .ins_flow(in_desc.flow), .ins_core(sel_core),
    .inv_valid(mig_inv_valid), .inv_core(mig_inv_core));

  lh_map_table #(.N_SERVICES(N_SERVICES), .N_CORES(N_CORES), .M_INIT(M_INIT)) u_map (
    .clk, .rst_n, .lk_svc(svc), .lk_hash(hash), .lk_core(map_core), .lk_bucket(map_bucket),
    .grow_valid, .grow_svc, .grow_core, .shrink_valid, .shrink_svc, .shrink_core,
    .n_buckets);

  assign base_core = mt_hit ? mt_core : map_core;
  assign migrate   = in_valid && imbalance && aggressive && base_core == max_core &&
                     least_valid[svc] && least_core[svc] != base_core;
  assign sel_core  = migrate ? least_core[svc] : base_core;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_migrated <= 1'b0; out_mig_hit <= 1'b0; out_core <= '0; out_desc <= '0;
    end else begin
      out_valid    <= in_valid;
      out_migrated <= migrate;
      out_mig_hit  <= in_valid && mt_hit;
      if (in_valid) begin
        out_core <= sel_core;
        out_desc <= in_desc;
      end
    end
  end
endmodule
