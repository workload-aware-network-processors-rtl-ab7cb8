// afd: Aggressive Flow Detector (AFD).
//
// Finds the few heavy-hitter flows without keeping per-flow state. Two caches
// of flow counters are used:
//   * the Aggressive Flow Cache (AFC): AFC_N entries, fully associative. A
//     flow that is in the AFC is "aggressive".
//   * the annex cache: ANNEX_N entries, ANNEX_WAYS-way set associative, a
//     qualifying station that every flow must pass before it enters the AFC.
// On each lookup the flow is searched in both:
//   * AFC hit: its counter is incremented. If that counter is saturated, all
//     AFC counters are first halved (shift right by one), which also ages out
//     flows that have gone quiet. The annex counters are halved in the same
//     clock, so that annex and AFC counts stay comparable.
//   * annex hit: its counter is incremented and compared with the LFU count of
//     the AFC. If it is now larger, the flow is promoted into the AFC and the
//     AFC's LFU entry (the victim) goes back into the annex.
//   * miss in both: the flow replaces the LFU way of its annex set, count 1.
// The caches, the promotion rule, the LFU replacement, the 16/512/4-way sizes
// and the shift-on-saturation aging of the AFC follow the design. Extending
// that aging to the annex, the counter width, the annex set index (low bits
// of the flow's CRC16), writing the victim into its own set, and
// tie-breaking (lowest index) are this implementation's choices.
//
// Interface/timing: lookup_valid/lookup_flow/lookup_hash in; `aggressive` is
// the combinational AFC-hit answer for the presented flow (state before this
// cycle's update); all updates happen at the clock edge, one lookup per cycle.
// The AFD sits beside the scheduler's critical path, not on it.
//
// Sampling: the design notes that packets may be sampled with a probability p
// so that not every packet updates the caches. With SAMPLE_LOG2 = s > 0 a
// lookup updates the caches (and may promote) only when the low s bits of a
// 16-bit LFSR (x^16+x^14+x^13+x^11+1, seed 16'hACE1, one step per lookup) are
// zero, i.e. p = 2^-s. `aggressive` is still answered for every packet.
// SAMPLE_LOG2 = 0 (default) updates on every packet.
module afd #(
  parameter int AFC_N      = 16,
  parameter int ANNEX_N    = 512,
  parameter int ANNEX_WAYS = 4,
  parameter int CNT_W      = 8,
  parameter int FLOW_W     = np_pkg::FLOW_W,
  parameter int SAMPLE_LOG2 = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lookup_valid,
  input  logic [FLOW_W-1:0] lookup_flow,
  input  logic [15:0]       lookup_hash,
  output logic              aggressive,
  output logic              promote,
  output logic [CNT_W-1:0]  lfu_count
);
  localparam int SETS  = ANNEX_N / ANNEX_WAYS;
  localparam int SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int AI_W  = (AFC_N > 1) ? $clog2(AFC_N) : 1;
  localparam int WY_W  = (ANNEX_WAYS > 1) ? $clog2(ANNEX_WAYS) : 1;
  localparam logic [CNT_W-1:0] CMAX = '1;
  localparam logic [15:0] SMASK = 16'((32'd1 << SAMPLE_LOG2) - 32'd1);

  // ---- sampling LFSR ----
  logic [15:0] lfsr;
  logic        upd;
  assign upd = lookup_valid && ((lfsr & SMASK) == 16'd0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else if (lookup_valid) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  // AFC
  logic              afc_v    [AFC_N];
  logic [FLOW_W-1:0] afc_flow [AFC_N];
  logic [CNT_W-1:0]  afc_cnt  [AFC_N];
  logic [SET_W-1:0]  afc_set  [AFC_N];
  // annex cache
  logic              ann_v    [SETS][ANNEX_WAYS];
  logic [FLOW_W-1:0] ann_flow [SETS][ANNEX_WAYS];
  logic [CNT_W-1:0]  ann_cnt  [SETS][ANNEX_WAYS];

  logic [SET_W-1:0] set_idx;
  assign set_idx = lookup_hash[SET_W-1:0];

  // ---- AFC search and LFU ----
  logic            afc_hit;
  logic [AI_W-1:0] afc_hit_idx, lfu_idx;
  logic [CNT_W-1:0] lfu_c;
  always_comb begin
    afc_hit = 1'b0; afc_hit_idx = '0;
    for (int i = 0; i < AFC_N; i++)
      if (afc_v[i] && afc_flow[i] == lookup_flow && !afc_hit) begin
        afc_hit = 1'b1; afc_hit_idx = AI_W'(i);
      end
    lfu_idx = '0; lfu_c = afc_v[0] ? afc_cnt[0] : '0;
    for (int i = 1; i < AFC_N; i++) begin
      logic [CNT_W-1:0] c;
      c = afc_v[i] ? afc_cnt[i] : '0;
      if (c < lfu_c) begin lfu_c = c; lfu_idx = AI_W'(i); end
    end
  end
  assign aggressive = afc_hit;
  assign lfu_count  = lfu_c;

  // ---- annex search and LFU of the packet's set and of the victim's set ----
  logic             ann_hit;
  logic [WY_W-1:0]  ann_hit_way, ann_lfu_way, vic_lfu_way;
  logic [SET_W-1:0] vic_set;
  assign vic_set = afc_set[lfu_idx];

  function automatic logic [WY_W-1:0] set_lfu(input logic [SET_W-1:0] s);
    logic [WY_W-1:0]  w;
    logic [CNT_W:0]   best, c;
    w = '0; best = ann_v[s][0] ? {1'b0, ann_cnt[s][0]} : '0;
    for (int k = 1; k < ANNEX_WAYS; k++) begin
      c = ann_v[s][k] ? {1'b0, ann_cnt[s][k]} : '0;
      if (c < best) begin best = c; w = WY_W'(k); end
    end
    return w;
  endfunction

  always_comb begin
    ann_hit = 1'b0; ann_hit_way = '0;
    for (int k = 0; k < ANNEX_WAYS; k++)
      if (ann_v[set_idx][k] && ann_flow[set_idx][k] == lookup_flow && !ann_hit) begin
        ann_hit = 1'b1; ann_hit_way = WY_W'(k);
      end
    ann_lfu_way = set_lfu(set_idx);
    vic_lfu_way = set_lfu(vic_set);
  end

  logic [CNT_W-1:0] ann_next;
  assign ann_next = (ann_cnt[set_idx][ann_hit_way] == CMAX) ? CMAX
                                                            : ann_cnt[set_idx][ann_hit_way] + 1'b1;
  assign promote = upd && !afc_hit && ann_hit && (ann_next > lfu_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < AFC_N; i++) afc_v[i] <= 1'b0;
      for (int s = 0; s < SETS; s++)
        for (int k = 0; k < ANNEX_WAYS; k++) ann_v[s][k] <= 1'b0;
    end else if (upd) begin
      if (afc_hit) begin
        if (afc_cnt[afc_hit_idx] == CMAX) begin
          for (int i = 0; i < AFC_N; i++) afc_cnt[i] <= afc_cnt[i] >> 1;
          for (int s = 0; s < SETS; s++)
            for (int k = 0; k < ANNEX_WAYS; k++) ann_cnt[s][k] <= ann_cnt[s][k] >> 1;
          afc_cnt[afc_hit_idx] <= (CMAX >> 1) + 1'b1;
        end else begin
          afc_cnt[afc_hit_idx] <= afc_cnt[afc_hit_idx] + 1'b1;
        end
      end else if (ann_hit) begin
        if (promote) begin
          afc_v[lfu_idx]    <= 1'b1;
          afc_flow[lfu_idx] <= lookup_flow;
          afc_cnt[lfu_idx]  <= ann_next;
          afc_set[lfu_idx]  <= set_idx;
          ann_v[set_idx][ann_hit_way] <= 1'b0;
          if (afc_v[lfu_idx]) begin
            // the victim returns to the annex set of its own hash
            if (vic_set == set_idx) begin
              ann_v[set_idx][ann_hit_way]    <= 1'b1;
              ann_flow[set_idx][ann_hit_way] <= afc_flow[lfu_idx];
              ann_cnt[set_idx][ann_hit_way]  <= afc_cnt[lfu_idx];
            end else begin
              ann_v[vic_set][vic_lfu_way]    <= 1'b1;
              ann_flow[vic_set][vic_lfu_way] <= afc_flow[lfu_idx];
              ann_cnt[vic_set][vic_lfu_way]  <= afc_cnt[lfu_idx];
            end
          end
        end else begin
          ann_cnt[set_idx][ann_hit_way] <= ann_next;
        end
      end else begin
        ann_v[set_idx][ann_lfu_way]    <= 1'b1;
        ann_flow[set_idx][ann_lfu_way] <= lookup_flow;
        ann_cnt[set_idx][ann_lfu_way]  <= CNT_W'(1);
      end
    end
  end
endmodule
