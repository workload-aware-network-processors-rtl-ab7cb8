// migration_table: flows that have been migrated and the core they now use.
//
// When the scheduler moves an aggressive flow off an overloaded core it
// records (flow, new core) here, so that every later packet of that flow
// follows it even after the imbalance is over. A hit overrides the hash map
// table. The table is fully associative; its size, round-robin replacement
// (an existing entry of the same flow is rewritten in place, a free entry is
// used before a valid one) and the invalidation of entries that point at a
// core leaving its service are this implementation's choices.
//
// Interface/timing: lookup is combinational (hit, hit_core). Inserts and
// invalidations take effect at the next clock edge; an insert in the same
// cycle as an invalidation wins for its own entry.
module migration_table #(
  parameter int ENTRIES = 32,
  parameter int FLOW_W  = np_pkg::FLOW_W,
  parameter int CORE_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FLOW_W-1:0] lookup_flow,
  output logic              hit,
  output logic [CORE_W-1:0] hit_core,
  input  logic              ins_valid,
  input  logic [FLOW_W-1:0] ins_flow,
  input  logic [CORE_W-1:0] ins_core,
  input  logic              inv_valid,
  input  logic [CORE_W-1:0] inv_core
);
  localparam int IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic              v    [ENTRIES];
  logic [FLOW_W-1:0] flow [ENTRIES];
  logic [CORE_W-1:0] core [ENTRIES];
  logic [IW-1:0]     rr;

  always_comb begin
    hit = 1'b0; hit_core = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (v[i] && flow[i] == lookup_flow && !hit) begin hit = 1'b1; hit_core = core[i]; end
  end

  // where an insert goes: same flow, else a free entry, else round-robin
  logic          same_f, free_f;
  logic [IW-1:0] same_i, free_i, ins_i;
  always_comb begin
    same_f = 1'b0; same_i = '0; free_f = 1'b0; free_i = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (v[i] && flow[i] == ins_flow && !same_f) begin same_f = 1'b1; same_i = IW'(i); end
      if (!v[i] && !free_f) begin free_f = 1'b1; free_i = IW'(i); end
    end
    ins_i = same_f ? same_i : (free_f ? free_i : rr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) v[i] <= 1'b0;
      rr <= '0;
    end else begin
      if (inv_valid)
        for (int i = 0; i < ENTRIES; i++)
          if (core[i] == inv_core) v[i] <= 1'b0;
      if (ins_valid) begin
        v[ins_i]    <= 1'b1;
        flow[ins_i] <= ins_flow;
        core[ins_i] <= ins_core;
        if (!same_f && !free_f) rr <= (rr == IW'(ENTRIES - 1)) ? '0 : rr + 1'b1;
      end
    end
  end
endmodule
