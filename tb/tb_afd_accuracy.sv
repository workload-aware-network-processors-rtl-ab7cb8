// tb_afd_accuracy: accuracy of the Aggressive Flow Detector at its full size
// (16-entry AFC, 512-entry 4-way annex) on heavy-tailed traffic.
// 4000 flows with random five-tuples send packets with Zipf-like popularity
// (flow k is chosen with weight 1/(k+1)); 200000 packets are looked up, one
// per clock. The testbench counts every flow's packets itself and, every
// 10000 packets and at the end, reads which flows the AFC holds (lookups with
// lookup_valid low do not update it). An AFC entry that is not among the 16
// flows with the most packets so far is a false positive.
// Checks:
//   * at the end the AFC is full and holds at most 3 false positives, each of
//     them among the 20 heaviest flows (no light flow is promoted);
//   * at every checkpoint after the first, at least 12 of the 16 entries are
//     top-16 flows;
//   * a second detector that samples 1 packet in 16 does as well, within one
//     entry, as the one that sees every packet.
module tb_afd_accuracy;
  localparam int NF     = 4000;
  localparam int NPKT   = 200000;
  localparam int STEP   = 10000;
  localparam int TOP    = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic lv = 0;
  logic [103:0] fl = '0;
  logic [15:0]  hs;
  logic aggr, prom, aggr_s, prom_s;
  logic [7:0] lfu, lfu_s;

  crc16_hash u_h (.key(fl), .crc(hs));
  afd dut (
    .clk, .rst_n, .lookup_valid(lv), .lookup_flow(fl), .lookup_hash(hs),
    .aggressive(aggr), .promote(prom), .lfu_count(lfu));
  afd #(.SAMPLE_LOG2(4)) dut_s (
    .clk, .rst_n, .lookup_valid(lv), .lookup_flow(fl), .lookup_hash(hs),
    .aggressive(aggr_s), .promote(prom_s), .lfu_count(lfu_s));

  always #5 clk = ~clk;

  logic [103:0] fid [NF];
  longint cum [NF];
  int cnt [NF];

  initial begin
    repeat (NPKT + 2 * (NPKT / STEP + 2) * NF + 1000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rank threshold: the packet count of the n-th heaviest flow
  function automatic int nth_count(input int n);
    int c [$];
    for (int k = 0; k < NF; k++) c.push_back(cnt[k]);
    c.rsort();
    return c[n-1];
  endfunction

  // reads both AFCs; returns entries held, and how many are in the top n
  task automatic survey(input int n, output int held, output int good,
                        output int held_s, output int good_s);
    int th;
    th = nth_count(n);
    held = 0; good = 0; held_s = 0; good_s = 0;
    for (int k = 0; k < NF; k++) begin
      @(negedge clk);
      fl = fid[k];
      #1;
      if (aggr)   begin held++;   if (cnt[k] >= th) good++;   end
      if (aggr_s) begin held_s++; if (cnt[k] >= th) good_s++; end
    end
  endtask

  initial begin
    longint total;
    int held, good, held_s, good_s, h20, g20, hs20, gs20;
    for (int k = 0; k < NF; k++) begin
      fid[k] = {$urandom, $urandom, $urandom, 8'($urandom)};
      cnt[k] = 0;
      total = (k == 0 ? 0 : cum[k-1]) + longint'(1000000 / (k + 1));
      cum[k] = total;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      longint r;
      int lo, hi;
      r = longint'({$urandom, $urandom} % 64'(total));
      lo = 0; hi = NF - 1;
      while (lo < hi) begin
        int mid;
        mid = (lo + hi) / 2;
        if (cum[mid] > r) hi = mid; else lo = mid + 1;
      end
      @(negedge clk);
      lv = 1; fl = fid[lo]; cnt[lo]++;
      if ((p + 1) % STEP == 0) begin
        @(negedge clk); lv = 0;
        survey(TOP, held, good, held_s, good_s);
        if (p + 1 > STEP) begin
          checks++;
          if (good < 12) begin
            failures++; $display("FAIL after %0d packets only %0d of %0d entries are top-16 flows", p + 1, good, held);
          end
        end
      end
    end
    @(negedge clk); lv = 0;
    survey(TOP, held, good, held_s, good_s);
    survey(20, h20, g20, hs20, gs20);
    $display("AFC at end: %0d entries, %0d top-16 flows, %0d top-20 flows; sampled 1/16: %0d entries, %0d top-16, %0d top-20",
             held, good, g20, held_s, good_s, gs20);
    checks++; if (held != TOP) begin failures++; $display("FAIL AFC holds %0d entries", held); end
    checks++; if (TOP - good > 3) begin failures++; $display("FAIL %0d false positives", TOP - good); end
    checks++; if (g20 != held) begin failures++; $display("FAIL a flow outside the top 20 is in the AFC"); end
    checks++; if (good_s + 1 < good) begin failures++; $display("FAIL sampling lost accuracy: %0d vs %0d", good_s, good); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
