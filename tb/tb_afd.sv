// tb_afd: directed test of the Aggressive Flow Detector on a small instance
// (4-entry AFC, 16-entry 4-way annex, 4-bit counters).
// Walks through: filtering of a flow seen once, promotion only when the annex
// count exceeds the AFC's LFU count, LFU victim selection, the victim's return
// to the annex and re-promotion, and halving of all AFC and annex counters
// when an AFC counter saturates.
// A second instance with 1-in-4 sampling is checked against a model of the
// sampling LFSR: only sampled lookups count, and the AFC answer is given for
// every packet.
module tb_afd;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic lv = 0;
  logic [103:0] fl = '0;
  logic [15:0]  hs = '0;
  logic aggr, prom;
  logic [3:0] lfu;

  afd #(.AFC_N(4), .ANNEX_N(16), .ANNEX_WAYS(4), .CNT_W(4)) dut (
    .clk, .rst_n, .lookup_valid(lv), .lookup_flow(fl), .lookup_hash(hs),
    .aggressive(aggr), .promote(prom), .lfu_count(lfu));

  logic lv2 = 0;
  logic aggr2, prom2;
  logic [3:0] lfu2;
  afd #(.AFC_N(4), .ANNEX_N(16), .ANNEX_WAYS(4), .CNT_W(4), .SAMPLE_LOG2(2)) dut_s (
    .clk, .rst_n, .lookup_valid(lv2), .lookup_flow(fl), .lookup_hash(hs),
    .aggressive(aggr2), .promote(prom2), .lfu_count(lfu2));

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic chkv(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // one lookup; returns aggressive/promote as seen before the update
  task automatic access(input int f, output logic a, output logic p);
    @(negedge clk);
    lv = 1; fl = 104'(f) * 104'h1_0000_0001; hs = 16'(f * 7);
    #1 a = aggr; p = prom;
    @(negedge clk); lv = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, p;
    repeat (3) @(posedge clk); rst_n = 1;
    // flow 1: first access goes to the annex only
    access(1, a, p); chk(a, 0, "f1 first: not aggressive"); chk(p, 0, "f1 first: no promote");
    access(1, a, p); chk(a, 0, "f1 second: still annex"); chk(p, 1, "f1 second: promoted (2 > 0)");
    access(1, a, p); chk(a, 1, "f1 third: aggressive");
    // flows 2,3,4 fill the AFC with count 2 each
    for (int f = 2; f <= 4; f++) begin access(f, a, p); access(f, a, p); chk(p, 1, "fill promote"); end
    chkv(int'(lfu), 2, "lfu after fill");
    // flow 1 becomes heavy: 3+3 = 6
    repeat (3) access(1, a, p);
    // flow 5: 1 (annex), 2 (not > 2), 3 (> 2: promote, victim flow 2 in slot 1)
    access(5, a, p); chk(p, 0, "f5 #1");
    access(5, a, p); chk(p, 0, "f5 #2: 2 is not > LFU 2"); chk(a, 0, "f5 #2 not aggressive");
    access(5, a, p); chk(p, 1, "f5 #3: promoted");
    access(5, a, p); chk(a, 1, "f5 aggressive");
    access(2, a, p); chk(a, 0, "victim f2 left the AFC"); chk(p, 1, "f2 back from annex with 2 -> 3 > 2");
    access(3, a, p); chk(a, 0, "f3 was the next LFU victim"); chk(p, 1, "f3 re-promoted (3 > 2), evicting f4");
    access(7, a, p); chk(a, 0, "f7 seen once is filtered");
    // saturate flow 1 (count 6 -> 15), one more hit halves everybody
    repeat (9) access(1, a, p);
    chkv(int'(lfu), 3, "lfu before saturation (f2, f3 = 3)");
    access(1, a, p); chk(a, 1, "f1 hit at saturation");
    chkv(int'(lfu), 1, "lfu after halving (3 -> 1)");
    // the annex was halved too: f7 had 1, now 0; its next hit gives 1, not > 1
    access(7, a, p); chk(p, 0, "f7 annex count halved with the AFC: no promote");
    access(7, a, p); chk(p, 1, "f7 promoted at 2 > 1");
    // sampled instance: flow 9 repeatedly; it is promoted on its 2nd sampled
    // lookup (annex count 2 > empty AFC 0), and only on a sampled lookup
    begin
      logic [15:0] l = 16'hACE1;
      int nsamp = 0, prom_at = -1, first_aggr = -1;
      for (int n = 0; n < 40; n++) begin
        logic smp;
        smp = (l[1:0] == 2'b00);
        @(negedge clk);
        lv2 = 1; fl = 104'(9) * 104'h1_0000_0001; hs = 16'(63);
        #1;
        if (smp) nsamp++;
        if (prom2) begin
          if (prom_at < 0) prom_at = n;
          chk(smp, 1, "sampled: promote only on a sampled lookup");
          chkv(nsamp, 2, "sampled: promote on 2nd sampled lookup");
        end
        if (aggr2 && first_aggr < 0) first_aggr = n;
        if (first_aggr >= 0) chk(aggr2, 1, "sampled: aggressive on every later packet");
        @(negedge clk); lv2 = 0;
        l = {l[14:0], l[15] ^ l[13] ^ l[12] ^ l[10]};
      end
      chk(prom_at >= 0, 1, "sampled: flow 9 was promoted");
      chkv(first_aggr, prom_at + 1, "sampled: aggressive right after promotion");
      chk(prom_at > 1, 1, "sampled: later than without sampling");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
