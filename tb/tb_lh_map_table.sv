// tb_lh_map_table: linear hashing on the worked example of incremental
// hashing: 4 initial buckets (cores A-D), keys 1,3,4,5,6,7,8,10,12,15,16,19,22
// used directly as hash values. Growing to 5 buckets moves only the keys of
// bucket 0 with k mod 8 = 4; at 8 buckets every key sits in k mod 8; at 9 the
// split of round 1 uses k mod 16 for bucket 0. Shrinking reverses the steps,
// below 4 buckets too, and reports the core that leaves. A second service is
// checked to stay untouched.
module tb_lh_map_table;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0]  svc = '0, gs = '0, ss = '0;
  logic [15:0] h = '0;
  logic [3:0]  core, bkt, gc = '0, sc;
  logic        gv = 0, sv = 0;
  logic [4:0]  nb [4];

  lh_map_table dut (.clk, .rst_n, .lk_svc(svc), .lk_hash(h), .lk_core(core), .lk_bucket(bkt),
    .grow_valid(gv), .grow_svc(gs), .grow_core(gc), .shrink_valid(sv), .shrink_svc(ss),
    .shrink_core(sc), .n_buckets(nb));

  always #5 clk = ~clk;

  int keys[13] = '{1, 3, 4, 5, 6, 7, 8, 10, 12, 15, 16, 19, 22};
  int bcore[16];     // reference: core of each bucket of service 0

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // reference bucket for b buckets, initial m = 4 (textbook linear hashing)
  function automatic int ref_bucket(input int k, input int b);
    int m, i, p, hb;
    m = 4;
    if (b < m) begin                 // below m the same rule with m = 1
      m = 1;
    end
    i = 0;
    while ((m << (i + 1)) <= b) i++;
    p = b - (m << i);
    hb = k % (m << i);
    if (hb < p) hb = k % (m << (i + 1));
    return hb;
  endfunction

  task automatic check_all(input int b, input string what);
    chk(int'(nb[0]), b, {what, " bucket count"});
    foreach (keys[j]) begin
      svc = 0; h = 16'(keys[j]); #1;
      chk(int'(bkt), ref_bucket(keys[j], b), $sformatf("%s key %0d bucket", what, keys[j]));
      chk(int'(core), bcore[ref_bucket(keys[j], b)], $sformatf("%s key %0d core", what, keys[j]));
    end
  endtask

  task automatic grow(input int c);
    @(negedge clk); gv = 1; gs = 0; gc = 4'(c); @(negedge clk); gv = 0; #1;
  endtask
  task automatic shrink(input int exp_core);
    @(negedge clk); sv = 1; ss = 0; #1 chk(int'(sc), exp_core, "shrink_core"); @(negedge clk); sv = 0; #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) bcore[j] = j;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check_all(4, "initial");
    // explicit values of the worked example: 8,16 -> bucket 0; 4,12 -> 0 before split
    svc = 0; h = 16'd12; #1 chk(int'(bkt), 0, "k12 before split");
    bcore[4] = 12; grow(12);
    check_all(5, "p=1");
    h = 16'd12; #1 chk(int'(core), 12, "k12 moved to the new core");
    h = 16'd8;  #1 chk(int'(core), 0, "k8 stays on core A");
    h = 16'd5;  #1 chk(int'(core), 1, "k5 not yet split");
    for (int j = 5; j < 8; j++) begin bcore[j] = 8 + j; grow(8 + j); end
    check_all(8, "end of round 0");
    h = 16'd22; #1 chk(int'(bkt), 6, "k22 in bucket 6");
    bcore[8] = 9; grow(9);
    check_all(9, "round 1, p=1");
    h = 16'd8; #1 chk(int'(bkt), 8, "k8 split to bucket 8 by k mod 16");
    h = 16'd16; #1 chk(int'(bkt), 0, "k16 stays in bucket 0");
    // other services untouched
    svc = 1; h = 16'd7; #1 chk(int'(core), 4 + 3, "service 1 bucket 3 = core 7");
    chk(int'(nb[1]), 4, "service 1 still 4 buckets");
    // shrink back down to one bucket
    shrink(9);  check_all(8, "shrunk to 8");
    shrink(15); shrink(14); shrink(13);
    check_all(5, "shrunk to 5");
    shrink(12); check_all(4, "shrunk to 4");
    shrink(3);  check_all(3, "shrunk to 3");
    shrink(2);  shrink(1); check_all(1, "one bucket");
    shrink(0);  check_all(1, "never below one bucket");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
