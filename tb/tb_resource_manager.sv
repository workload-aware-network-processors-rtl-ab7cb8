// tb_resource_manager: the core allocation and release policies, run against
// a real lh_map_table, with 100-clock rate intervals, Rd1 = 10 packets per
// interval per core and a 20-clock Idle_th.
//  Instance A (8 cores, 2 services x 2 cores, cores 4-7 free and asleep):
//   service 0 receives 35 packets/interval (C = 3): it gets free core 4,
//   which wakes; service 1 receives none (C = 0): one of its cores is marked
//   surplus and, unclaimed for two intervals, released (core 3) and put to sleep.
//  Instance B (4 cores, no free core):
//   underload: service 0 (C = 3) takes service 1's marked surplus core;
//   overload: both services need 4 cores (sum C = 8 > 4), so a core moves from
//   service 0 (3 cores > its 2-core share) to service 1, and the split then
//   stays at 2/2.
module tb_resource_manager;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  always #5 clk = ~clk;

  // ---------------- instance A ----------------
  logic [23:0] rd1 [2] = '{24'd10, 24'd10};
  logic [7:0]  arrA, depA = '0;
  logic [3:0]  qlA [8] = '{default: '0};
  logic [3:0]  nbA [2];
  logic [2:0]  scA, gcA, micA;
  logic        gvA, svA, mivA, eviA, evrA;
  logic        gsA, ssA;
  logic        csA [8];
  logic [7:0]  ownA, slpA;
  logic [3:0]  cnA [2];
  logic [1:0]  smA;
  logic [2:0]  lkcA, lkbA;

  resource_manager #(.N_CORES(8), .N_SERVICES(2), .M_INIT(2), .DEPTH(8), .INTERVAL_CYC(100),
                     .IDLE_TH_CYC(20), .HIGH_TH(4)) rmA (
    .clk, .rst_n, .rd1, .arr(arrA), .dep(depA), .qlen(qlA), .n_buckets(nbA), .shrink_core(scA),
    .grow_valid(gvA), .grow_svc(gsA), .grow_core(gcA), .shrink_valid(svA), .shrink_svc(ssA),
    .mig_inv_valid(mivA), .mig_inv_core(micA), .core_svc(csA), .core_owned(ownA),
    .core_sleep(slpA), .c_need(cnA), .surplus_mark(smA), .ev_interval(eviA), .ev_release(evrA));
  lh_map_table #(.N_SERVICES(2), .N_CORES(8), .M_INIT(2)) mtA (
    .clk, .rst_n, .lk_svc(1'b0), .lk_hash(16'h0), .lk_core(lkcA), .lk_bucket(lkbA),
    .grow_valid(gvA), .grow_svc(gsA), .grow_core(gcA), .shrink_valid(svA), .shrink_svc(ssA),
    .shrink_core(scA), .n_buckets(nbA));

  // ---------------- instance B ----------------
  logic [3:0]  arrB, depB = '0;
  logic [3:0]  qlB [4] = '{default: '0};
  logic [2:0]  nbB [2];
  logic [1:0]  scB, gcB, micB;
  logic        gvB, svB, mivB, eviB, evrB;
  logic        gsB, ssB;
  logic        csB [4];
  logic [3:0]  ownB, slpB;
  logic [2:0]  cnB [2];
  logic [1:0]  smB;
  logic [1:0]  lkcB, lkbB;

  resource_manager #(.N_CORES(4), .N_SERVICES(2), .M_INIT(2), .DEPTH(8), .INTERVAL_CYC(100),
                     .IDLE_TH_CYC(20), .HIGH_TH(4)) rmB (
    .clk, .rst_n, .rd1, .arr(arrB), .dep(depB), .qlen(qlB), .n_buckets(nbB), .shrink_core(scB),
    .grow_valid(gvB), .grow_svc(gsB), .grow_core(gcB), .shrink_valid(svB), .shrink_svc(ssB),
    .mig_inv_valid(mivB), .mig_inv_core(micB), .core_svc(csB), .core_owned(ownB),
    .core_sleep(slpB), .c_need(cnB), .surplus_mark(smB), .ev_interval(eviB), .ev_release(evrB));
  lh_map_table #(.N_SERVICES(2), .N_CORES(4), .M_INIT(2)) mtB (
    .clk, .rst_n, .lk_svc(1'b0), .lk_hash(16'h0), .lk_core(lkcB), .lk_bucket(lkbB),
    .grow_valid(gvB), .grow_svc(gsB), .grow_core(gcB), .shrink_valid(svB), .shrink_svc(ssB),
    .shrink_core(scB), .n_buckets(nbB));

  // ---------------- traffic: N packets early in each interval ----------------
  int nA0 = 35, nA1 = 0, nB0 = 35, nB1 = 0;
  int k = 0;
  always @(negedge clk) begin
    if (!rst_n) k <= 0;
    else k <= eviA ? 0 : k + 1;
  end
  // arrivals: service 0 on core 0, service 1 on core 2
  always_comb begin
    arrA = '0; arrB = '0;
    arrA[0] = (k >= 2 && k < 2 + nA0);
    arrA[2] = (k >= 2 && k < 2 + nA1);
    arrB[0] = (k >= 2 && k < 2 + nB0);
    arrB[2] = (k >= 2 && k < 2 + nB1);
  end

  int inv_seen = 0;
  always @(posedge clk) if (mivA && micA == 3'd3) inv_seen++;

  task automatic wait_intervals(input int n);
    repeat (n) @(posedge eviA);
    repeat (12) @(posedge clk);   // let the service walk finish
    @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(int'(slpA), 8'hF0, "A: cores 4-7 start asleep");
    wait_intervals(1);
    // interval 1: service 0 needs 3
    chk(int'(cnA[0]), 3, "A: C0 = floor(35/10)");
    chk(int'(cnA[1]), 0, "A: C1 = 0");
    chk(int'(nbA[0]), 3, "A: service 0 grew to 3 cores");
    chk(int'(ownA[4]), 1, "A: free core 4 allocated");
    chk(int'(csA[4]), 0, "A: core 4 belongs to service 0");
    chk(int'(slpA[4]), 0, "A: core 4 woken");
    chk(int'(nbB[0]), 2, "B: no free core and no surplus yet: no change");
    repeat (30) @(negedge clk);
    chk(int'(smA[1]), 1, "A: service 1 core marked surplus after Idle_th");
    chk(int'(smB[1]), 1, "B: service 1 marked too");
    wait_intervals(1);
    // interval 2: B takes the marked core (underload); A keeps the mark (age 1)
    chk(int'(nbB[0]), 3, "B: underload, service 0 took the surplus core");
    chk(int'(nbB[1]), 1, "B: service 1 down to 1");
    chk(int'(csB[3]), 0, "B: core 3 moved to service 0");
    chk(int'(nbA[1]), 2, "A: mark not yet old enough to release");
    wait_intervals(1);
    // interval 3: A releases core 3 to sleep
    chk(int'(nbA[1]), 1, "A: surplus core released");
    chk(int'(ownA[3]), 0, "A: core 3 unowned");
    chk(int'(slpA[3]), 1, "A: core 3 asleep");
    chk(int'(inv_seen > 0), 1, "A: migration entries for core 3 invalidated");
    // overload in B
    nB0 = 45; nB1 = 45;           // first interval is partial (the walk took 12 clocks)
    wait_intervals(2);
    chk(int'(cnB[0]), 4, "B: C0 = 4");
    chk(int'(cnB[1]), 4, "B: C1 = 4");
    chk(int'(nbB[0]), 2, "B: overload, service 0 gave up a core");
    chk(int'(nbB[1]), 2, "B: service 1 got its share");
    wait_intervals(2);
    chk(int'(nbB[0]), 2, "B: stable at share (service 0)");
    chk(int'(nbB[1]), 2, "B: stable at share (service 1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
