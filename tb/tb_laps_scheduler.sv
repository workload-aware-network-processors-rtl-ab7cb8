// tb_laps_scheduler: end-to-end decisions of the packet scheduler with the
// default configuration (16 cores, 4 services, 4 buckets each).
// Reference core = bucket (CRC16 mod 4 at start) of the service's list,
// computed here independently. Checks: flow locality across packets, per
// service map tables, migration of an aggressive flow off the overloaded core
// (and only then), the migration table keeping the flow on its new core after
// the imbalance ends, no migration of a non-aggressive flow, linear-hashing
// growth, invalidation on core release, and the one-clock decision latency.
module tb_laps_scheduler;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic iv = 0, ov, om, omh, prom;
  pkt_desc_t id = '0, od;
  logic [3:0] oc;
  logic imb = 0;
  logic [3:0] mxc = '0;
  logic [3:0] lc [4] = '{4'd0, 4'd4, 4'd8, 4'd12};
  logic [3:0] lv = 4'hF;
  logic gv = 0, sv = 0, miv = 0;
  logic [1:0] gs = '0, ss = '0;
  logic [3:0] gc = '0, sc, mic = '0;
  logic [4:0] nb [4];

  laps_scheduler dut (.clk, .rst_n, .in_valid(iv), .in_desc(id), .out_valid(ov), .out_core(oc),
    .out_desc(od), .out_migrated(om), .out_mig_hit(omh), .afd_promote(prom),
    .imbalance(imb), .max_core(mxc), .least_core(lc), .least_valid(lv),
    .grow_valid(gv), .grow_svc(gs), .grow_core(gc), .shrink_valid(sv), .shrink_svc(ss),
    .shrink_core(sc), .n_buckets(nb), .mig_inv_valid(miv), .mig_inv_core(mic));

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_crc(input logic [103:0] k);
    logic [15:0] r;
    r = 16'hFFFF;
    for (int b = 103; b >= 0; b--) r = (r[15] ^ k[b]) ? ((r << 1) ^ 16'h1021) : (r << 1);
    return r;
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic logic [103:0] fl(input int f);
    return {32'h0a000000 + 32'(f), 32'hc0a80001, 16'(1000 + f), 16'd80, 8'd6};
  endfunction

  // send one packet; the decision must appear exactly one clock later
  task automatic send(input int f, input int s, output int core, output int mig);
    @(negedge clk); iv = 1; id.flow = fl(f); id.svc = 2'(s); id.len = 16'd64;
    @(negedge clk); iv = 0;
    chk(int'(ov), 1, "decision one clock after the packet");
    chk(int'(od.flow == fl(f)), 1, "descriptor passed through");
    core = int'(oc); mig = int'(om);
  endtask

  int c, m, hc;
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // map-table placement and flow locality for all services
    for (int f = 0; f < 40; f++) begin
      int s;
      s = f % 4;
      send(f, s, c, m);
      chk(c, s * 4 + int'(ref_crc(fl(f)) % 4), "map table core");
      chk(m, 0, "no migration without imbalance");
    end
    // flow 100 of service 1 becomes aggressive (two packets -> AFC)
    send(100, 1, c, m); send(100, 1, c, m);
    hc = 4 + int'(ref_crc(fl(100)) % 4);
    chk(c, hc, "flow 100 home core");
    // imbalance on a different core: no migration
    imb = 1; mxc = 4'((hc == 7) ? 6 : 7);
    send(100, 1, c, m); chk(m, 0, "not the overloaded core: stays");
    // imbalance on its own core, least loaded core of service 1 is core 5 or 4
    mxc = 4'(hc); lc[1] = 4'((hc == 5) ? 4 : 5);
    send(100, 1, c, m); chk(m, 1, "aggressive flow migrated"); chk(c, int'(lc[1]), "to least loaded core");
    // a flow seen once, on the same overloaded core, is not migrated
    begin
      int f2;
      f2 = 200;
      while (4 + int'(ref_crc(fl(f2)) % 4) != hc) f2++;
      send(f2, 1, c, m); chk(m, 0, "non-aggressive flow not migrated"); chk(c, hc, "non-aggressive flow stays");
    end
    imb = 0;
    send(100, 1, c, m); chk(c, int'(lc[1]), "migration table keeps the flow");
    chk(int'(omh), 1, "migration-table hit reported");
    // grow service 1 by core 13: split bucket 0 of service 1
    @(negedge clk); gv = 1; gs = 2'd1; gc = 4'd13; @(negedge clk); gv = 0;
    chk(int'(nb[1]), 5, "service 1 has 5 buckets");
    for (int f = 300; f < 340; f++) begin
      int b;
      b = int'(ref_crc(fl(f)) % 4);
      if (b == 0 && (ref_crc(fl(f)) % 8) == 4) b = 4;
      send(f, 1, c, m);
      chk(c, (b == 4) ? 13 : 4 + b, "linear hashing after growth");
    end
    // releasing the migration target invalidates the migration
    @(negedge clk); miv = 1; mic = lc[1]; @(negedge clk); miv = 0;
    send(100, 1, c, m);
    begin
      int b;
      b = int'(ref_crc(fl(100)) % 4);
      if (b == 0 && (ref_crc(fl(100)) % 8) == 4) b = 4;
      chk(c, (b == 4) ? 13 : 4 + b, "flow 100 back on its map-table core");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
