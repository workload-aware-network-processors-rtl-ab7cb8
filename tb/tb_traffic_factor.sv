// tb_traffic_factor: beta and core count for a 16-core pool with 1000 core
// cycles per interval (a scaled-down interval), against values worked out by
// hand: e.g. 100 packets x IPP 50 x CPI 1.5 = 7500 cycles -> beta = 7.5/16,
// C = 8. Also checks exact multiples, zero traffic (C = 1), overload (C and
// beta clamp) and the latency of the bit-serial division.
module tb_traffic_factor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic st = 0, dn;
  logic [31:0] pred = '0;
  logic [15:0] ipp = '0, cpi = '0;
  logic [4:0]  c;
  logic [16:0] beta;

  traffic_factor #(.N_CORES(16), .CYC_PER_INTERVAL(1000)) dut (
    .clk, .rst_n, .start(st), .pred(pred), .ipp(ipp), .cpi(cpi), .done(dn), .c_req(c), .beta(beta));
  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic run(input int p, input int i, input int cq8, input int exp_c, input int exp_beta, input string what);
    int n;
    @(negedge clk); pred = 32'(p); ipp = 16'(i); cpi = 16'(cq8); st = 1;
    @(negedge clk); st = 0; n = 1;
    while (!dn) begin @(negedge clk); n++; end
    chk(n, 74, {what, " latency"});
    chk(int'(c), exp_c, {what, " C"});
    chk(int'(beta), exp_beta, {what, " beta"});
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(100, 50, 384, 8, 30720, "7500 cycles");          // 7.5 cores, beta 0.46875
    run(80, 100, 256, 8, 32768, "exactly 8 cores");      // 8000 cycles
    run(1, 10, 256, 1, 40, "tiny load");                 // 0.01 cores -> 1, beta = 655/16
    run(0, 10, 256, 1, 0, "no traffic");
    run(1000, 100, 512, 16, 65536, "overload clamps");   // 200 cores
    run(300, 40, 320, 15, 61440, "15 cores");            // 300*40*1.25 = 15000
    run(2048001, 1, 1, 9, 32768, "just above 8 cores");  // 8000.004 cycles: ceiling from the remainder
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
