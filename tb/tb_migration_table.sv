// tb_migration_table: checks lookup, in-place update, use of free entries
// before round-robin replacement, and invalidation by core on a 4-entry table.
module tb_migration_table;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [103:0] lf = '0, inf = '0;
  logic hit, insv = 0, invv = 0;
  logic [3:0] hc, inc = '0, ivc = '0;

  migration_table #(.ENTRIES(4)) dut (
    .clk, .rst_n, .lookup_flow(lf), .hit(hit), .hit_core(hc),
    .ins_valid(insv), .ins_flow(inf), .ins_core(inc), .inv_valid(invv), .inv_core(ivc));

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic ins(input int f, input int c);
    @(negedge clk); insv = 1; inf = 104'(f) << 40; inc = 4'(c);
    @(negedge clk); insv = 0;
  endtask
  task automatic look(input int f, input int exp_hit, input int exp_core, input string what);
    @(negedge clk); lf = 104'(f) << 40; #1;
    chk(int'(hit), exp_hit, {what, " hit"});
    if (exp_hit != 0) chk(int'(hc), exp_core, {what, " core"});
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    look(1, 0, 0, "empty");
    ins(1, 5); ins(2, 6);
    look(1, 1, 5, "f1"); look(2, 1, 6, "f2"); look(3, 0, 0, "f3 absent");
    ins(1, 9);                       // same flow: updated in place
    look(1, 1, 9, "f1 moved again");
    ins(3, 7); ins(4, 8);            // table now full (1,2,3,4)
    ins(5, 10);                      // round robin replaces entry 0 (flow 1)
    look(1, 0, 0, "f1 replaced"); look(5, 1, 10, "f5"); look(2, 1, 6, "f2 kept");
    ins(6, 11);                      // replaces entry 1 (flow 2)
    look(2, 0, 0, "f2 replaced"); look(3, 1, 7, "f3 kept");
    @(negedge clk); invv = 1; ivc = 4'd7; @(negedge clk); invv = 0;
    look(3, 0, 0, "f3 invalidated with core 7"); look(4, 1, 8, "f4 survives");
    ins(7, 12);                      // uses the freed entry, not round robin
    look(4, 1, 8, "f4 still there"); look(7, 1, 12, "f7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
