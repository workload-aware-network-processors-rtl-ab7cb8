// tb_pkt_fifo: fills the 100-entry queue, checks full/empty, the dropped
// 101st push, FIFO order and occupancy with simultaneous push and pop, and
// single entries passing through the empty queue.
module tb_pkt_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, empty;
  logic [31:0] din = '0, dout;
  logic [6:0] count;

  pkt_fifo #(.W(32)) dut (.clk, .rst_n, .push, .din, .full, .pop, .dout, .empty, .count);

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); chk(int'(empty), 1, "empty after reset");
    for (int i = 0; i < 101; i++) begin
      @(negedge clk); push = 1; din = 1000 + i;
    end
    @(negedge clk); push = 0;
    chk(int'(count), 100, "holds 100"); chk(int'(full), 1, "full");
    for (int i = 0; i < 50; i++) begin
      chk(int'(dout), 1000 + i, "order");
      pop = 1; @(negedge clk); pop = 0;
    end
    chk(int'(count), 50, "50 left");
    // push and pop together keep the count
    for (int i = 0; i < 20; i++) begin
      chk(int'(dout), 1050 + i, "order during push+pop");
      push = 1; pop = 1; din = 2000 + i; @(negedge clk);
    end
    push = 0; pop = 0;
    chk(int'(count), 50, "count kept");
    for (int i = 0; i < 50; i++) begin
      chk(int'(dout), (i < 30) ? 1070 + i : 2000 + i - 30, "drain order (101st push dropped)");
      pop = 1; @(negedge clk); pop = 0;
    end
    chk(int'(empty), 1, "empty at end");
    // single entries through the empty queue (read pointer follows the write one)
    for (int i = 0; i < 5; i++) begin
      push = 1; din = 3000 + i; @(negedge clk); push = 0;
      chk(int'(dout), 3000 + i, "single entry after empty");
      pop = 1; @(negedge clk); pop = 0;
      chk(int'(empty), 1, "empty again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
