// tb_queue_avg: the RED-style filter with alpha = 0.025. One sample of 40
// from zero gives exactly 40*1638/65536; a step to a constant length is
// followed with the (1-alpha)^n law of a real-valued model (within one
// packet), and the filter ignores clocks without a sample.
module tb_queue_avg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic smp = 0;
  logic [6:0] q = '0, ai;
  logic [22:0] aq;

  queue_avg #(.Q_W(7)) dut (.clk, .rst_n, .sample(smp), .qlen(q), .avg_int(ai), .avg_q16(aq));
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
    real r;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); q = 40; smp = 1; @(negedge clk); smp = 0;
    chk(int'(aq), 65520, "first sample");
    repeat (10) @(negedge clk);
    chk(int'(aq), 65520, "no sample, no change");
    r = 40.0 * 1638.0 / 65536.0;
    for (int n = 1; n < 300; n++) begin
      @(negedge clk); smp = 1; @(negedge clk); smp = 0;
      r = r + (40.0 - r) * 1638.0 / 65536.0;
      checks++;
      if (real'(aq) / 65536.0 > r + 1.0 || real'(aq) / 65536.0 < r - 1.0) begin
        failures++; $display("FAIL n=%0d avg %f ref %f", n, real'(aq) / 65536.0, r);
      end
    end
    chk(int'(ai >= 39), 1, "settles near 40");
    q = 0;
    for (int n = 0; n < 100; n++) begin @(negedge clk); smp = 1; @(negedge clk); smp = 0; end
    chk(int'(ai < 40 && ai > 2), 1, "decays, does not jump");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
