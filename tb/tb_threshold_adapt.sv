// tb_threshold_adapt: Q_max = 80 gives high 40, low 10, C_th 40. A queue
// reaching 76 (95%) in an interval lowers all by 10% (36/9/36); ten quiet
// intervals raise them by 10% (39/10/39), capped at the starting values; an
// interval that reaches C_th restarts the quiet count.
module tb_threshold_adapt;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tick = 0, evd, evu;
  logic [6:0] q = '0, lo, hi, ct;

  threshold_adapt dut (.clk, .rst_n, .tick, .qlen(q), .low_th(lo), .high_th(hi), .c_th(ct),
                       .ev_down(evd), .ev_up(evu));
  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic interval(input int peak);
    @(negedge clk); q = 7'(peak); repeat (5) @(negedge clk); q = 0;
    repeat (5) @(negedge clk); tick = 1; @(negedge clk); tick = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(int'(hi), 40, "high_th = Qmax - 40"); chk(int'(lo), 10, "low_th = high/4"); chk(int'(ct), 40, "C_th");
    interval(75); chk(int'(hi), 40, "75 < 95%: unchanged");
    interval(76); chk(int'(hi), 36, "high -10%"); chk(int'(lo), 9, "low -10%"); chk(int'(ct), 36, "C_th -10%");
    repeat (9) interval(10);
    chk(int'(hi), 36, "9 quiet intervals: unchanged");
    interval(36);                // reaches C_th: quiet count restarts
    repeat (9) interval(10);
    chk(int'(hi), 36, "restarted count");
    interval(10);
    chk(int'(hi), 39, "high +10%"); chk(int'(lo), 10, "low +10%"); chk(int'(ct), 39, "C_th +10%");
    repeat (10) interval(0);
    chk(int'(hi), 40, "capped at start value"); chk(int'(lo), 10, "low capped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
