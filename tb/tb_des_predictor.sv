// tb_des_predictor: compares the fixed-point DES predictor with a
// floating-point evaluation of the same equations (alpha = 0.5,
// gamma = 0.25), on a ramp then a noisy plateau; a prediction may differ from
// the real-valued one by at most 2 packets. Also checks that a pure ramp is
// tracked (prediction of the next value) and the one-clock latency.
module tb_des_predictor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic xv = 0, pv;
  logic [31:0] x = '0, pred;

  des_predictor dut (.clk, .rst_n, .x_valid(xv), .x(x), .alpha(16'd32768), .gamma(16'd16384),
                     .pred(pred), .pred_valid(pv));
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
    real s, b, sp, p, a, g;
    int v;
    a = 0.5; g = 0.25;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 80; t++) begin
      v = (t < 40) ? 1000 + 50 * t : 3000 + int'($urandom_range(0, 200)) - 100;
      if (t == 0) begin s = v; b = 0; end
      else begin
        sp = s;
        s = a * v + (1.0 - a) * (s + b);
        b = g * (s - sp) + (1.0 - g) * b;
      end
      p = s + b;
      @(negedge clk); xv = 1; x = 32'(v);
      @(negedge clk); xv = 0;
      chk(int'(pv), 1, "pred_valid one clock after x_valid");
      checks++;
      if ((real'(pred) - p) > 2.0 || (p - real'(pred)) > 2.0) begin
        failures++; $display("FAIL t=%0d pred %0d ref %f", t, pred, p);
      end
      if (t == 39) begin
        checks++;
        if (pred < 32'd2990 || pred > 32'd3010) begin
          failures++; $display("FAIL ramp not tracked: %0d", pred);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
