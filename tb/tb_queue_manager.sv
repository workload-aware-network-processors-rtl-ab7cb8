// tb_queue_manager: 4 cores (0,1 -> service 0; 2,3 -> service 1), 8-entry
// queues, imbalance threshold 6. Checks per-core enqueue, drop on a full
// queue, arrival/departure pulses, the imbalance signal and overloaded core,
// and the least loaded core of each service (only owned cores count).
module tb_queue_manager;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ev = 0, drop, imb;
  logic [1:0] ec = '0, mc;
  pkt_desc_t ed = '0, dd [4];
  logic [3:0] dr = '0, dvld, arr, dep, owned = 4'b1111;
  logic sv [4] = '{1'b0, 1'b0, 1'b1, 1'b1};
  logic [3:0] ql [4];
  logic [1:0] lc [2];
  logic [1:0] lv;

  queue_manager #(.N_CORES(4), .N_SERVICES(2), .DEPTH(8), .IMB_TH(6)) dut (
    .clk, .rst_n, .enq_valid(ev), .enq_core(ec), .enq_desc(ed), .enq_drop(drop),
    .deq_ready(dr), .deq_valid(dvld), .deq_desc(dd), .core_svc(sv), .core_owned(owned),
    .qlen(ql), .arr, .dep, .imbalance(imb), .max_core(mc), .least_core(lc), .least_valid(lv));

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic enq(input int c, input int tag, input int exp_drop);
    @(negedge clk); ev = 1; ec = 2'(c); ed = '0; ed.len = 16'(tag);
    #1 chk(int'(drop), exp_drop, "drop"); chk(int'(arr[c]), 1 - exp_drop, "arr pulse");
    @(negedge clk); ev = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    enq(2, 1, 0); enq(2, 2, 0); enq(3, 3, 0);
    #1 chk(int'(lc[1]), 3, "least of service 1 = core 3"); chk(int'(lc[0]), 0, "least of service 0 = core 0");
    for (int i = 0; i < 5; i++) enq(1, 10 + i, 0);
    #1 chk(int'(imb), 0, "5 < 6: no imbalance");
    enq(1, 15, 0);
    #1 chk(int'(imb), 1, "6 >= 6: imbalance"); chk(int'(mc), 1, "overloaded core 1");
    enq(1, 16, 0); enq(1, 17, 0); enq(1, 18, 1);
    chk(int'(ql[1]), 8, "core 1 queue full at 8");
    // core 0 not owned -> service 0 least loaded is core 1
    owned = 4'b1110; #1 chk(int'(lc[0]), 1, "unowned core 0 skipped");
    owned = 4'b1100; #1 chk(int'(lv[0]), 0, "service 0 has no core");
    owned = 4'b1111;
    // dequeue from core 1 in order
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); chk(int'(dvld[1]), 1, "deq valid"); chk(int'(dd[1].len), 10 + i, "deq order");
      dr = 4'b0010; #1 chk(int'(dep[1]), 1, "dep pulse"); @(negedge clk); dr = '0;
    end
    #1 chk(int'(imb), 0, "5 left: imbalance gone");
    chk(int'(dvld[0]), 0, "core 0 empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
