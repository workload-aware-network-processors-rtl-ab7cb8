// pkt_fifo: packet-descriptor queue.
//
// The input queue in front of a processing core (100 entries in the design's
// configuration) and the global input queue of the power-managed core pool
// (Q_max = 80). A circular buffer of DEPTH words with a registered occupancy
// count, which the queue manager and the power manager read as the queue
// length. Push into a full queue and pop from an empty one are ignored (the
// caller drops the packet) and flagged by assertions.
//
// Interface/timing: dout shows the head while !empty; push and pop act at the
// clock edge and may happen together; count is the occupancy after the
// previous edge.
module pkt_fifo #(
  parameter int  W     = np_pkg::DESC_W,
  parameter int  DEPTH = 100,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  din,
  output logic          full,
  input  logic          pop,
  output logic [W-1:0]  dout,
  output logic          empty,
  output logic [CW-1:0] count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic          do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (do_push) wr <= inc(wr);
      if (do_pop) rd <= inc(rd);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr] <= din;

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("pkt_fifo: pop while empty");
endmodule
