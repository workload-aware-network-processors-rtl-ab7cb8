// queue_avg: low-pass filtered queue length.
//
// avg = alpha*qlength + (1-alpha)*avg with alpha = 0.025 (ALPHA_Q16/65536),
// the exponential filter used by RED, so that a short burst does not move the
// power manager. The filter and alpha follow the design; updating it on each
// packet arrival (sample) and keeping 16 fraction bits are this
// implementation's choices.
//
// Interface/timing: on sample, avg is updated at the clock edge from qlen;
// avg_int is its integer part, avg_q16 the full value.
module queue_avg #(
  parameter int Q_W       = 8,
  parameter int ALPHA_Q16 = 1638
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample,
  input  logic [Q_W-1:0]   qlen,
  output logic [Q_W-1:0]   avg_int,
  output logic [Q_W+15:0]  avg_q16
);
  logic signed [Q_W+17:0] diff;
  logic signed [Q_W+35:0] prod;
  assign diff = $signed({2'b00, qlen, 16'h0000}) - $signed({2'b00, avg_q16});
  assign prod = diff * $signed(19'(ALPHA_Q16));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avg_q16 <= '0;
    else if (sample) avg_q16 <= (Q_W + 16)'($signed({2'b00, avg_q16}) + (Q_W + 18)'(prod >>> 16));
  end
  assign avg_int = avg_q16[Q_W+15:16];
endmodule
