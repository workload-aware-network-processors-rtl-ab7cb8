// seq_div: unsigned restoring divider, one quotient bit per clock.
//
// Helper for the traffic-factor unit, whose divisions happen once per
// 500 us power-management interval, so a W-cycle bit-serial divider is ample.
// Interface/timing: pulse start with dividend/divisor; W+1 clocks later done
// pulses for one clock with quotient and remainder held until the next start.
// A zero divisor gives an all-ones quotient.
module seq_div #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  localparam int CW = $clog2(W + 1);
  logic [CW-1:0] n;
  logic [W-1:0]  dvs;

  logic [W:0] r;
  assign r = {remainder, quotient[W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; n <= '0; quotient <= '0; remainder <= '0; dvs <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; n <= CW'(W); quotient <= dividend; remainder <= '0; dvs <= divisor;
      end else if (busy) begin
        if (r >= {1'b0, dvs}) begin
          remainder <= W'(r - {1'b0, dvs});
          quotient  <= {quotient[W-2:0], 1'b1};
        end else begin
          remainder <= W'(r);
          quotient  <= {quotient[W-2:0], 1'b0};
        end
        n <= n - 1'b1;
        if (n == CW'(1)) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
