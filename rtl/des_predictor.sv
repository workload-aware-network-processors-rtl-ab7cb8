// des_predictor: Double Exponential Smoothing traffic predictor.
//
// Predicts the number of packets of the next power-management interval from
// the counts of past intervals:
//     S_t     = alpha*X_t + (1-alpha)*(S_{t-1} + b_{t-1})
//     b_t     = gamma*(S_t - S_{t-1}) + (1-gamma)*b_{t-1}
//     X_{t+1} = S_t + b_t
// S is the smoothed level and b the trend; alpha and gamma (trained offline)
// are loaded as Q0.16 inputs. The equations are evaluated in the equivalent
// form S_t = L + alpha*(X_t - L) with L = S_{t-1}+b_{t-1}, and
// b_t = b_{t-1} + gamma*(S_t - S_{t-1} - b_{t-1}), which needs two multipliers.
// The predictor and its equations follow the design; the fixed-point format
// (FRAC fraction bits), starting with S = first sample and b = 0, and clamping
// negative predictions to zero are this implementation's choices.
//
// Interface/timing: x_valid/x give the count of the interval that just ended;
// the next clock pred_valid pulses and pred holds X_{t+1} until the next update.
module des_predictor #(
  parameter int X_W  = 32,
  parameter int FRAC = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           x_valid,
  input  logic [X_W-1:0] x,
  input  logic [15:0]    alpha,
  input  logic [15:0]    gamma,
  output logic [X_W-1:0] pred,
  output logic           pred_valid
);
  localparam int SW = X_W + FRAC + 2;   // signed level/trend width

  logic signed [SW-1:0] s_q, b_q;
  logic                 init;

  logic signed [SW-1:0] xs, lvl, s_n, b_n, p_n, d1, d2;
  logic signed [SW+17:0] m1, m2;
  always_comb begin
    xs  = SW'({2'b00, x, {FRAC{1'b0}}});
    lvl = s_q + b_q;
    d1  = xs - lvl;
    m1  = {{18{d1[SW-1]}}, d1} * {{SW{1'b0}}, 2'b00, alpha};
    s_n = lvl + SW'(m1 >>> 16);
    d2  = s_n - s_q - b_q;
    m2  = {{18{d2[SW-1]}}, d2} * {{SW{1'b0}}, 2'b00, gamma};
    b_n = b_q + SW'(m2 >>> 16);
    if (!init) begin s_n = xs; b_n = '0; end
    p_n = s_n + b_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0; b_q <= '0; init <= 1'b0; pred <= '0; pred_valid <= 1'b0;
    end else begin
      pred_valid <= x_valid;
      if (x_valid) begin
        s_q  <= s_n;
        b_q  <= b_n;
        init <= 1'b1;
        if (p_n < 0) pred <= '0;
        else if (p_n[SW-1:FRAC+X_W] != '0) pred <= '1;
        else pred <= p_n[FRAC +: X_W];
      end
    end
  end
endmodule
