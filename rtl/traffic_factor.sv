// traffic_factor: traffic factor (beta) and number of cores to keep on.
//
// Turns a predicted packet count into a processing requirement that accounts
// for how expensive the application is:
//     CPP  = IPP * CPI                                    cycles per packet
//     beta = PPS_pred * CPP / (max_cpu_freq * total_cores)
//     C    = beta * total_cores
// Working per interval, PPS_pred*CPP becomes the cycles the predicted packets
// need and max_cpu_freq the cycles one core at full speed offers in the
// interval (CYC_PER_INTERVAL = 1 GHz x 500 us). The formulas follow the design;
// rounding C up (so the predicted work always fits), clamping it to
// 1..N_CORES, the number formats (IPP integer, CPI in Q8.8, beta in Q1.16,
// clamped at 1.0) and the bit-serial divider are this implementation's.
//
// Interface/timing: pulse start with pred/ipp/cpi; about 75 clocks later done
// pulses and c_req/beta hold the result until the next start.
module traffic_factor #(
  parameter int N_CORES          = 16,
  parameter int CYC_PER_INTERVAL = 500000,
  parameter int X_W              = 32,
  localparam int BW              = $clog2(N_CORES + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [X_W-1:0] pred,
  input  logic [15:0]    ipp,
  input  logic [15:0]    cpi,
  output logic           done,
  output logic [BW-1:0]  c_req,
  output logic [16:0]    beta
);
  localparam int DW = X_W + 40;   // pred * ipp * cpi(Q8.8) << 8

  logic [DW-1:0] dividend, quo, rem;
  logic          busy, dv_done;
  assign dividend = DW'({{(DW - X_W){1'b0}}, pred} * DW'(ipp) * DW'(cpi)) << 8;

  seq_div #(.W(DW)) u_div (
    .clk, .rst_n, .start(start), .dividend(dividend), .divisor(DW'(CYC_PER_INTERVAL)),
    .busy(busy), .done(dv_done), .quotient(quo), .remainder(rem));

  logic [DW-1:0] c_full, b_full;
  always_comb begin
    c_full = (quo >> 16) + DW'((quo[15:0] != '0) || (rem != '0));
    if (c_full == '0) c_full = DW'(1);
    b_full = quo / DW'(N_CORES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; c_req <= BW'(N_CORES); beta <= 17'h10000;
    end else begin
      done <= dv_done;
      if (dv_done) begin
        c_req <= (c_full > DW'(N_CORES)) ? BW'(N_CORES) : BW'(c_full);
        beta  <= (b_full > DW'(17'h10000)) ? 17'h10000 : 17'(b_full);
      end
    end
  end
endmodule
