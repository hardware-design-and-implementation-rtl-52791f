// llr_init: initial log-likelihood ratios LLR_i = ln(P_i(0) / P_i(1)) of the
// D bits of one reconciliation vector, handed to the decoder in fixed point.
//
// After the rotation the receiver's bit b_i is seen through a Gaussian
// channel: u_i = (-1)^b_i / sqrt(d) = a * v_i + z_i with a = t |X| / |Y| and
// noise variance sigma^2 / |Y|^2 (t: channel gain, sigma^2: noise variance).
// The log-ratio of the two Gaussian densities reduces to a product,
//     LLR_i = (2 t / (sqrt(d) sigma^2)) * |X| * |Y| * v_i = scale * |X| * |Y| * v_i,
// so no exponential or logarithm is evaluated; the channel constant "scale"
// is a run-time input. The D lanes work in parallel and share |X|*|Y|.
//
// Pipeline (latency LLR_LAT = 3, one vector per clock when ce is high):
//   stage 1  scale*v_i per lane, and |X|*|Y| once
//   stage 2  (scale*v_i) * (|X||Y|)
//   stage 3  fp32 -> signed fixed point with FRAC fraction bits, truncated
//            toward zero and saturated to +/-(2^(W-1)-1).
// LLR >= 0 means bit 0 is the more likely value.
// The LLR definition, the fp32 input and the eight parallel lanes follow the
// published module; the closed-form evaluation, the fixed-point format and
// the latency are this design's choices.
module llr_init
  import fp32_pkg::*;
  import mdr_pkg::*;
#(
  parameter int D    = 8,
  parameter int W    = 8,
  parameter int FRAC = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  fp32_t               scale,
  input  logic                in_valid,
  input  fp32_t               in_v [D],
  input  fp32_t               in_xnorm,
  input  fp32_t               in_ynorm,
  output logic                out_valid,
  output logic signed [W-1:0] out_llr [D]
);
  logic [LLR_LAT-1:0] vld;
  fp32_t p1 [D];
  fp32_t p2 [D];
  fp32_t xy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= {vld[LLR_LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      xy <= fp_mul(in_xnorm, in_ynorm);
      for (int i = 0; i < D; i++) begin
        p1[i]      <= fp_mul(in_v[i], scale);
        p2[i]      <= fp_mul(p1[i], xy);
        out_llr[i] <= W'(fp_to_fix(p2[i], FRAC, W));
      end
    end
  end

  assign out_valid = vld[LLR_LAT-1];

endmodule
