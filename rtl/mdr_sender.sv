// mdr_sender: sender (Alice) side of eight-dimensional multidimensional
// reconciliation for continuous-variable QKD.
//
// Alice holds Gaussian raw keys X. The receiver has turned its own correlated
// data into random bits u, and sends for every D-element vector the rotation
// coefficients alpha and its vector norm |Y|, plus the syndrome S = H u of the
// whole frame. Alice turns X into noisy copies of u and corrects them with an
// LDPC decoder, so that both sides end with the same key. Four stages run in
// series:
//   rk_norm      x' = X'/|X'|                     (fp32, 6 clocks)
//   data_map     v  = M'(alpha) x'                (fp32, 4 clocks)
//   llr_init     LLR = scale*|X|*|Y|*v -> fixed point (3 clocks)
//   ldpc_decoder layered sum-product syndrome decoding of one frame of
//                NB*Q bits, then the corrected key (Gen_Key)
// alpha and |Y| travel in delay lines that match the pipeline latencies.
//
// Interface:
//   in_valid/in_ready  one vector (in_x, in_alpha, in_ynorm) per clock. The
//                      sender takes exactly one frame (NB*Q/D vectors) and
//                      then holds in_ready low until that frame's key has
//                      been output: the front end is stalled while the
//                      decoder iterates.
//   llr_scale          channel constant 2t/(sqrt(d)*sigma^2), fp32.
//   mat_*, syn_*       write ports of the check-matrix and syndrome memories.
//   key_*              corrected key, Q bits per clock, base column key_addr;
//                      key_ok = syndrome matched, key_iters = iterations used.
// Default sizes are those of the published configuration: d = 8, expansion
// factor 16, 10,000 base columns (160,000-bit frames), 9,000 base rows
// (rate 0.1) and 33,375 base-matrix nonzeros. LLR width, maximum row degree
// and maximum iteration count are this design's choices.
module mdr_sender
  import fp32_pkg::*;
  import mdr_pkg::*;
#(
  parameter int D        = 8,
  parameter int Q        = 16,
  parameter int NB       = 10000,
  parameter int MB       = 9000,
  parameter int NE       = 33375,
  parameter int DMAX     = 64,
  parameter int W        = 8,
  parameter int FRAC     = 3,
  parameter int MAX_ITER = 100,
  localparam int CW = $clog2(NB),
  localparam int SW = $clog2(Q),
  localparam int EW = $clog2(NE + 1),
  localparam int RW = $clog2(MB),
  localparam int IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fp32_t         llr_scale,
  // raw keys and side information from the receiver
  input  logic          in_valid,
  output logic          in_ready,
  input  fp32_t         in_x     [D],
  input  fp32_t         in_alpha [D],
  input  fp32_t         in_ynorm,
  // check matrix and syndrome
  input  logic          mat_we,
  input  logic [EW-1:0] mat_addr,
  input  logic [CW-1:0] mat_col,
  input  logic [SW-1:0] mat_shift,
  input  logic          syn_we,
  input  logic [RW-1:0] syn_addr,
  input  logic [Q-1:0]  syn_data,
  // corrected keys
  output logic          key_valid,
  output logic [CW-1:0] key_addr,
  output logic [Q-1:0]  key_data,
  output logic          key_last,
  output logic          key_ok,
  output logic [IW-1:0] key_iters
);
  localparam int NL  = norm_lat(D);
  localparam int ML  = map_lat(D);
  localparam int FV  = NB * Q / D;          // vectors per frame
  localparam int FVW = $clog2(FV + 1);

  logic           take;
  logic [FVW-1:0] frame_cnt;
  logic           dec_ready;

  // ---------------- frame admission ----------------
  assign in_ready = dec_ready && (frame_cnt != FVW'(FV));
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        frame_cnt <= '0;
    else if (key_last) frame_cnt <= '0;
    else if (take)     frame_cnt <= frame_cnt + 1'b1;
  end

  // ---------------- raw keys normalization ----------------
  logic  n_valid;
  fp32_t n_x [D];
  fp32_t n_norm;

  rk_norm #(.D(D)) u_norm (
    .clk (clk), .rst_n (rst_n), .ce (1'b1),
    .in_valid (take), .in_x (in_x),
    .out_valid (n_valid), .out_x (n_x), .out_norm (n_norm)
  );

  // side information delay lines
  fp32_t alpha_d [NL] [D];
  fp32_t ynorm_d [NL + ML];
  fp32_t xnorm_d [ML];

  always_ff @(posedge clk) begin
    alpha_d[0] <= in_alpha;
    ynorm_d[0] <= in_ynorm;
    xnorm_d[0] <= n_norm;
    for (int i = 1; i < NL; i++)      alpha_d[i] <= alpha_d[i-1];
    for (int i = 1; i < NL + ML; i++) ynorm_d[i] <= ynorm_d[i-1];
    for (int i = 1; i < ML; i++)      xnorm_d[i] <= xnorm_d[i-1];
  end

  // ---------------- data mapping ----------------
  logic  m_valid;
  fp32_t m_v [D];

  data_map #(.D(D)) u_map (
    .clk (clk), .rst_n (rst_n), .ce (1'b1),
    .in_valid (n_valid), .in_x (n_x), .in_alpha (alpha_d[NL-1]),
    .out_valid (m_valid), .out_v (m_v)
  );

  // ---------------- LLR initialization ----------------
  logic                l_valid;
  logic signed [W-1:0] l_llr [D];

  llr_init #(.D(D), .W(W), .FRAC(FRAC)) u_llr (
    .clk (clk), .rst_n (rst_n), .ce (1'b1), .scale (llr_scale),
    .in_valid (m_valid), .in_v (m_v),
    .in_xnorm (xnorm_d[ML-1]), .in_ynorm (ynorm_d[NL+ML-1]),
    .out_valid (l_valid), .out_llr (l_llr)
  );

  // ---------------- iterative decoding ----------------
  ldpc_decoder #(
    .D (D), .Q (Q), .NB (NB), .MB (MB), .NE (NE), .DMAX (DMAX),
    .W (W), .FRAC (FRAC), .MAX_ITER (MAX_ITER)
  ) u_dec (
    .clk (clk), .rst_n (rst_n),
    .mat_we (mat_we), .mat_addr (mat_addr), .mat_col (mat_col), .mat_shift (mat_shift),
    .syn_we (syn_we), .syn_addr (syn_addr), .syn_data (syn_data),
    .llr_valid (l_valid), .llr_ready (dec_ready), .llr_in (l_llr),
    .key_valid (key_valid), .key_addr (key_addr), .key_data (key_data),
    .key_last (key_last), .key_ok (key_ok), .key_iters (key_iters)
  );

endmodule
