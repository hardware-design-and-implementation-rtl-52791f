// data_map: the sender's data mapping, v = M'(alpha) * x'.
//
// The receiver sends alpha, the coordinates of the rotation in the basis of
// the matrix family A_1..A_D: M' = sum_k alpha_k A_k. Because the family's
// nonzero entries are +/-1 and never overlap, M' is formed without any
// arithmetic: entry (r, c) is alpha_{r XOR c}, negated where the combined
// sign matrix A'_D (mdr_pkg) holds -1. Negation is a sign-bit flip, so
// building M' costs no floating-point operator at all.
// The matrix-vector product then uses D*D fp32 multipliers (stage 1) and one
// adder tree per row (log2 D further stages).
//
// Interface: in_valid with in_x (x') and in_alpha is taken when ce is high;
// out_valid/out_v follow map_lat(D) enabled clocks later (4 for D = 8). The
// pipeline register placement is this design's choice. D may be 4 or 8.
module data_map
  import fp32_pkg::*;
  import mdr_pkg::*;
#(
  parameter int D = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  logic  in_valid,
  input  fp32_t in_x     [D],
  input  fp32_t in_alpha [D],
  output logic  out_valid,
  output fp32_t out_v    [D]
);
  localparam int L   = $clog2(D);
  localparam int LAT = map_lat(D);

  initial assert (D == 4 || D == 8) else $error("data_map: D must be 4 or 8");

  logic [LAT-1:0] vld;
  // per row r: tree[l][r][i], level 0 = products
  fp32_t tree [L+1] [D] [D];
  // M' entries, combinational
  fp32_t m [D] [D];

  always_comb begin
    for (int r = 0; r < D; r++)
      for (int c = 0; c < D; c++)
        m[r][c] = a_neg(D, r, c) ? fp_neg(in_alpha[a_idx(r, c)]) : in_alpha[a_idx(r, c)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= LAT'({vld, in_valid});
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      for (int r = 0; r < D; r++) begin
        for (int c = 0; c < D; c++) tree[0][r][c] <= fp_mul(m[r][c], in_x[c]);
        for (int l = 1; l <= L; l++) begin
          for (int i = 0; i < (D >> l); i++)
            tree[l][r][i] <= fp_add(tree[l-1][r][2*i], tree[l-1][r][2*i+1]);
          for (int i = (D >> l); i < D; i++)
            tree[l][r][i] <= FP_ZERO;
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < D; r++) out_v[r] = tree[L][r][0];
  end
  assign out_valid = vld[LAT-1];

endmodule
