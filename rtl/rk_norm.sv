// rk_norm: raw keys normalization, x' = X' / |X'| for one D-element vector.
//
// A fully pipelined fp32 datapath accepts one vector per clock:
//   stage 1        D multipliers square the elements,
//   stages 2..1+L  a balanced adder tree (L = log2 D levels, D-1 adders in
//                  all) sums the squares,
//   stage 2+L      one square root gives |X'|,
//   stage 3+L      D dividers divide each element by |X'|.
// The input elements travel alongside in a delay line so that the dividers
// see them together with the norm. For the eight-dimensional reconciliation
// this is 8 multipliers, 7 adders, 1 square root and 8 dividers and a
// latency of six clocks, the operator counts and latency given for this
// module. The norm |X'| is also output because the LLR initialization needs it.
//
// Interface: in_valid/in_x are taken when ce is high; out_valid/out_x/out_norm
// appear norm_lat(D) enabled clocks later. ce low freezes the whole pipeline
// (used by the sender to stall). Each operator is followed by exactly one
// register; the fp32 operators are the reduced ones of fp32_pkg (truncating,
// no subnormals), a choice of this design.
module rk_norm
  import fp32_pkg::*;
  import mdr_pkg::*;
#(
  parameter int D = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  logic  in_valid,
  input  fp32_t in_x [D],
  output logic  out_valid,
  output fp32_t out_x [D],
  output fp32_t out_norm
);
  localparam int L   = $clog2(D);
  localparam int LAT = norm_lat(D);

  initial assert (D == (1 << L)) else $error("rk_norm: D must be a power of two");

  // valid shift register, one bit per stage
  logic [LAT-1:0] vld;
  // element delay line: xd[k] holds the inputs that entered k+1 clocks ago
  fp32_t xd [LAT-1] [D];
  // adder tree levels: tree[0] = squares, tree[L][0] = sum of squares
  fp32_t tree [L+1] [D];
  fp32_t norm_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= {vld[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      xd[0] <= in_x;
      for (int k = 1; k < LAT - 1; k++) xd[k] <= xd[k-1];
      // stage 1: squares
      for (int i = 0; i < D; i++) tree[0][i] <= fp_mul(in_x[i], in_x[i]);
      // stages 2..L+1: pairwise additions
      for (int l = 1; l <= L; l++) begin
        for (int i = 0; i < (D >> l); i++)
          tree[l][i] <= fp_add(tree[l-1][2*i], tree[l-1][2*i+1]);
        for (int i = (D >> l); i < D; i++)
          tree[l][i] <= FP_ZERO;
      end
      // stage L+2: square root
      norm_r <= fp_sqrt(tree[L][0]);
      // stage L+3: division by the norm
      for (int i = 0; i < D; i++) out_x[i] <= fp_div(xd[LAT-2][i], norm_r);
      out_norm <= norm_r;
    end
  end

  assign out_valid = vld[LAT-1];

endmodule
