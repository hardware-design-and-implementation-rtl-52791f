// syn_check: hard decision and syndrome check H * X^T = S (the "Decision"
// step of the decoder), Q expanded rows at a time.
//
// The decoder sweeps the check matrix edge by edge. On each enabled clock the
// Q lanes receive the LLRs of the Q variables that the current base-matrix
// entry connects to Q expanded check rows. Each LLR is sliced to a bit
// (LLR >= 0 -> 0, LLR < 0 -> 1, following LLR = ln P(0)/P(1)) and XORed into
// the lane's row parity. On the last edge of a base row (row_last) the Q
// parities are compared with the Q syndrome bits of that row and cleared.
// Any mismatch sets a sticky flag; ok = 1 after a sweep means H * X^T = S.
//
// Timing: clr together with en on the first edge of a sweep restarts the
// parity and the flag; ok is valid the clock after the last enabled edge.
// The decision rule and the stopping test follow the decoding algorithm;
// checking by a sweep over the stored matrix is this design's choice.
module syn_check #(
  parameter int Q = 16,
  parameter int W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr,
  input  logic                row_last,
  input  logic signed [W-1:0] llr [Q],
  input  logic [Q-1:0]        syn_row,
  output logic                ok
);
  logic [Q-1:0] par_q, par_n, hard;
  logic         bad_q;

  always_comb begin
    for (int l = 0; l < Q; l++) hard[l] = llr[l][W-1];
    par_n = (clr ? '0 : par_q) ^ hard;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_q <= '0;
      bad_q <= 1'b0;
    end else if (en) begin
      if (row_last) begin
        par_q <= '0;
        bad_q <= (clr ? 1'b0 : bad_q) | (par_n != syn_row);
      end else begin
        par_q <= par_n;
        if (clr) bad_q <= 1'b0;
      end
    end
  end

  assign ok = !bad_q;

endmodule
