// node_proc: one lane of the layered sum-product node processor.
//
// For every edge (j, i) of the check row j being processed the lane runs the
// update in two passes over the row:
//   pass A (a_en):  M_ji = LLR_i - E_ji(old)
//                   S_j += Psi(|M_ji|),  P_j ^= sign(M_ji)
//   pass B:         E_ji = (-1)^(s_j xor P_j xor sign(M_ji))
//                          * Psi(S_j - Psi(|M_ji|))
//                   LLR_i = M_ji + E_ji
// with Psi(x) = -ln(tanh(|x|/2)) = ln((e^x + 1)/(e^x - 1)). s_j is the
// syndrome bit of the row: a 1 flips the sign of all its messages.
// Excluding edge i from the sum and the sign product is done by subtracting
// its own term.
//
// Number format: messages are W-bit two's complement with FRAC fraction
// bits, symmetric saturation to +/-(2^(W-1)-1). Psi values and the row sum
// S_j carry PXF more fraction bits than the messages: Psi of a large message
// is small, and rounding it to zero would make the reverse Psi(0) return a
// falsely certain message. Two tables, computed at elaboration from the
// formula above and rounded to nearest, implement Psi: forward (2^(W-1)
// entries, message -> Psi domain) and reverse (2^(W-1+PXF) entries, Psi
// domain -> message). The forward Psi(0) saturates to the largest Psi value;
// the reverse table evaluates a zero sum at half a step (about 6.2 for the
// default widths), not at the largest message: a sum that rounds to zero only
// says the other messages are all large, and treating it as certainty makes
// the layered decoder diverge. S_j is wide enough for DMAX edges. The update
// equations and the syndrome sign follow the layered sum-product algorithm
// this decoder is built around; widths and
// tables are this design's choice.
//
// Timing: m_out, e_new and llr_new are combinational. clr (the first edge of a
// row, together with a_en) restarts S_j and P_j; the accumulators update on
// the clock edge where a_en is high.
module node_proc #(
  parameter int W    = 8,
  parameter int FRAC = 3,
  parameter int DMAX = 64,
  parameter int PXF  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // pass A
  input  logic                clr,
  input  logic                a_en,
  input  logic signed [W-1:0] llr_in,
  input  logic signed [W-1:0] e_old,
  output logic signed [W-1:0] m_out,
  // pass B
  input  logic signed [W-1:0] m_in,
  input  logic                syn_bit,
  output logic signed [W-1:0] e_new,
  output logic signed [W-1:0] llr_new
);
  localparam int MW   = W - 1;                 // magnitude width
  localparam int NT   = 1 << MW;               // forward table entries
  localparam int PSW  = MW + PXF;              // Psi-domain value width
  localparam int NR   = 1 << PSW;              // reverse table entries
  localparam int SUMW = PSW + $clog2(DMAX) + 1;
  localparam logic [MW-1:0]  MAXMAG = '1;
  localparam logic [PSW-1:0] PSIMAX = '1;

  typedef logic [PSW-1:0] psi_f_t [NT];
  typedef logic [MW-1:0]  psi_r_t [NR];

  function automatic real psi_real(real x);
    return $ln(($exp(x) + 1.0) / ($exp(x) - 1.0));
  endfunction

  // forward: message magnitude (FRAC fraction bits) -> Psi (FRAC+PXF bits)
  function automatic psi_f_t make_psi_f();
    psi_f_t t;
    real y;
    for (int k = 0; k < NT; k++) begin
      if (k == 0) begin
        t[k] = PSIMAX;
      end else begin
        y = psi_real(real'(k) / real'(1 << FRAC)) * real'(1 << (FRAC + PXF));
        t[k] = (y >= real'(NR - 1)) ? PSIMAX : PSW'($rtoi(y + 0.5));
      end
    end
    return t;
  endfunction

  // reverse: Psi-domain sum (FRAC+PXF bits) -> message magnitude (FRAC bits)
  function automatic psi_r_t make_psi_r();
    psi_r_t t;
    real y;
    for (int k = 0; k < NR; k++) begin
      y = psi_real((k == 0 ? 0.5 : real'(k)) / real'(1 << (FRAC + PXF))) * real'(1 << FRAC);
      t[k] = (y >= real'(NT - 1)) ? MAXMAG : MW'($rtoi(y + 0.5));
    end
    return t;
  endfunction

  localparam psi_f_t PSI_F = make_psi_f();
  localparam psi_r_t PSI_R = make_psi_r();

  function automatic logic signed [W-1:0] sat(logic signed [W:0] x);
    logic signed [W:0] lim;
    lim = (W+1)'(NT - 1);
    if (x > lim)  return W'(lim);
    if (x < -lim) return W'(-lim);
    return W'(x);
  endfunction

  function automatic logic [MW-1:0] mag(logic signed [W-1:0] x);
    return x[W-1] ? MW'(-x) : MW'(x);
  endfunction

  logic [SUMW-1:0] sum_q;
  logic            sgn_q;
  logic [PSW-1:0]  psi_a, psi_b;
  logic [MW-1:0]   mag_b;
  logic [SUMW-1:0] diff;

  // pass A
  always_comb begin
    m_out = sat((W+1)'(llr_in) - (W+1)'(e_old));
    psi_a = PSI_F[mag(m_out)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      sgn_q <= 1'b0;
    end else if (a_en) begin
      if (clr) begin
        sum_q <= SUMW'(psi_a);
        sgn_q <= m_out[W-1];
      end else begin
        sum_q <= sum_q + SUMW'(psi_a);
        sgn_q <= sgn_q ^ m_out[W-1];
      end
    end
  end

  // pass B
  always_comb begin
    psi_b = PSI_F[mag(m_in)];
    diff  = sum_q - SUMW'(psi_b);
    mag_b = (diff > SUMW'(PSIMAX)) ? PSI_R[NR-1] : PSI_R[PSW'(diff)];
    e_new   = (sgn_q ^ m_in[W-1] ^ syn_bit) ? -$signed({1'b0, mag_b}) : $signed({1'b0, mag_b});
    llr_new = sat((W+1)'(m_in) + (W+1)'(e_new));
  end

endmodule
