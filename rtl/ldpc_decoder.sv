// ldpc_decoder: iterative layered sum-product syndrome decoder for a
// quasi-cyclic (QC) MET-LDPC code, the last stage of the sender.
//
// Code structure. The check matrix H is an MB x NB base matrix whose every
// nonzero entry is expanded into a Q x Q cyclically shifted identity
// (expansion factor Q), giving MB*Q checks and NB*Q code bits. Base entry
// (row j, column c, shift s) joins expanded check j*Q + l to bit
// c*Q + ((l + s) mod Q) for l = 0..Q-1. The Q expanded rows of one base row
// never share a bit, so Q node processors (one per lane l) work on them at
// once: the parallelism equals the expansion factor.
//
// Memories (all arrays, written from ports or by the decoder):
//   MEM_Matrix  NE entries {column, shift}, row by row with the columns of a
//               row in increasing order. No row numbers are stored: a new
//               row begins where the stored column is smaller than the one
//               before it. The loader must keep that rule (the first column
//               of a row below the last column of the row before).
//   MEM_LLR     NB words of Q LLRs, one word per base column.
//   MEM_Mji     NE words of Q edge messages E_ji kept between iterations
//               (cleared implicitly: they read as 0 in the first iteration).
//   MEM_Syn     MB words of Q syndrome bits received from the other side.
//   row buffer  DMAX words of Q values M_ji of the row being processed.
// A barrel rotation by the entry's shift aligns a MEM_LLR word to the lanes
// on reading and undoes it on writing.
//
// Schedule (one base-matrix entry per clock in every phase):
//   LOAD   D LLRs per clock from the front end fill MEM_LLR (NB*Q/D clocks).
//   PASS_A for each entry of a base row: M = LLR - E_old into the row buffer,
//          node processors accumulate Psi sums and sign products.
//   PASS_B for each entry of the row: new E into MEM_Mji, new LLR into MEM_LLR.
//   CHECK  hard decision and H X^T = S over all NE entries (syn_check).
//   then stop when the syndrome matches or MAX_ITER iterations are done,
//   else start the next iteration.
//   OUT    Gen_Key: the hard decisions are streamed out, Q bits per clock,
//          one base column per clock (NB clocks), then back to LOAD.
// One iteration takes 3*NE + 1 clocks. The front end is held off (llr_ready
// low) from the end of LOAD to the end of OUT.
// Memory reads are asynchronous; this keeps the schedule to one entry per
// clock without read-latency bookkeeping.
// The set of memories, the column-only matrix storage rule, the parallelism
// equal to the expansion factor and the layered update follow the published
// decoder; the three-phase schedule, the shift stored with each column, the
// asynchronous reads and the key stream format are this design's choices.
module ldpc_decoder #(
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
  input  logic                clk,
  input  logic                rst_n,
  // MEM_Matrix write port
  input  logic                mat_we,
  input  logic [EW-1:0]       mat_addr,
  input  logic [CW-1:0]       mat_col,
  input  logic [SW-1:0]       mat_shift,
  // MEM_Syn write port
  input  logic                syn_we,
  input  logic [RW-1:0]       syn_addr,
  input  logic [Q-1:0]        syn_data,
  // LLR input from LLR initialization
  input  logic                llr_valid,
  output logic                llr_ready,
  input  logic signed [W-1:0] llr_in [D],
  // corrected key output (Gen_Key)
  output logic                key_valid,
  output logic [CW-1:0]       key_addr,
  output logic [Q-1:0]        key_data,
  output logic                key_last,
  output logic                key_ok,
  output logic [IW-1:0]       key_iters
);
  localparam int NBEAT = NB * Q / D;
  localparam int BW    = $clog2(NBEAT);
  localparam int KW    = $clog2(DMAX);
  localparam int WPB   = Q / D;             // load beats per MEM_LLR word

  initial begin
    assert (Q % D == 0) else $error("ldpc_decoder: Q must be a multiple of D");
    assert (Q >= 2 && (Q & (Q - 1)) == 0) else $error("ldpc_decoder: Q must be a power of two");
  end

  typedef logic signed [W-1:0] llr_t;
  typedef enum logic [2:0] {S_LOAD, S_PASS_A, S_PASS_B, S_CHECK, S_DECIDE, S_OUT} state_t;

  // ---------------- memories ----------------
  logic [CW-1:0]      mem_col   [NE];
  logic [SW-1:0]      mem_shift [NE];
  logic [Q-1:0][W-1:0] mem_llr  [NB];
  logic [Q-1:0][W-1:0] mem_mji  [NE];
  logic [Q-1:0]       mem_syn   [MB];
  logic [Q-1:0][W-1:0] rowbuf   [DMAX];

  // ---------------- control state ----------------
  state_t        state;
  logic [BW-1:0] ld_cnt;
  logic [EW-1:0] row_start;      // first entry of the current base row
  logic [KW-1:0] k;              // entry within the row
  logic [KW-1:0] deg_m1;         // row degree - 1, found in PASS_A
  logic [EW-1:0] ck_e;           // entry counter of CHECK
  logic [RW-1:0] row;
  logic [IW-1:0] iter;
  logic          first_iter;
  logic [CW-1:0] out_col;

  // ---------------- current entry ----------------
  logic [EW-1:0] e;              // entry address in use this clock
  logic [CW-1:0] col;
  logic [SW-1:0] sh;
  logic          row_end;        // e is the last entry of its base row
  logic          last_entry;
  llr_t          lane_llr [Q];   // MEM_LLR word rotated to the lanes
  llr_t          lane_eold [Q];
  llr_t          lane_m [Q], lane_mb [Q], lane_e [Q], lane_new [Q];
  logic [Q-1:0]  lane_syn;
  logic          np_a_en, np_clr;
  logic          ck_ok;

  always_comb begin
    e = (state == S_CHECK) ? ck_e : row_start + EW'(k);
    if (e >= EW'(NE)) e = EW'(NE - 1);
    col        = mem_col[e];
    sh         = mem_shift[e];
    last_entry = (e == EW'(NE - 1));
    row_end    = last_entry || (mem_col[last_entry ? e : e + 1'b1] < col);
    for (int l = 0; l < Q; l++) begin
      lane_llr[l]  = mem_llr[col][SW'(l + int'(sh))];
      lane_eold[l] = first_iter ? '0 : mem_mji[e][l];
      lane_mb[l]   = rowbuf[k][l];
    end
    lane_syn = mem_syn[row];
    np_a_en  = (state == S_PASS_A);
    np_clr   = (k == '0);
  end

  // ---------------- Node_Process lanes ----------------
  for (genvar l = 0; l < Q; l++) begin : g_lane
    node_proc #(.W(W), .FRAC(FRAC), .DMAX(DMAX)) u_np (
      .clk     (clk),
      .rst_n   (rst_n),
      .clr     (np_clr),
      .a_en    (np_a_en),
      .llr_in  (lane_llr[l]),
      .e_old   (lane_eold[l]),
      .m_out   (lane_m[l]),
      .m_in    (lane_mb[l]),
      .syn_bit (lane_syn[l]),
      .e_new   (lane_e[l]),
      .llr_new (lane_new[l])
    );
  end

  // ---------------- Decision ----------------
  syn_check #(.Q(Q), .W(W)) u_chk (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (state == S_CHECK),
    .clr      (ck_e == '0),
    .row_last (row_end),
    .llr      (lane_llr),
    .syn_row  (lane_syn),
    .ok       (ck_ok)
  );

  // ---------------- memory writes ----------------
  always_ff @(posedge clk) begin
    if (mat_we) begin
      mem_col[mat_addr]   <= mat_col;
      mem_shift[mat_addr] <= mat_shift;
    end
    if (syn_we) mem_syn[syn_addr] <= syn_data;
    if (state == S_LOAD && llr_valid) begin
      for (int i = 0; i < D; i++)
        mem_llr[CW'(ld_cnt / BW'(WPB))][(int'(ld_cnt) % WPB) * D + i] <= llr_in[i];
    end
    if (state == S_PASS_A) begin
      for (int l = 0; l < Q; l++) rowbuf[k][l] <= lane_m[l];
    end
    if (state == S_PASS_B) begin
      for (int l = 0; l < Q; l++) begin
        mem_mji[e][l]                  <= lane_e[l];
        mem_llr[col][SW'(l + int'(sh))] <= lane_new[l];
      end
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      ld_cnt     <= '0;
      row_start  <= '0;
      k          <= '0;
      deg_m1     <= '0;
      ck_e       <= '0;
      row        <= '0;
      iter       <= '0;
      first_iter <= 1'b1;
      out_col    <= '0;
      key_ok     <= 1'b0;
      key_iters  <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (llr_valid) begin
          if (ld_cnt == BW'(NBEAT - 1)) begin
            ld_cnt     <= '0;
            state      <= S_PASS_A;
            row_start  <= '0;
            row        <= '0;
            k          <= '0;
            iter       <= '0;
            first_iter <= 1'b1;
          end else begin
            ld_cnt <= ld_cnt + 1'b1;
          end
        end
        S_PASS_A: begin
          if (row_end) begin
            deg_m1 <= k;
            k      <= '0;
            state  <= S_PASS_B;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_PASS_B: begin
          if (k == deg_m1) begin
            k         <= '0;
            row_start <= e + 1'b1;
            if (last_entry) begin
              state <= S_CHECK;
              ck_e  <= '0;
              row   <= '0;
            end else begin
              row   <= row + 1'b1;
              state <= S_PASS_A;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        S_CHECK: begin
          if (row_end) row <= row + 1'b1;
          if (last_entry) state <= S_DECIDE;
          else ck_e <= ck_e + 1'b1;
        end
        S_DECIDE: begin
          iter       <= iter + 1'b1;
          first_iter <= 1'b0;
          row_start  <= '0;
          row        <= '0;
          k          <= '0;
          if (ck_ok || iter + 1'b1 == IW'(MAX_ITER)) begin
            key_ok    <= ck_ok;
            key_iters <= iter + 1'b1;
            out_col   <= '0;
            state     <= S_OUT;
          end else begin
            state <= S_PASS_A;
          end
        end
        S_OUT: begin
          if (out_col == CW'(NB - 1)) state <= S_LOAD;
          else out_col <= out_col + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // ---------------- Gen_Key output ----------------
  always_comb begin
    key_valid = (state == S_OUT);
    key_addr  = out_col;
    key_last  = (state == S_OUT) && (out_col == CW'(NB - 1));
    for (int l = 0; l < Q; l++) key_data[l] = mem_llr[out_col][l][W-1];
  end

  assign llr_ready = (state == S_LOAD);

  // a base row must fit the row buffer
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_PASS_A && !row_end) |-> (k != KW'(DMAX - 1)))
    else $error("ldpc_decoder: base row longer than DMAX");

endmodule
