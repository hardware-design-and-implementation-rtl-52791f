// tb_ldpc_decoder: decodes frames of a small random quasi-cyclic code
// (40 x 8 bits, 36 x 8 checks, 133 base nonzeros) and compares the decoder
// bit for bit with the layered sum-product model of tb_code_pkg: the key,
// the iteration count and the success flag. Frames cycle through three
// kinds: noiseless LLRs (success after one iteration), noisy LLRs (several
// iterations) and LLRs unrelated to the syndrome (stop at MAX_ITER). It also
// checks that one iteration takes 3*NE+1 clocks, that the key comes out one
// base column per clock, and that llr_ready stays low while decoding.
module tb_ldpc_decoder;
  import tb_fp_pkg::*;
  import tb_code_pkg::*;
  localparam int D = 8, Q = 8, NB = 40, MB = 36, NE = 133, DMAX = 16, W = 8, FRAC = 3, MAX_ITER = 8;
  localparam int CW = $clog2(NB), SW = $clog2(Q), EW = $clog2(NE + 1), RW = $clog2(MB), IW = $clog2(MAX_ITER + 1);
  localparam int NFRAMES = 12;

  logic                clk = 0, rst_n = 0;
  logic                mat_we = 0, syn_we = 0, llr_valid = 0, llr_ready;
  logic [EW-1:0]       mat_addr = '0;
  logic [CW-1:0]       mat_col = '0;
  logic [SW-1:0]       mat_shift = '0;
  logic [RW-1:0]       syn_addr = '0;
  logic [Q-1:0]        syn_data = '0;
  logic signed [W-1:0] llr_in [D];
  logic                key_valid, key_last, key_ok;
  logic [CW-1:0]       key_addr;
  logic [Q-1:0]        key_data;
  logic [IW-1:0]       key_iters;
  int                  checks = 0, failures = 0, cyc = 0;
  int                  n_first = 0, n_multi = 0, n_max = 0;

  ldpc_decoder #(.D(D), .Q(Q), .NB(NB), .MB(MB), .NE(NE), .DMAX(DMAX), .W(W), .FRAC(FRAC),
                 .MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    bit  u [], s [], xr [], okr;
    int  llr [], itr, t_load, t_key, kind;
    real g;
    for (int i = 0; i < D; i++) llr_in[i] = '0;
    gen_matrix(NB, MB, NE, Q);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int e = 0; e < NE; e++) begin
      @(negedge clk);
      mat_we = 1; mat_addr = EW'(e); mat_col = CW'(col[e]); mat_shift = SW'(sh[e]);
    end
    @(negedge clk) mat_we = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      kind = f % 3;
      u = new[NB * Q]; llr = new[NB * Q];
      foreach (u[i]) u[i] = bit'($urandom_range(1));
      syndrome(MB, Q, u, s);
      foreach (llr[i]) begin
        g = (u[i] ? -1.0 : 1.0);
        if (kind == 0) llr[i] = u[i] ? -40 : 40;
        else if (kind == 1) llr[i] = sat($rtoi(8.0 * (1.0 * g + 0.9 * gauss())));
        else llr[i] = int'($urandom_range(254)) - 127;
      end
      if (kind == 2) foreach (s[i]) s[i] = bit'($urandom_range(1));
      itr = ref_decode(NB, MB, Q, MAX_ITER, llr, s, xr, okr);
      for (int j = 0; j < MB; j++) begin
        @(negedge clk);
        syn_we = 1; syn_addr = RW'(j);
        for (int l = 0; l < Q; l++) syn_data[l] = s[j * Q + l];
      end
      @(negedge clk) syn_we = 0;
      for (int b = 0; b < NB * Q / D; b++) begin
        @(negedge clk);
        while (!llr_ready) @(negedge clk);
        llr_valid = 1;
        for (int i = 0; i < D; i++) llr_in[i] = W'(llr[b * D + i]);
      end
      t_load = cyc;   // sampled at the falling edge after the last beat: one clock before the count starts
      @(negedge clk) llr_valid = 0;
      // wait for the key; llr_ready must stay low meanwhile
      while (!key_valid) begin
        @(negedge clk);
        if (!key_valid) check(!llr_ready, "llr_ready high while decoding");
      end
      t_key = cyc;
      check(key_iters == IW'(itr), $sformatf("frame %0d iterations %0d expected %0d", f, key_iters, itr));
      check(key_ok == okr, $sformatf("frame %0d ok %0d expected %0d", f, key_ok, okr));
      check(t_key - t_load == int'(key_iters) * (3 * NE + 1) + 1,
            $sformatf("frame %0d decode took %0d clocks for %0d iterations", f, t_key - t_load, key_iters));
      for (int c = 0; c < NB; c++) begin
        check(key_valid && key_addr == CW'(c) && key_last == (c == NB - 1), "key stream framing");
        for (int l = 0; l < Q; l++)
          check(key_data[l] == xr[c * Q + l], $sformatf("frame %0d key bit %0d", f, c * Q + l));
        @(negedge clk);
      end
      check(!key_valid && llr_ready, "decoder back in load state");
      if (kind == 0) foreach (u[i]) check(xr[i] == u[i], "noiseless frame must return u");
      if (okr && itr == 1) n_first++;
      if (okr && itr > 1)  n_multi++;
      if (!okr && itr == MAX_ITER) n_max++;
    end
    $display("success after 1 iteration: %0d, after several: %0d, stopped at MAX_ITER: %0d", n_first, n_multi, n_max);
    check(n_first > 0, "no first-iteration success");
    check(n_multi > 0, "no multi-iteration success");
    check(n_max > 0, "MAX_ITER stop never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
