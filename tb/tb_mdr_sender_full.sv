// tb_mdr_sender_full: the sender at its default sizes (160,000-bit frames,
// expansion factor 16, 9,000 x 10,000 base matrix with 33,375 nonzeros),
// two frames of 20,000 vectors each. The random base matrix and the frames
// come from the same receiver model as tb_mdr_sender. Checks: every LLR of
// the front end against the real-valued model, key_ok with H * key = S,
// the low-noise frame returns u on every bit
// of a base column that some check touches, and the input stalls between frames.
module tb_mdr_sender_full;
  import tb_fp_pkg::*;
  import tb_code_pkg::*;
  // the sender's default sizes (the instance below sets no parameters)
  localparam int D = 8, Q = 16, NB = 10000, MB = 9000, NE = 33375, MAX_ITER = 100;
  localparam int CW = $clog2(NB), SW = $clog2(Q), EW = $clog2(NE + 1), RW = $clog2(MB), IW = $clog2(MAX_ITER + 1);
  localparam int FV = NB * Q / D;
  localparam int NF = 2;
  // combined sign matrix A'_8 of the eight-dimensional rotation family
  localparam int S8 [8][8] = '{
    '{1,-1,-1,-1,-1,-1,-1,-1}, '{1, 1, 1,-1, 1,-1,-1, 1},
    '{1,-1, 1, 1, 1, 1,-1,-1}, '{1, 1,-1, 1, 1,-1, 1,-1},
    '{1,-1,-1,-1, 1, 1, 1, 1}, '{1, 1,-1, 1,-1, 1,-1, 1},
    '{1, 1, 1,-1,-1, 1, 1,-1}, '{1,-1, 1, 1,-1,-1, 1, 1}};
  localparam real SIGMA [NF] = '{0.3, 0.9};

  logic          clk = 0, rst_n = 0;
  logic [31:0]   llr_scale;
  logic          in_valid = 0, in_ready;
  logic [31:0]   in_x [D], in_alpha [D], in_ynorm;
  logic          mat_we = 0, syn_we = 0;
  logic [EW-1:0] mat_addr = '0;
  logic [CW-1:0] mat_col = '0;
  logic [SW-1:0] mat_shift = '0;
  logic [RW-1:0] syn_addr = '0;
  logic [Q-1:0]  syn_data = '0;
  logic          key_valid, key_last, key_ok;
  logic [CW-1:0] key_addr;
  logic [Q-1:0]  key_data;
  logic [IW-1:0] key_iters;

  mdr_sender dut (.*);

  int  checks = 0, failures = 0;
  int  n_stall = 0, n_first = 0, n_multi = 0, n_max = 0;
  bit  u_all [NF][];
  bit  s_all [NF][];
  real llr_ref [NF * FV][D];
  int  n_llr = 0, frame_out = 0;
  bit          covered [NB];
  logic [31:0] vx [NF * FV][D], va [NF * FV][D], vy [NF * FV];

  always #5 clk = ~clk;

  initial begin
    repeat (15000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // receiver model: builds all frames up front
  task automatic make_frames();
    for (int f = 0; f < NF; f++) begin
      u_all[f] = new[NB * Q];
      for (int n = 0; n < FV; n++) begin
        real x [D], y [D], yp [D], xp [D], up [D], a [D], v [D], nx, ny;
        int  idx;
        idx = f * FV + n;
        nx = 0.0; ny = 0.0;
        for (int i = 0; i < D; i++) begin
          x[i] = gauss();
          vx[idx][i] = r2f(x[i]); x[i] = f2r(vx[idx][i]);
          y[i] = x[i] + SIGMA[f] * gauss();
          nx += x[i] * x[i]; ny += y[i] * y[i];
        end
        nx = $sqrt(nx); ny = $sqrt(ny);
        vy[idx] = r2f(ny);
        for (int i = 0; i < D; i++) begin
          yp[i] = y[i] / ny; xp[i] = x[i] / nx;
          u_all[f][n * D + i] = bit'($urandom_range(1));
          up[i] = (u_all[f][n * D + i] ? -1.0 : 1.0) / $sqrt(8.0);
        end
        for (int k = 0; k < D; k++) begin
          a[k] = 0.0;
          for (int r = 0; r < D; r++) a[k] += real'(S8[r][r ^ k]) * yp[r ^ k] * up[r];
          va[idx][k] = r2f(a[k]);
        end
        for (int r = 0; r < D; r++) begin
          v[r] = 0.0;
          for (int c = 0; c < D; c++) v[r] += real'(S8[r][c]) * f2r(va[idx][r ^ c]) * xp[c];
          llr_ref[idx][r] = 2.0 * nx * f2r(vy[idx]) * v[r] / ($sqrt(8.0) * SIGMA[f] * SIGMA[f]) * 8.0;
        end
      end
      begin
        bit ut [], st [];
        ut = u_all[f];
        syndrome(MB, Q, ut, st);
        s_all[f] = st;
      end
    end
  endtask

  // LLRs leaving the front end
  always @(posedge clk) if (rst_n && dut.l_valid) begin
    for (int i = 0; i < D; i++) begin
      real r; int e;
      r = llr_ref[n_llr][i];
      e = (r >= 127.0) ? 127 : (r <= -127.0) ? -127 : $rtoi(r);
      checks++;
      if (int'(dut.l_llr[i]) - e > 1 || int'(dut.l_llr[i]) - e < -1) begin
        failures++; $display("LLR %0d.%0d = %0d, expected %0d", n_llr, i, dut.l_llr[i], e);
      end
    end
    n_llr++;
  end

  always @(posedge clk) if (in_valid && !in_ready && rst_n) n_stall++;

  // key collection; the frames are judged once all have been decoded
  bit          key_store [NF][NB * Q];
  logic        ok_store [NF];
  logic [IW-1:0] it_store [NF];

  always @(posedge clk) if (rst_n && key_valid) begin
    for (int l = 0; l < Q; l++) key_store[frame_out][int'(key_addr) * Q + l] = key_data[l];
    if (key_last) begin
      ok_store[frame_out]  = key_ok;
      it_store[frame_out]  = key_iters;
      frame_out++;
    end
  end

  task automatic judge_frames();
    for (int f = 0; f < NF; f++) begin
      bit hs [], kt [];
      kt = new[NB * Q];
      foreach (kt[i]) kt[i] = key_store[f][i];
      syndrome(MB, Q, kt, hs);
      if (ok_store[f]) check(hs == s_all[f], $sformatf("frame %0d: key_ok but H*key != S", f));
      else begin
        check(hs != s_all[f], $sformatf("frame %0d: H*key == S but key_ok low", f));
        check(it_store[f] == IW'(MAX_ITER), $sformatf("frame %0d: failed after %0d iterations", f, it_store[f]));
      end
      if (SIGMA[f] < 0.5) begin
        check(ok_store[f] == 1'b1, $sformatf("frame %0d: low-noise frame not decoded", f));
        // bits of base columns that no check touches cannot be corrected
        begin
          int nd;
          nd = 0;
          foreach (kt[i]) if (covered[i / Q] && kt[i] != u_all[f][i]) nd++;
          check(nd == 0, $sformatf("frame %0d: %0d covered key bits differ from u", f, nd));
        end
      end
      $display("frame %0d sigma %.2f: ok=%0d iterations=%0d", f, SIGMA[f], ok_store[f], it_store[f]);
      if (ok_store[f] && it_store[f] == 1) n_first++;
      if (ok_store[f] && it_store[f] > 1)  n_multi++;
      if (!ok_store[f] && it_store[f] == IW'(MAX_ITER)) n_max++;
    end
  endtask

  initial begin
    int n;
    for (int i = 0; i < D; i++) begin in_x[i] = '0; in_alpha[i] = '0; end
    in_ynorm = '0;
    llr_scale = '0;
    gen_matrix(NB, MB, NE, Q);
    foreach (col[e]) covered[col[e]] = 1'b1;
    begin
      int nu;
      nu = 0;
      foreach (covered[c]) if (!covered[c]) nu++;
      $display("%0d of %0d base columns are in no check", nu, NB);
    end
    make_frames();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int e = 0; e < NE; e++) begin
      @(negedge clk);
      mat_we = 1; mat_addr = EW'(e); mat_col = CW'(col[e]); mat_shift = SW'(sh[e]);
    end
    @(negedge clk) mat_we = 0;
    n = 0;
    for (int f = 0; f < NF; f++) begin
      int k0;
      k0 = 0;
      if (f > 0) begin
        // the frame's first vector has been offered since the previous frame
        // ended; it is taken once that frame's key is out
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        n++;
        in_valid = 0;
        k0 = 1;
      end
      // the syndrome memory is free again: load this frame's syndrome
      for (int j = 0; j < MB; j++) begin
        @(negedge clk);
        syn_we = 1; syn_addr = RW'(j);
        for (int l = 0; l < Q; l++) syn_data[l] = s_all[f][j * Q + l];
      end
      @(negedge clk) syn_we = 0;
      if (f == 0) llr_scale = r2f(2.0 / ($sqrt(8.0) * SIGMA[0] * SIGMA[0]));
      for (int k = k0; k < FV; k++) begin
        in_valid = 1;
        in_x = vx[n]; in_alpha = va[n]; in_ynorm = vy[n];
        // in_ready only changes after a rising edge: sample it in the low phase
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        n++;
      end
      // keep offering the next frame's first vector: the sender must hold it off
      if (f + 1 < NF) begin
        in_x = vx[n]; in_alpha = va[n]; in_ynorm = vy[n];
        // the channel constant changes once this frame has left the front end
        repeat (20) @(negedge clk);
        llr_scale = r2f(2.0 / ($sqrt(8.0) * SIGMA[f+1] * SIGMA[f+1]));
      end else begin
        in_valid = 0;
      end
    end
    while (frame_out < NF) @(negedge clk);
    in_valid = 0;
    judge_frames();
    check(n_llr == NF * FV, $sformatf("%0d LLR vectors seen", n_llr));
    $display("stall clocks %0d, first-iteration successes %0d, multi-iteration successes %0d, MAX_ITER stops %0d",
             n_stall, n_first, n_multi, n_max);
    check(n_stall > 0, "input never stalled");
    check(n_first + n_multi > 0, "no frame decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
