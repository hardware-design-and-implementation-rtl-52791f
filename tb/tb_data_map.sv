// tb_data_map: checks v = M'(alpha) x' against a real-valued model built from
// the eight-dimensional sign matrix A'_8, written out here as +/-1 numbers.
// Two kinds of vectors are used:
//   * the receiver's view: alpha_k = <A_k y', u'> for a random unit vector y'
//     and random bits u; feeding x' = y' must give back v = u' = (+/-1/sqrt 8);
//   * random x' and alpha compared with the explicit product.
// Also checks the four-clock latency.
module tb_data_map;
  import tb_fp_pkg::*;
  localparam int D = 8;
  localparam int N = 200;
  localparam int S8 [8][8] = '{
    '{1,-1,-1,-1,-1,-1,-1,-1}, '{1, 1, 1,-1, 1,-1,-1, 1},
    '{1,-1, 1, 1, 1, 1,-1,-1}, '{1, 1,-1, 1, 1,-1, 1,-1},
    '{1,-1,-1,-1, 1, 1, 1, 1}, '{1, 1,-1, 1,-1, 1,-1, 1},
    '{1, 1, 1,-1,-1, 1, 1,-1}, '{1,-1, 1, 1,-1,-1, 1, 1}};

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] in_x [D], in_alpha [D], out_v [D];
  real         ref_v [N][D];
  int          checks = 0, failures = 0, n_in = 0, n_out = 0, cyc = 0;
  int          t_in [N];

  data_map #(.D(D)) dut (.clk, .rst_n, .ce(1'b1), .in_valid, .in_x, .in_alpha, .out_valid, .out_v);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // k-th family matrix applied to y: (A_k y)_r = S8[r][r^k] * y[r^k]
  function automatic real ak_y(int k, int r, real y[D]);
    return real'(S8[r][r ^ k]) * y[r ^ k];
  endfunction

  initial begin
    real y [D], a [D], u [D], nrm;
    for (int i = 0; i < D; i++) begin in_x[i] = '0; in_alpha[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (n_in < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      if (in_valid) begin
        nrm = 0.0;
        for (int i = 0; i < D; i++) begin y[i] = gauss(); nrm += y[i] * y[i]; end
        for (int i = 0; i < D; i++) y[i] = y[i] / $sqrt(nrm);
        if (n_in % 2 == 0) begin
          for (int i = 0; i < D; i++) u[i] = ($urandom_range(1) == 1 ? -1.0 : 1.0) / $sqrt(8.0);
          for (int k = 0; k < D; k++) begin
            a[k] = 0.0;
            for (int r = 0; r < D; r++) a[k] += ak_y(k, r, y) * u[r];
          end
        end else begin
          for (int k = 0; k < D; k++) a[k] = gauss();
        end
        for (int i = 0; i < D; i++) begin
          in_x[i] = r2f(y[i]);     y[i] = f2r(in_x[i]);
          in_alpha[i] = r2f(a[i]); a[i] = f2r(in_alpha[i]);
        end
        for (int r = 0; r < D; r++) begin
          ref_v[n_in][r] = 0.0;
          for (int c = 0; c < D; c++) ref_v[n_in][r] += real'(S8[r][c]) * a[r ^ c] * y[c];
          if (n_in % 2 == 0 && !close(ref_v[n_in][r], u[r], 1e-5, 1e-6))
            $display("reference model inconsistent at vector %0d", n_in);
        end
        t_in[n_in] = cyc;
        n_in++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("got %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int r = 0; r < D; r++) begin
      checks++;
      if (!close(f2r(out_v[r]), ref_v[n_out][r], 1e-4, 1e-5)) begin
        failures++; $display("vec %0d v[%0d] %f expected %f", n_out, r, f2r(out_v[r]), ref_v[n_out][r]);
      end
    end
    checks++;
    if (cyc - t_in[n_out] != 4) begin failures++; $display("latency %0d", cyc - t_in[n_out]); end
    n_out++;
  end
endmodule
