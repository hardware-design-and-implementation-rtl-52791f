// tb_rk_norm: drives random 8-element fp32 vectors, one per clock, into
// rk_norm and compares x' = X/|X| and |X| with a real-valued reference. Also
// checks the six-clock latency and that a gap in in_valid is preserved.
module tb_rk_norm;
  import tb_fp_pkg::*;
  localparam int D = 8;
  localparam int N = 200;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] in_x [D], out_x [D], out_norm;
  real         ref_x [N][D];
  int          checks = 0, failures = 0, n_in = 0, n_out = 0, cyc = 0;
  int          t_in [N];

  rk_norm #(.D(D)) dut (.clk, .rst_n, .ce(1'b1), .in_valid, .in_x, .out_valid, .out_x, .out_norm);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) in_x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (n_in < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      if (in_valid) begin
        for (int i = 0; i < D; i++) begin
          ref_x[n_in][i] = gauss() * $pow(2.0, real'(int'($urandom_range(6)) - 3));
          in_x[i] = r2f(ref_x[n_in][i]);
          ref_x[n_in][i] = f2r(in_x[i]);
        end
        t_in[n_in] = cyc;
        n_in++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("got %0d outputs, expected %0d", n_out, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real nrm;
    nrm = 0.0;
    for (int i = 0; i < D; i++) nrm += ref_x[n_out][i] * ref_x[n_out][i];
    nrm = $sqrt(nrm);
    checks++;
    if (!close(f2r(out_norm), nrm, 1e-5, 0.0)) begin
      failures++; $display("vec %0d norm %f expected %f", n_out, f2r(out_norm), nrm);
    end
    for (int i = 0; i < D; i++) begin
      checks++;
      if (!close(f2r(out_x[i]), ref_x[n_out][i] / nrm, 1e-5, 1e-9)) begin
        failures++; $display("vec %0d x'[%0d] %f expected %f", n_out, i, f2r(out_x[i]), ref_x[n_out][i] / nrm);
      end
    end
    checks++;
    if (cyc - t_in[n_out] != 6) begin
      failures++; $display("vec %0d latency %0d", n_out, cyc - t_in[n_out]);
    end
    n_out++;
  end
endmodule
