// tb_llr_init: random v, |X|, |Y| and channel scale; the fixed-point LLR must
// equal trunc(scale*|X|*|Y|*v * 2^FRAC) saturated to +/-127 (within one LSB,
// since the fp32 products are truncated), and arrive three clocks after the
// input. Large values check the saturation in both directions.
module tb_llr_init;
  import tb_fp_pkg::*;
  localparam int D = 8, W = 8, FRAC = 3;
  localparam int N = 300;

  logic                clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0]         in_v [D], xn, yn, scale;
  logic signed [W-1:0] out_llr [D];
  int                  ref_l [N][D];
  int                  checks = 0, failures = 0, n_in = 0, n_out = 0, cyc = 0, nsat = 0;
  int                  t_in [N];

  llr_init #(.D(D), .W(W), .FRAC(FRAC)) dut (.clk, .rst_n, .ce(1'b1), .scale, .in_valid, .in_v,
    .in_xnorm(xn), .in_ynorm(yn), .out_valid, .out_llr);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s, x, y, v, p;
    for (int i = 0; i < D; i++) in_v[i] = '0;
    xn = '0; yn = '0; scale = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (n_in < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      if (in_valid) begin
        s = 0.05 + real'($urandom_range(1000)) / 1000.0;
        x = 0.5 + real'($urandom_range(4000)) / 1000.0;
        y = 0.5 + real'($urandom_range(4000)) / 1000.0;
        if (n_in % 10 == 0) s = s * 30.0;
        scale = r2f(s); xn = r2f(x); yn = r2f(y);
        s = f2r(scale); x = f2r(xn); y = f2r(yn);
        for (int i = 0; i < D; i++) begin
          v = gauss() / $sqrt(8.0);
          in_v[i] = r2f(v);
          v = f2r(in_v[i]);
          p = s * x * y * v * 8.0;
          if (p >= 127.0) ref_l[n_in][i] = 127;
          else if (p <= -127.0) ref_l[n_in][i] = -127;
          else ref_l[n_in][i] = $rtoi(p);
        end
        t_in[n_in] = cyc;
        n_in++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("got %0d outputs", n_out); end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 0; i < D; i++) begin
      int d;
      d = int'(out_llr[i]) - ref_l[n_out][i];
      if (ref_l[n_out][i] == 127 || ref_l[n_out][i] == -127) nsat++;
      checks++;
      if (d > 1 || d < -1) begin
        failures++; $display("vec %0d lane %0d llr %0d expected %0d", n_out, i, out_llr[i], ref_l[n_out][i]);
      end
    end
    checks++;
    if (cyc - t_in[n_out] != 3) begin failures++; $display("latency %0d", cyc - t_in[n_out]); end
    n_out++;
  end
endmodule
