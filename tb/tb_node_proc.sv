// tb_node_proc: runs random check rows (degree 2..12) through one node
// processor lane, pass A then pass B, and compares M, E and the updated LLR
// with a model of the layered update that evaluates Psi(x) = ln((e^x+1)/(e^x-1)) in
// real arithmetic: messages on an 8-bit grid with 3 fraction bits, Psi values
// and row sums with 7 fraction bits.
module tb_node_proc;
  localparam int W = 8, FRAC = 3, DMAX = 64;

  logic                clk = 0, rst_n = 0, clr = 0, a_en = 0, syn_bit = 0;
  logic signed [W-1:0] llr_in = 0, e_old = 0, m_in = 0, m_out, e_new, llr_new;
  int                  checks = 0, failures = 0;

  node_proc #(.W(W), .FRAC(FRAC), .DMAX(DMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real psi_real(real x);
    return $ln(($exp(x) + 1.0) / ($exp(x) - 1.0));
  endfunction

  // forward Psi: message magnitude (1/8 steps) -> Psi domain (1/128 steps)
  function automatic int psi_f(int k);
    real y;
    if (k <= 0) return 2047;
    y = psi_real(real'(k) / 8.0) * 128.0;
    return (y >= 2047.0) ? 2047 : $rtoi(y + 0.5);
  endfunction

  // reverse Psi: Psi domain (1/128 steps, clipped to 2047) -> magnitude (1/8
  // steps); a zero sum is evaluated at half a step
  function automatic int psi_r(int s);
    real y;
    if (s > 2047) s = 2047;
    y = psi_real((s <= 0 ? 0.5 : real'(s)) / 128.0) * 8.0;
    return (y >= 127.0) ? 127 : $rtoi(y + 0.5);
  endfunction

  function automatic int sat(int x);
    return x > 127 ? 127 : (x < -127 ? -127 : x);
  endfunction

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  initial begin
    int deg, m [16], l [16], eo [16], s, sum, neg, ee, ln;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int row = 0; row < 400; row++) begin
      deg = $urandom_range(12, 2);
      s = $urandom_range(1);
      sum = 0; neg = 0;
      for (int k = 0; k < deg; k++) begin
        l[k]  = int'($urandom_range(254)) - 127;
        eo[k] = (row % 3 == 0) ? 0 : int'($urandom_range(120)) - 60;
        if (row % 7 == 0) l[k] = l[k] / 16;          // small values: large Psi
        m[k] = sat(l[k] - eo[k]);
        sum += psi_f(iabs(m[k]));
        neg ^= (m[k] < 0);
      end
      // pass A
      for (int k = 0; k < deg; k++) begin
        @(negedge clk);
        a_en = 1; clr = (k == 0);
        llr_in = W'(l[k]); e_old = W'(eo[k]);
        #1;
        checks++;
        if (int'(m_out) != m[k]) begin failures++; $display("row %0d M %0d expected %0d", row, m_out, m[k]); end
      end
      // pass B
      for (int k = 0; k < deg; k++) begin
        @(negedge clk);
        a_en = 0; clr = 0; m_in = W'(m[k]); syn_bit = s[0];
        llr_in = W'($urandom); e_old = W'($urandom);   // must be ignored in pass B
        ee = psi_r(sum - psi_f(iabs(m[k])));
        if ((neg ^ (m[k] < 0) ^ s) != 0) ee = -ee;
        ln = sat(m[k] + ee);
        #1;
        checks += 2;
        if (int'(e_new) != ee) begin failures++; $display("row %0d E %0d expected %0d", row, e_new, ee); end
        if (int'(llr_new) != ln) begin failures++; $display("row %0d LLR %0d expected %0d", row, llr_new, ln); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
