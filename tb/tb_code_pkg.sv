// tb_code_pkg: test-side model of the quasi-cyclic code used by the decoder
// testbenches.
//   gen_matrix   random base matrix with exactly ne nonzeros in mb rows, each
//                row's columns increasing, the first column of each row below
//                the last column of the row before (the storage rule of the
//                decoder's matrix memory), random circulant shifts.
//   syndrome     S = H u for the expanded matrix: base entry (j, c, s) joins
//                check j*q+l to bit c*q + ((l+s) mod q).
//   ref_decode   layered sum-product decoding on integers with the same
//                8-bit / 3-fraction-bit quantization, Psi evaluated with real
//                math into the same two tables (forward to 1/128 steps,
//                reverse to 1/8 steps); returns the iteration count and the hard decisions.
package tb_code_pkg;

  int col [];
  int sh  [];
  int rstart [];   // first entry of each base row
  int rdeg [];     // degree of each base row

  function automatic void gen_matrix(int nb, int mb, int ne, int q);
    int e, prev_last, deg, c0;
    bit ok;
    int cs [$];
    col = new[ne]; sh = new[ne]; rstart = new[mb]; rdeg = new[mb];
    e = 0; prev_last = -1;
    for (int j = 0; j < mb; j++) begin
      deg = (ne - e) / (mb - j);
      if ((ne - e) % (mb - j) != 0 && $urandom_range(1) == 1) deg++;
      if (j == mb - 1) deg = ne - e;
      do begin
        cs.delete();
        c0 = (prev_last < 0) ? int'($urandom_range(nb - deg)) : int'($urandom_range(prev_last - 1));
        cs.push_back(c0);
        ok = (nb - 1 - c0 >= deg - 1);
        while (ok && cs.size() < deg) begin
          int c;
          bit dup;
          c = c0 + 1 + int'($urandom_range(nb - 2 - c0));
          dup = 0;
          foreach (cs[i]) if (cs[i] == c) dup = 1;
          if (!dup) cs.push_back(c);
        end
      end while (!ok);
      cs.sort();
      rstart[j] = e; rdeg[j] = deg;
      foreach (cs[i]) begin
        col[e] = cs[i];
        sh[e]  = int'($urandom_range(q - 1));
        e++;
      end
      prev_last = cs[deg - 1];
    end
  endfunction

  function automatic int bitidx(int e, int l, int q);
    return col[e] * q + ((l + sh[e]) % q);
  endfunction

  function automatic void syndrome(int mb, int q, const ref bit u [], ref bit s []);
    s = new[mb * q];
    for (int j = 0; j < mb; j++)
      for (int l = 0; l < q; l++) begin
        bit p;
        p = 0;
        for (int k = 0; k < rdeg[j]; k++) p ^= u[bitidx(rstart[j] + k, l, q)];
        s[j * q + l] = p;
      end
  endfunction

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

  // returns iterations used; ok = syndrome matched; x = hard decisions
  function automatic int ref_decode(int nb, int mb, int q, int max_iter,
                                    const ref int llr0 [], const ref bit s [],
                                    ref bit x [], output bit ok);
    int L [], E [], M [64], ne, it;
    bit hs [];
    int pf [128], pr [2048];
    for (int k = 0; k < 128; k++)  pf[k] = psi_f(k);
    for (int k = 0; k < 2048; k++) pr[k] = psi_r(k);
    ne = rstart[mb - 1] + rdeg[mb - 1];
    L = new[nb * q]; E = new[ne * q]; x = new[nb * q];
    foreach (L[i]) L[i] = llr0[i];
    foreach (E[i]) E[i] = 0;
    it = 0;
    do begin
      for (int j = 0; j < mb; j++)
        for (int l = 0; l < q; l++) begin
          int sum, a, v, ee;
          bit neg;
          sum = 0; neg = 0;
          for (int k = 0; k < rdeg[j]; k++) begin
            v = bitidx(rstart[j] + k, l, q);
            M[k] = sat(L[v] - E[(rstart[j] + k) * q + l]);
            a = M[k] < 0 ? -M[k] : M[k];
            sum += pf[a]; neg ^= (M[k] < 0);
          end
          for (int k = 0; k < rdeg[j]; k++) begin
            v = bitidx(rstart[j] + k, l, q);
            a = M[k] < 0 ? -M[k] : M[k];
            a = sum - pf[a];
            ee = pr[a > 2047 ? 2047 : a];
            if ((neg ^ (M[k] < 0) ^ s[j * q + l]) != 0) ee = -ee;
            E[(rstart[j] + k) * q + l] = ee;
            L[v] = sat(M[k] + ee);
          end
        end
      it++;
      foreach (x[i]) x[i] = (L[i] < 0);
      syndrome(mb, q, x, hs);
      ok = (hs == s);
    end while (!ok && it < max_iter);
    return it;
  endfunction

endpackage
