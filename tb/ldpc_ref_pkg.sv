// ldpc_ref_pkg -- reference model of 4-bit min-sum decoding for the
// testbenches, written independently of the RTL: its own copy of H, plain
// integer arithmetic, brute-force minimum over the other edges.
//
// Arithmetic conventions checked against the RTL: every variable node sum
// is clamped to [-8, 7]; a check node takes |-8| as 7; the parity of a
// check is the XOR of the signs of the L messages it receives; a decode
// stops after the iteration whose L messages satisfy all checks, or after
// max_it iterations (0 counts as 1).
package ldpc_ref_pkg;

  localparam int NV = 10;
  localparam int NC = 5;

  localparam bit HM [5][10] = '{
    '{1,1,1,1,0,1,1,0,0,0},
    '{0,0,1,1,1,1,1,1,0,0},
    '{0,1,0,1,0,1,0,1,1,1},
    '{1,0,1,0,1,0,0,1,1,1},
    '{1,1,0,0,1,0,1,0,1,1}
  };

  typedef int rmat_t [NC][NV];
  typedef int vvec_t [NV];

  function automatic int clamp(int x);
    if (x > 7)  return 7;
    if (x < -8) return -8;
    return x;
  endfunction

  function automatic int mag(int x);
    int a;
    a = (x < 0) ? -x : x;
    return (a > 7) ? 7 : a;
  endfunction

  // Variable node pass: L messages (per (c,v)) and totals from R.
  function automatic void vn_pass(input vvec_t llr, input rmat_t r,
                                  output rmat_t l, output vvec_t tot);
    for (int v = 0; v < NV; v++) begin
      int s;
      s = llr[v];
      for (int c = 0; c < NC; c++) if (HM[c][v]) s += r[c][v];
      tot[v] = clamp(s);
      for (int c = 0; c < NC; c++) l[c][v] = HM[c][v] ? clamp(s - r[c][v]) : 0;
    end
  endfunction

  // Check node pass: new R from L; returns 1 if every check is satisfied.
  function automatic bit cn_pass(input rmat_t l, output rmat_t r, output bit ok [NC]);
    bit all_ok;
    all_ok = 1;
    for (int c = 0; c < NC; c++) begin
      int neg;
      neg = 0;
      for (int v = 0; v < NV; v++) if (HM[c][v] && l[c][v] < 0) neg++;
      ok[c] = (neg % 2 == 0);
      if (!ok[c]) all_ok = 0;
      for (int v = 0; v < NV; v++) begin
        r[c][v] = 0;
        if (HM[c][v]) begin
          int m, sn;
          m = 7;
          sn = 0;
          for (int u = 0; u < NV; u++)
            if (HM[c][u] && u != v) begin
              if (mag(l[c][u]) < m) m = mag(l[c][u]);
              if (l[c][u] < 0) sn ^= 1;
            end
          r[c][v] = (sn != 0) ? -m : m;
        end
      end
    end
    return all_ok;
  endfunction

  // Whole decode.
  function automatic void decode(input vvec_t llr, input int max_it,
                                 output vvec_t out, output int iters, output bit ok);
    rmat_t r, l, rn;
    vvec_t tot;
    bit    cok [NC];
    int    lim;
    lim = (max_it < 1) ? 1 : max_it;
    for (int c = 0; c < NC; c++) for (int v = 0; v < NV; v++) r[c][v] = 0;
    iters = 0;
    ok = 0;
    forever begin
      iters++;
      vn_pass(llr, r, l, tot);
      ok = cn_pass(l, rn, cok);
      out = tot;
      if (ok || iters >= lim) break;
      r = rn;
    end
  endfunction

endpackage
