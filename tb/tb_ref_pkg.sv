// tb_ref_pkg: floating-point reference models used by the testbenches.
// They follow the algorithms in double precision, independently of the
// fixed-point RTL: band statistics, power iteration with Rayleigh quotient,
// Platt sigmoid, pairwise coupling and the K-pass neighbour search.
package tb_ref_pkg;
  import hsi_pkg::*;

  function automatic real fx2r(input fx_t v);
    return real'(v) / 4294967296.0;
  endfunction
  function automatic fx_t r2fx(input real v);
    return fx_t'(longint'(v * 4294967296.0));
  endfunction
  // uniform random integer in [-h, h]
  function automatic int srnd(input int h);
    int u;
    u = $urandom % (2 * h + 1);
    return u - h;
  endfunction
  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // dominant eigenpair of a symmetric n x n matrix a (row major, stride n)
  // by power iteration in double precision from x = 0.1, unit-normalised
  function automatic void power_ref(input real a[], input int n, input int iters,
                                    output real lambda, output real x[]);
    real v[], xv, xx, nv, lp;
    x = new[n]; v = new[n];
    foreach (x[k]) x[k] = 0.1;
    lambda = 0.0; lp = 0.0;
    for (int it = 0; it < iters; it++) begin
      for (int j = 0; j < n; j++) begin
        v[j] = 0.0;
        for (int k = 0; k < n; k++) v[j] += a[j*n+k] * x[k];
      end
      xv = 0.0; xx = 0.0; nv = 0.0;
      for (int j = 0; j < n; j++) begin xv += x[j]*v[j]; xx += x[j]*x[j]; nv += v[j]*v[j]; end
      lambda = xv / xx;
      nv = $sqrt(nv);
      for (int j = 0; j < n; j++) x[j] = v[j] / nv;
      if (it > 0 && absr(lambda - lp) < 1e-12) break;
      lp = lambda;
    end
  endfunction

  function automatic real sigmoid_ref(input real dec, input real a, input real b);
    real f;
    f = dec * a + b;
    if (f >= 0.0) return $exp(-f) / (1.0 + $exp(-f));
    return 1.0 / (1.0 + $exp(f));
  endfunction

  // pairwise coupling (iterative Q-matrix method), r is c x c row major
  function automatic void coupling_ref(input real r[], input int c, input real eps,
                                       input int max_iter, output real p[]);
    real q[], qp[], pqp, diff, me, e;
    q = new[c*c]; qp = new[c]; p = new[c];
    for (int t = 0; t < c; t++) begin
      p[t] = 1.0 / c;
      q[t*c+t] = 0.0;
      for (int j = 0; j < c; j++) if (j != t) begin
        q[t*c+t] += r[j*c+t] * r[j*c+t];
        q[t*c+j] = -r[j*c+t] * r[t*c+j];
      end
    end
    for (int it = 0; it < max_iter; it++) begin
      pqp = 0.0;
      for (int t = 0; t < c; t++) begin
        qp[t] = 0.0;
        for (int j = 0; j < c; j++) qp[t] += q[t*c+j] * p[j];
        pqp += p[t] * qp[t];
      end
      me = 0.0;
      for (int t = 0; t < c; t++) begin
        e = absr(qp[t] - pqp);
        if (e > me) me = e;
      end
      if (me < eps) break;
      for (int t = 0; t < c; t++) begin
        diff = (-qp[t] + pqp) / q[t*c+t];
        p[t] += diff;
        pqp = (pqp + diff * (diff * q[t*c+t] + 2.0 * qp[t])) / (1.0 + diff) / (1.0 + diff);
        for (int j = 0; j < c; j++) begin
          qp[j] = (qp[j] + diff * q[t*c+j]) / (1.0 + diff);
          p[j] /= (1.0 + diff);
        end
      end
    end
  endfunction

  // neighbour search of the document: K passes over the window, each taking
  // the next larger non-zero distance and all its ties in scan order
  function automatic void kpass_ref(input real d[], input int wlen, input int k,
                                    output int nb[], output int cnt);
    real last_min, mn;
    int  tie[$];
    nb = new[k]; cnt = 0; last_min = 0.0;
    while (cnt < k) begin
      mn = 1.0e300; tie.delete();
      for (int ii = 0; ii < wlen; ii++) begin
        if (d[ii] > last_min && d[ii] <= mn && d[ii] != 0.0) begin
          if (d[ii] == mn) tie.push_back(ii);
          else begin tie.delete(); tie.push_back(ii); mn = d[ii]; end
        end
      end
      if (tie.size() == 0) break;
      last_min = mn;
      foreach (tie[x]) if (cnt < k) begin nb[cnt] = tie[x]; cnt++; end
    end
  endfunction
endpackage
