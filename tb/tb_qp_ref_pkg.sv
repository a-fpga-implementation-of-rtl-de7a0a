// tb_qp_ref_pkg: double precision reference for the testbenches of the QP
// solver. It solves  min 1/2 z'Qz + c'z  s.t.  Jz <= g  with Hildreth's
// dual coordinate-descent method, an algorithm unrelated to the interior
// point method of the hardware:
//   P = J inv(Q) J',  d = g + J inv(Q) c,
//   repeat: lambda_i = max(0, lambda_i - (d_i + (P lambda)_i) / P_ii),
//   z = -inv(Q) (c + J' lambda).
// Sizes are bounded by RN and RM.
//
// The document checks its hardware against a software QP solver; the choice
// of Hildreth's method as the reference is this design's own.
package tb_qp_ref_pkg;

  localparam int RN = 8;
  localparam int RM = 96;

  typedef real mat_n_t [RN][RN];
  typedef real mat_j_t [RM][RN];
  typedef real vec_n_t [RN];
  typedef real vec_m_t [RM];

  // In-place Gauss-Jordan inverse with partial pivoting on rows (small n).
  function automatic mat_n_t inv_n(mat_n_t a, int n);
    mat_n_t x;
    real    f, piv;
    int     p;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) x[r][c] = (r == c) ? 1.0 : 0.0;
    for (int k = 0; k < n; k++) begin
      p = k;
      for (int r = k + 1; r < n; r++)
        if ((a[r][k] < 0 ? -a[r][k] : a[r][k]) > (a[p][k] < 0 ? -a[p][k] : a[p][k])) p = r;
      for (int c = 0; c < n; c++) begin
        f = a[k][c]; a[k][c] = a[p][c]; a[p][c] = f;
        f = x[k][c]; x[k][c] = x[p][c]; x[p][c] = f;
      end
      piv = a[k][k];
      for (int c = 0; c < n; c++) begin
        a[k][c] /= piv;
        x[k][c] /= piv;
      end
      for (int r = 0; r < n; r++)
        if (r != k) begin
          f = a[r][k];
          for (int c = 0; c < n; c++) begin
            a[r][c] -= f * a[k][c];
            x[r][c] -= f * x[k][c];
          end
        end
    end
    return x;
  endfunction

  function automatic vec_n_t qp_solve(mat_n_t q, vec_n_t c, mat_j_t jm, vec_m_t g,
                                      int n, int m);
    mat_n_t qi;
    real    p [RM][RM];
    vec_m_t d, lam;
    real    qij [RM][RN];   // J inv(Q)
    vec_n_t z;
    real    s, nl, chg;
    qi = inv_n(q, n);
    for (int i = 0; i < m; i++)
      for (int b = 0; b < n; b++) begin
        s = 0.0;
        for (int a = 0; a < n; a++) s += jm[i][a] * qi[a][b];
        qij[i][b] = s;
      end
    for (int i = 0; i < m; i++) begin
      for (int r = 0; r < m; r++) begin
        s = 0.0;
        for (int a = 0; a < n; a++) s += qij[i][a] * jm[r][a];
        p[i][r] = s;
      end
      s = g[i];
      for (int a = 0; a < n; a++) s += qij[i][a] * c[a];
      d[i] = s;
      lam[i] = 0.0;
    end
    for (int sweep = 0; sweep < 20000; sweep++) begin
      chg = 0.0;
      for (int i = 0; i < m; i++) begin
        s = d[i];
        for (int r = 0; r < m; r++) s += p[i][r] * lam[r];
        nl = lam[i] - s / p[i][i];
        if (nl < 0.0) nl = 0.0;
        chg += (nl > lam[i]) ? nl - lam[i] : lam[i] - nl;
        lam[i] = nl;
      end
      if (chg < 1e-13) break;
    end
    for (int a = 0; a < n; a++) begin
      s = c[a];
      for (int i = 0; i < m; i++) s += jm[i][a] * lam[i];
      z[a] = s;
    end
    for (int a = 0; a < n; a++) begin
      s = 0.0;
      for (int b = 0; b < n; b++) s -= qi[a][b] * z[b];
      lam[a] = s;
    end
    for (int a = 0; a < n; a++) z[a] = lam[a];
    return z;
  endfunction

endpackage
