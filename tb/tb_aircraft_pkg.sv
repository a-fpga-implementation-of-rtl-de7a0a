// tb_aircraft_pkg: host-side model of the aircraft controller used to test
// the accelerator end to end (double precision, testbench only).
//
// Plant: the linearised Cessna Citation 500 longitudinal model, continuous
// time, state (attack angle, pitch angle, pitch rate, altitude), input the
// elevator angle (rad), outputs pitch angle (rad), altitude (m) and altitude
// rate (m/s):
//   A = [-1.2822 0 0.98 0; 0 0 1 0; -5.4293 0 -1.8366 0; -128.2 128.2 0 0]
//   B = [-0.3; 0; -17; 0]
//   C = [0 1 0 0; 0 0 0 1; -128.2 128.2 0 0]
// discretised with a 0.5 s sample (matrix exponential by scaling and
// squaring of the augmented [A B; 0 0] matrix).
//
// Controller: prediction horizon Np = 10, control horizon Nu = 3, the
// decision variable z = (du(k), du(k+1), du(k+2)), cost
// sum ||y - w||^2 + sum ||du||^2, so Q = 2 (Psi_u' Psi_u + I) and
// c = 2 Psi_u' (free response - w). Constraints over the 10 prediction
// steps: |u| <= 0.262, |du| <= 0.524, |pitch| <= 0.349 (60 rows), and with
// the altitude-rate limit |rate| <= 30 another 20 rows (80).
// The QP is rescaled as Q~ = aQ, c~ = ac, J~ = bJ, g~ = bg, with the
// scalars chosen so that the largest magnitude is 1; the solution z does
// not change.
//
// The plant, sample time, horizons, limits and the scaling of Q, c, J, g by
// two scalars follow the document; the identity cost weights, the output
// set points and the incremental (du) model are this design's assumptions.
package tb_aircraft_pkg;
  import tb_qp_ref_pkg::*;

  localparam int NP = 10;
  localparam int NU = 3;

  real ad [4][4];
  real bd [4];
  real cm [3][4] = '{'{0.0, 1.0, 0.0, 0.0}, '{0.0, 0.0, 0.0, 1.0}, '{-128.2, 128.2, 0.0, 0.0}};

  function automatic void init_model();
    real a5 [5][5];
    real e  [5][5];
    real tm [5][5];
    real nx [5][5];
    real ac [4][4] = '{'{-1.2822, 0.0, 0.98, 0.0}, '{0.0, 0.0, 1.0, 0.0},
                       '{-5.4293, 0.0, -1.8366, 0.0}, '{-128.2, 128.2, 0.0, 0.0}};
    real bc [4] = '{-0.3, 0.0, -17.0, 0.0};
    real s;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) a5[r][c] = 0.0;
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) a5[r][c] = ac[r][c] * 0.5 / 1024.0;
      a5[r][4] = bc[r] * 0.5 / 1024.0;
    end
    // Taylor series of exp(a5)
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        e[r][c]  = (r == c) ? 1.0 : 0.0;
        tm[r][c] = (r == c) ? 1.0 : 0.0;
      end
    for (int k = 1; k <= 14; k++) begin
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          s = 0.0;
          for (int q = 0; q < 5; q++) s += tm[r][q] * a5[q][c];
          nx[r][c] = s / k;
        end
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          tm[r][c] = nx[r][c];
          e[r][c] += nx[r][c];
        end
    end
    // square 10 times
    for (int k = 0; k < 10; k++) begin
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          s = 0.0;
          for (int q = 0; q < 5; q++) s += e[r][q] * e[q][c];
          nx[r][c] = s;
        end
      e = nx;
    end
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) ad[r][c] = e[r][c];
      bd[r] = e[r][4];
    end
  endfunction

  function automatic real y_of(real x [4], int o);
    real s = 0.0;
    for (int c = 0; c < 4; c++) s += cm[o][c] * x[c];
    return s;
  endfunction

  // One plant step with elevator u and an altitude-rate disturbance dw (m/s).
  function automatic void plant_step(ref real x [4], input real u, input real dw);
    real nxv [4];
    for (int r = 0; r < 4; r++) begin
      nxv[r] = bd[r] * u;
      for (int c = 0; c < 4; c++) nxv[r] += ad[r][c] * x[c];
    end
    nxv[3] += dw * 0.5;
    x = nxv;
  endfunction

  // Builds the scaled QP for state x, previous input up and altitude set
  // point ralt. Returns the number of constraints.
  function automatic int build_qp(input real x [4], input real up, input real ralt,
                                  input bit rate_con,
                                  output mat_n_t q, output vec_n_t c,
                                  output mat_j_t jm, output vec_m_t g);
    real xi [5];
    real at [5][5];
    real ap [5][5];
    real nx [5][5];
    real fr [NP+1][3];    // free response y(k+j)
    real gi [NP+1][3];    // step response coefficients C~ A~^(j-1) B~
    real psi [NP][3][NU];
    real w [3];
    real s, amax, bmax;
    int  m;
    for (int r = 0; r < 4; r++) xi[r] = x[r];
    xi[4] = up;
    for (int r = 0; r < 5; r++)
      for (int cc = 0; cc < 5; cc++) at[r][cc] = 0.0;
    for (int r = 0; r < 4; r++) begin
      for (int cc = 0; cc < 4; cc++) at[r][cc] = ad[r][cc];
      at[r][4] = bd[r];
    end
    at[4][4] = 1.0;
    // ap = A~^(j-1), starting at identity
    for (int r = 0; r < 5; r++)
      for (int cc = 0; cc < 5; cc++) ap[r][cc] = (r == cc) ? 1.0 : 0.0;
    for (int j = 1; j <= NP; j++) begin
      // gi[j] = C~ ap B~, with B~ = [bd; 1]
      for (int o = 0; o < 3; o++) begin
        s = 0.0;
        for (int r = 0; r < 4; r++) begin
          real v;
          v = ap[r][4];
          for (int q = 0; q < 4; q++) v += ap[r][q] * bd[q];
          s += cm[o][r] * v;
        end
        gi[j][o] = s;
      end
      // ap = ap * A~
      for (int r = 0; r < 5; r++)
        for (int cc = 0; cc < 5; cc++) begin
          s = 0.0;
          for (int q = 0; q < 5; q++) s += ap[r][q] * at[q][cc];
          nx[r][cc] = s;
        end
      ap = nx;
      for (int o = 0; o < 3; o++) begin
        s = 0.0;
        for (int r = 0; r < 4; r++) begin
          real v;
          v = 0.0;
          for (int q = 0; q < 5; q++) v += ap[r][q] * xi[q];
          s += cm[o][r] * v;
        end
        fr[j][o] = s;
      end
    end
    for (int j = 1; j <= NP; j++)
      for (int o = 0; o < 3; o++)
        for (int i = 0; i < NU; i++) psi[j-1][o][i] = (i < j) ? gi[j-i][o] : 0.0;
    w = '{0.0, ralt, 0.0};
    for (int a = 0; a < NU; a++) begin
      for (int b = 0; b < NU; b++) begin
        s = (a == b) ? 1.0 : 0.0;
        for (int j = 0; j < NP; j++)
          for (int o = 0; o < 3; o++) s += psi[j][o][a] * psi[j][o][b];
        q[a][b] = 2.0 * s;
      end
      s = 0.0;
      for (int j = 0; j < NP; j++)
        for (int o = 0; o < 3; o++) s += psi[j][o][a] * (fr[j+1][o] - w[o]);
      c[a] = 2.0 * s;
    end
    m = 0;
    for (int j = 0; j < NP; j++)
      for (int sg = 0; sg < 2; sg++) begin
        // input amplitude: +-(up + sum_{i<=j} du_i) <= 0.262
        for (int a = 0; a < NU; a++) jm[m][a] = (a <= j) ? ((sg != 0) ? -1.0 : 1.0) : 0.0;
        g[m] = 0.262 - ((sg != 0) ? -up : up);
        m++;
        // input rate
        for (int a = 0; a < NU; a++) jm[m][a] = (a == j) ? ((sg != 0) ? -1.0 : 1.0) : 0.0;
        g[m] = 0.524;
        m++;
        // pitch angle
        for (int a = 0; a < NU; a++) jm[m][a] = (sg != 0) ? -psi[j][0][a] : psi[j][0][a];
        g[m] = 0.349 - ((sg != 0) ? -fr[j+1][0] : fr[j+1][0]);
        m++;
        if (rate_con) begin
          for (int a = 0; a < NU; a++) jm[m][a] = (sg != 0) ? -psi[j][2][a] : psi[j][2][a];
          g[m] = 30.0 - ((sg != 0) ? -fr[j+1][2] : fr[j+1][2]);
          m++;
        end
      end
    // scaling to a range of +-1
    amax = 0.0;
    bmax = 0.0;
    for (int a = 0; a < NU; a++) begin
      if (rabs_r(c[a]) > amax) amax = rabs_r(c[a]);
      for (int b = 0; b < NU; b++) if (rabs_r(q[a][b]) > amax) amax = rabs_r(q[a][b]);
    end
    for (int i = 0; i < m; i++) begin
      if (rabs_r(g[i]) > bmax) bmax = rabs_r(g[i]);
      for (int a = 0; a < NU; a++) if (rabs_r(jm[i][a]) > bmax) bmax = rabs_r(jm[i][a]);
    end
    for (int a = 0; a < NU; a++) begin
      c[a] /= amax;
      for (int b = 0; b < NU; b++) q[a][b] /= amax;
    end
    for (int i = 0; i < m; i++) begin
      g[i] /= bmax;
      for (int a = 0; a < NU; a++) jm[i][a] /= bmax;
    end
    return m;
  endfunction

  function automatic real rabs_r(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
