// ipm_qp_solver: infeasible primal-dual interior point solver for the dense
// quadratic program of constrained model predictive control,
//
//     minimise 1/2 z'Qz + c'z   subject to  Jz <= g,
//
// with n unknowns (n = Nu*m, the stacked future input moves) and mc
// inequality constraints, both set at run time up to MAX_N and MAX_MC.
//
// How it works. The iterate is (z, lambda, t): lambda are the multipliers
// and t the slacks of Jz + t = g. The start point is z = 0, lambda = t = 1.
// Each iteration, on one floating point unit and in this order:
//   A  Jz_i   = sum_j J_ij z_j
//   B  r1     = -Qz - J'lambda - c                  (dual residual)
//   C  mu     = t'lambda / mc,   sigma*mu
//   D  rp_i   = g_i - Jz_i - t_i                    (primal residual)
//      r2_i   = g_i - Jz_i - sigma*mu/lambda_i
//      d_i    = lambda_i / t_i,  w_i = d_i r2_i
//      convergence test: mu < TOL_MU and max|rp| < TOL_RES (the dual
//      residual r1 is not tested: in single precision it can stall at a
//      large value once d_i = lambda_i/t_i spans many decades, while z is
//      already accurate)
//   E  M      = Q + J' diag(d) J      written into the inversion core
//   F  rhs    = r1 + J'w
//   G  inv(M) by the matrix inversion core
//   H  dz     = inv(M) rhs
//   I  dlam_i = d_i ((J dz)_i - r2_i),   dt_i = rp_i - (J dz)_i
//      step bound: the smallest lambda_i/|dlam_i|, t_i/|dt_i| over the
//      negative components
//   J  alpha  = min(1, ETA * bound)
//   K  z += alpha dz, lambda += alpha dlam, t += alpha dt
// This is the reduced form of the Newton system in which the matrix to be
// inverted is n x n (the document's choice, because mc is much larger than
// n), with Gamma^-1 = -diag(lambda/t). The slack step uses the equivalent
// form dt = -t + g - J(z + dz).
//
// All vector-matrix work is sequential: one multiply-accumulate at a time
// on a private fp_unit. The arrays are written at one place each and read
// asynchronously, so they map to distributed or block RAM; they are not
// reset (the host loads what the solver reads, and the start point is
// written by an initialisation pass of mc clocks).
// This follows the document; the loop order, the start point, sigma, ETA,
// the tolerances and the iteration limit are this design's choices.
//
// Interface: while idle, the host writes the problem through ld_* (ld_sel
// picks Q, c, J or g; ld_row/ld_col index it). A one-clock `start` begins a
// solve; `busy` stays high until `done` pulses. `converged` tells whether the
// tolerance was met within MAX_ITER iterations, `singular` whether the
// inversion core met a zero pivot, `iterations` how many Newton
// steps were taken, `cycles` how many clocks the solve took. The solution z
// is read through z_idx -> z_data (combinational). Requires n >= 1, mc >= 1.
module ipm_qp_solver
  import mpc_pkg::*;
#(
  parameter int unsigned MAX_N    = 6,
  parameter int unsigned MAX_MC   = 80,
  parameter int unsigned MAX_ITER = 50,
  parameter fp32_t       SIGMA    = 32'h3DCC_CCCD,  // 0.1, centring parameter
  parameter fp32_t       ETA      = 32'h3F7D_70A4,  // 0.99, fraction to the boundary
  parameter fp32_t       TOL_MU   = 32'h3586_37BD,  // 1e-6, tolerance on mu
  parameter fp32_t       TOL_RES  = 32'h3727_C5AC,  // 1e-5, tolerance on max|g - Jz - t|
  localparam int unsigned NW = $clog2(MAX_N + 1),
  localparam int unsigned MW = $clog2(MAX_MC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n,
  input  logic [MW-1:0] mc,
  // problem download
  input  logic          ld_en,
  input  ld_sel_e       ld_sel,
  input  logic [MW-1:0] ld_row,
  input  logic [NW-1:0] ld_col,
  input  fp32_t         ld_data,
  // control and status
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic          singular,
  output logic [7:0]    iterations,
  output logic [31:0]   cycles,
  // solution read-back
  input  logic [NW-1:0] z_idx,
  output fp32_t         z_data
);

  typedef enum logic [5:0] {
    S_IDLE, S_INIT, S_WAIT, S_MAC_ADD, S_MAC_ACC,
    A_ROW, A_MUL, A_STEP,
    B_ROW, B_QMUL, B_QSTEP, B_JMUL, B_JSTEP,
    C_MUL, C_STEP, C_MU, C_SMU,
    D_A, D_B, D_C, D_D, D_E, D_F, D_G, S_CONV,
    E_ROW, E_MUL1, E_MUL2, E_STEP,
    F_ROW, F_MUL, F_STEP,
    G_START, G_WAIT,
    H_ROW, H_MUL, H_STEP,
    I_ROW, I_MUL, I_STEP, I_DL1, I_DL2, I_RL, I_DT, I_DT2, I_RT, I_NEXT,
    J_ALPHA, J_ALPHA2,
    K_Z, K_Z2, K_Z3, K_L, K_L2, K_L3, K_T2, K_T3,
    S_FINISH
  } state_e;

  // problem data
  fp32_t q_m   [MAX_N][MAX_N];
  fp32_t c_v   [MAX_N];
  fp32_t j_m   [MAX_MC][MAX_N];
  fp32_t g_v   [MAX_MC];
  // iterate and per-iteration vectors
  fp32_t z_v   [MAX_N];
  fp32_t r1_v  [MAX_N];
  fp32_t rhs_v [MAX_N];
  fp32_t dz_v  [MAX_N];
  fp32_t lam_v [MAX_MC];
  fp32_t t_v   [MAX_MC];
  fp32_t jz_v  [MAX_MC];
  fp32_t rp_v  [MAX_MC];
  fp32_t r2_v  [MAX_MC];
  fp32_t d_v   [MAX_MC];
  fp32_t w_v   [MAX_MC];
  fp32_t dl_v  [MAX_MC];
  fp32_t dt_v  [MAX_MC];

  state_e state, ret, mret;
  logic [MW-1:0] i;
  logic [NW-1:0] j, k;
  fp32_t acc, tmp, mu, smu, rpmax, rmin, alpha;

  // floating point unit
  logic   fpu_start;
  fp_op_e fpu_op;
  fp32_t  fpu_a, fpu_b, fpu_y;
  logic   fpu_done;

  fp_unit u_fpu (
    .clk, .rst_n, .start(fpu_start), .op(fpu_op), .a(fpu_a), .b(fpu_b),
    .y(fpu_y), .done(fpu_done), .busy()
  );

  // matrix inversion core
  logic          inv_wr_en, inv_start, inv_done, inv_singular;
  logic [NW-1:0] inv_wr_row, inv_wr_col;
  fp32_t         inv_wr_data, inv_rd_data;

  mat_inv #(.N_MAX(MAX_N)) u_inv (
    .clk, .rst_n, .n,
    .wr_en(inv_wr_en), .wr_row(inv_wr_row), .wr_col(inv_wr_col), .wr_data(inv_wr_data),
    .rd_row(j), .rd_col(k), .rd_data(inv_rd_data),
    .start(inv_start), .busy(), .done(inv_done), .singular(inv_singular)
  );

  assign busy   = (state != S_IDLE);
  assign z_data = z_v[z_idx];

  wire last_i = (i == mc - 1'b1);
  wire last_j = (j == n - 1'b1);
  wire last_k = (k == n - 1'b1);

  // Start one floating point operation; continue in state r when it is done.
  task automatic issue(fp_op_e o, fp32_t x, fp32_t w, state_e r);
    fpu_op    <= o;
    fpu_a     <= x;
    fpu_b     <= w;
    fpu_start <= 1'b1;
    ret       <= r;
    state     <= S_WAIT;
  endtask

  // acc += x * w, then continue in state r.
  task automatic mac(fp32_t x, fp32_t w, state_e r);
    issue(FP_MUL, x, w, S_MAC_ADD);
    mret <= r;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ret        <= S_IDLE;
      mret       <= S_IDLE;
      i          <= '0;
      j          <= '0;
      k          <= '0;
      acc        <= FP_ZERO;
      tmp        <= FP_ZERO;
      mu         <= FP_ZERO;
      smu        <= FP_ZERO;
      rpmax      <= FP_ZERO;
      rmin       <= FP_ZERO;
      alpha      <= FP_ZERO;
      done       <= 1'b0;
      converged  <= 1'b0;
      singular   <= 1'b0;
      iterations <= '0;
      cycles     <= '0;
      fpu_start  <= 1'b0;
      fpu_op     <= FP_ADD;
      fpu_a      <= FP_ZERO;
      fpu_b      <= FP_ZERO;
      inv_wr_en  <= 1'b0;
      inv_wr_row <= '0;
      inv_wr_col <= '0;
      inv_wr_data <= FP_ZERO;
      inv_start  <= 1'b0;
    end else begin
      done      <= 1'b0;
      fpu_start <= 1'b0;
      inv_wr_en <= 1'b0;
      inv_start <= 1'b0;
      if (state != S_IDLE) cycles <= cycles + 32'd1;
      unique case (state)
        // ------------------------------------------------------------ idle
        S_IDLE: begin
          if (ld_en) begin
            unique case (ld_sel)
              LD_Q: q_m[ld_row[NW-1:0]][ld_col] <= ld_data;
              LD_C: c_v[ld_col]                 <= ld_data;
              LD_J: j_m[ld_row][ld_col]         <= ld_data;
              LD_G: g_v[ld_row]                 <= ld_data;
              default: ;
            endcase
          end
          if (start) begin
            iterations <= '0;
            converged  <= 1'b0;
            singular   <= 1'b0;
            cycles     <= 32'd1;
            i          <= '0;
            state      <= S_INIT;
          end
        end
        // start point z = 0, lambda = t = 1, one element per clock
        S_INIT: begin
          lam_v[i] <= FP_ONE;
          t_v[i]   <= FP_ONE;
          if (32'(i) < 32'(n)) z_v[i[NW-1:0]] <= FP_ZERO;
          if (last_i) begin
            i     <= '0;
            state <= A_ROW;
          end else i <= i + 1'b1;
        end
        S_WAIT:    if (fpu_done) state <= ret;
        S_MAC_ADD: issue(FP_ADD, acc, fpu_y, S_MAC_ACC);
        S_MAC_ACC: begin
          acc   <= fpu_y;
          state <= mret;
        end
        // ------------------------------------------------------ A: Jz
        A_ROW: begin
          acc   <= FP_ZERO;
          j     <= '0;
          state <= A_MUL;
        end
        A_MUL: mac(j_m[i][j], z_v[j], A_STEP);
        A_STEP: begin
          if (last_j) begin
            jz_v[i] <= acc;
            if (last_i) begin
              j     <= '0;
              state <= B_ROW;
            end else begin
              i     <= i + 1'b1;
              state <= A_ROW;
            end
          end else begin
            j     <= j + 1'b1;
            state <= A_MUL;
          end
        end
        // ---------------------------------- B: r1 = -(c + Qz + J'lambda)
        B_ROW: begin
          acc   <= c_v[j];
          k     <= '0;
          state <= B_QMUL;
        end
        B_QMUL: mac(q_m[j][k], z_v[k], B_QSTEP);
        B_QSTEP: begin
          if (last_k) begin
            i     <= '0;
            state <= B_JMUL;
          end else begin
            k     <= k + 1'b1;
            state <= B_QMUL;
          end
        end
        B_JMUL: mac(j_m[i][j], lam_v[i], B_JSTEP);
        B_JSTEP: begin
          if (last_i) begin
            r1_v[j] <= fp_neg(acc);
            if (last_j) begin
              acc   <= FP_ZERO;
              i     <= '0;
              state <= C_MUL;
            end else begin
              j     <= j + 1'b1;
              state <= B_ROW;
            end
          end else begin
            i     <= i + 1'b1;
            state <= B_JMUL;
          end
        end
        // ------------------------------------------ C: mu = t'lambda / mc
        C_MUL: mac(t_v[i], lam_v[i], C_STEP);
        C_STEP: begin
          if (last_i) issue(FP_DIV, acc, fp_from_uint(16'(mc)), C_MU);
          else begin
            i     <= i + 1'b1;
            state <= C_MUL;
          end
        end
        C_MU: begin
          mu <= fpu_y;
          issue(FP_MUL, SIGMA, fpu_y, C_SMU);
        end
        C_SMU: begin
          smu   <= fpu_y;
          i     <= '0;
          rpmax <= FP_ZERO;
          state <= D_A;
        end
        // ------------------------------------- D: rp, r2, d, w per constraint
        D_A: issue(FP_SUB, g_v[i], jz_v[i], D_B);
        D_B: begin
          tmp <= fpu_y;
          issue(FP_SUB, fpu_y, t_v[i], D_C);
        end
        D_C: begin
          rp_v[i] <= fpu_y;
          if (fp_lt(rpmax, fp_abs(fpu_y))) rpmax <= fp_abs(fpu_y);
          issue(FP_DIV, smu, lam_v[i], D_D);
        end
        D_D: issue(FP_SUB, tmp, fpu_y, D_E);
        D_E: begin
          r2_v[i] <= fpu_y;
          issue(FP_DIV, lam_v[i], t_v[i], D_F);
        end
        D_F: begin
          d_v[i] <= fpu_y;
          issue(FP_MUL, fpu_y, r2_v[i], D_G);
        end
        D_G: begin
          w_v[i] <= fpu_y;
          if (last_i) state <= S_CONV;
          else begin
            i     <= i + 1'b1;
            state <= D_A;
          end
        end
        S_CONV: begin
          if (fp_lt(mu, TOL_MU) && fp_lt(rpmax, TOL_RES)) begin
            converged <= 1'b1;
            state     <= S_FINISH;
          end else if (iterations == 8'(MAX_ITER)) begin
            state <= S_FINISH;
          end else begin
            j     <= '0;
            k     <= '0;
            state <= E_ROW;
          end
        end
        // -------------------------------------------- E: M = Q + J'DJ
        E_ROW: begin
          acc   <= q_m[j][k];
          i     <= '0;
          state <= E_MUL1;
        end
        E_MUL1: issue(FP_MUL, j_m[i][j], d_v[i], E_MUL2);
        E_MUL2: mac(fpu_y, j_m[i][k], E_STEP);
        E_STEP: begin
          if (last_i) begin
            inv_wr_en   <= 1'b1;
            inv_wr_row  <= j;
            inv_wr_col  <= k;
            inv_wr_data <= acc;
            if (last_k) begin
              k <= '0;
              if (last_j) begin
                j     <= '0;
                state <= F_ROW;
              end else begin
                j     <= j + 1'b1;
                state <= E_ROW;
              end
            end else begin
              k     <= k + 1'b1;
              state <= E_ROW;
            end
          end else begin
            i     <= i + 1'b1;
            state <= E_MUL1;
          end
        end
        // ------------------------------------------- F: rhs = r1 + J'w
        F_ROW: begin
          acc   <= r1_v[j];
          i     <= '0;
          state <= F_MUL;
        end
        F_MUL: mac(j_m[i][j], w_v[i], F_STEP);
        F_STEP: begin
          if (last_i) begin
            rhs_v[j] <= acc;
            if (last_j) state <= G_START;
            else begin
              j     <= j + 1'b1;
              state <= F_ROW;
            end
          end else begin
            i     <= i + 1'b1;
            state <= F_MUL;
          end
        end
        // ---------------------------------------------- G: invert M
        G_START: begin
          inv_start <= 1'b1;
          state     <= G_WAIT;
        end
        G_WAIT: if (inv_done) begin
          if (inv_singular) singular <= 1'b1;
          j     <= '0;
          state <= H_ROW;
        end
        // -------------------------------------------- H: dz = inv(M) rhs
        H_ROW: begin
          acc   <= FP_ZERO;
          k     <= '0;
          state <= H_MUL;
        end
        H_MUL: mac(inv_rd_data, rhs_v[k], H_STEP);
        H_STEP: begin
          if (last_k) begin
            dz_v[j] <= acc;
            if (last_j) begin
              i     <= '0;
              rmin  <= FP_MAX;
              state <= I_ROW;
            end else begin
              j     <= j + 1'b1;
              state <= H_ROW;
            end
          end else begin
            k     <= k + 1'b1;
            state <= H_MUL;
          end
        end
        // --------------------------- I: dlambda, dt and the step bound
        I_ROW: begin
          acc   <= FP_ZERO;
          j     <= '0;
          state <= I_MUL;
        end
        I_MUL: mac(j_m[i][j], dz_v[j], I_STEP);
        I_STEP: begin
          if (last_j) issue(FP_SUB, acc, r2_v[i], I_DL1);
          else begin
            j     <= j + 1'b1;
            state <= I_MUL;
          end
        end
        I_DL1: issue(FP_MUL, d_v[i], fpu_y, I_DL2);
        I_DL2: begin
          dl_v[i] <= fpu_y;
          if (fp_is_neg(fpu_y)) issue(FP_DIV, lam_v[i], fp_abs(fpu_y), I_RL);
          else state <= I_DT;
        end
        I_RL: begin
          if (fp_lt(fpu_y, rmin)) rmin <= fpu_y;
          state <= I_DT;
        end
        I_DT: issue(FP_SUB, rp_v[i], acc, I_DT2);
        I_DT2: begin
          dt_v[i] <= fpu_y;
          if (fp_is_neg(fpu_y)) issue(FP_DIV, t_v[i], fp_abs(fpu_y), I_RT);
          else state <= I_NEXT;
        end
        I_RT: begin
          if (fp_lt(fpu_y, rmin)) rmin <= fpu_y;
          state <= I_NEXT;
        end
        I_NEXT: begin
          if (last_i) state <= J_ALPHA;
          else begin
            i     <= i + 1'b1;
            state <= I_ROW;
          end
        end
        // -------------------------------------------- J: step length
        J_ALPHA: issue(FP_MUL, ETA, rmin, J_ALPHA2);
        J_ALPHA2: begin
          alpha <= fp_lt(fpu_y, FP_ONE) ? fpu_y : FP_ONE;
          j     <= '0;
          state <= K_Z;
        end
        // -------------------------------------------- K: update iterate
        K_Z:  issue(FP_MUL, alpha, dz_v[j], K_Z2);
        K_Z2: issue(FP_ADD, z_v[j], fpu_y, K_Z3);
        K_Z3: begin
          z_v[j] <= fpu_y;
          if (last_j) begin
            i     <= '0;
            state <= K_L;
          end else begin
            j     <= j + 1'b1;
            state <= K_Z;
          end
        end
        K_L:  issue(FP_MUL, alpha, dl_v[i], K_L2);
        K_L2: issue(FP_ADD, lam_v[i], fpu_y, K_L3);
        K_L3: begin
          lam_v[i] <= fpu_y;
          issue(FP_MUL, alpha, dt_v[i], K_T2);
        end
        K_T2: issue(FP_ADD, t_v[i], fpu_y, K_T3);
        K_T3: begin
          t_v[i] <= fpu_y;
          if (last_i) begin
            iterations <= iterations + 8'd1;
            i          <= '0;
            state      <= A_ROW;
          end else begin
            i     <= i + 1'b1;
            state <= K_L;
          end
        end
        // ------------------------------------------------------ finish
        S_FINISH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
