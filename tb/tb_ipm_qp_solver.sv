// tb_ipm_qp_solver: self-checking testbench for the interior point solver.
//
// It follows the acceptance test of the accelerator: random convex QPs with
// Q = H'H + 0.1 I (H uniform in [0,1)), c and J uniform in [-1,1) and g in
// [0.1,1) are downloaded, solved, and the returned z must agree with an
// independent double precision solution (Hildreth's dual method, in
// tb_qp_ref_pkg) to within 1e-3 in every component. The sizes cover
// n = 1..6 unknowns and mc = 1..32 constraints, including the 6 x 32 case.
// For each solve the testbench also checks that `converged` is set, that
// `iterations` stays within the limit, and that `cycles` equals the number
// of clocks it counted itself between start and done. It counts how many
// problems had active constraints (reference z differs from the
// unconstrained minimiser) and fails if none had.
//
// The problem class, the 6 x 32 size and the 1e-3 tolerance follow the
// document's acceptance test; the reference solver is this design's choice.
module tb_ipm_qp_solver;
  import mpc_pkg::*;
  import tb_fp_pkg::*;
  import tb_qp_ref_pkg::*;

  localparam int unsigned MAX_N  = 6;
  localparam int unsigned MAX_MC = 80;
  localparam int unsigned NW = $clog2(MAX_N + 1);
  localparam int unsigned MW = $clog2(MAX_MC + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [NW-1:0] n = '0;
  logic [MW-1:0] mc = '0;
  logic          ld_en = 1'b0;
  ld_sel_e       ld_sel = LD_Q;
  logic [MW-1:0] ld_row = '0;
  logic [NW-1:0] ld_col = '0;
  fp32_t         ld_data = '0;
  logic          start = 1'b0;
  logic          busy, done, converged, singular;
  logic [7:0]    iterations;
  logic [31:0]   cycles;
  logic [NW-1:0] z_idx = '0;
  fp32_t         z_data;

  int checks = 0;
  int failures = 0;
  int active_cases = 0;

  ipm_qp_solver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(ld_sel_e s, int r, int c, real v);
    @(negedge clk);
    ld_en = 1'b1; ld_sel = s; ld_row = MW'(r); ld_col = NW'(c); ld_data = to_single(v);
  endtask

  task automatic one_case(int nn, int mm);
    mat_n_t q, h, qi;
    vec_n_t cv, zr, zu;
    mat_j_t jm;
    vec_m_t gv;
    real    err, s, du;
    int     cyc;
    for (int a = 0; a < nn; a++)
      for (int b = 0; b < nn; b++) h[a][b] = rand_real(0.0, 1.0);
    for (int a = 0; a < nn; a++)
      for (int b = 0; b < nn; b++) begin
        s = (a == b) ? 0.1 : 0.0;
        for (int r = 0; r < nn; r++) s += h[r][a] * h[r][b];
        q[a][b] = to_real(to_single(s));
      end
    for (int a = 0; a < nn; a++) cv[a] = to_real(to_single(rand_real(-1.0, 1.0)));
    for (int i = 0; i < mm; i++) begin
      for (int a = 0; a < nn; a++) jm[i][a] = to_real(to_single(rand_real(-1.0, 1.0)));
      gv[i] = to_real(to_single(rand_real(0.1, 1.0)));
    end
    zr = qp_solve(q, cv, jm, gv, nn, mm);
    // unconstrained minimiser, to see whether constraints are active
    qi = inv_n(q, nn);
    du = 0.0;
    for (int a = 0; a < nn; a++) begin
      s = 0.0;
      for (int b = 0; b < nn; b++) s -= qi[a][b] * cv[b];
      zu[a] = s;
      du += rabs(zu[a] - zr[a]);
    end
    if (du > 1e-3) active_cases++;
    // download
    n = NW'(nn);
    mc = MW'(mm);
    for (int a = 0; a < nn; a++)
      for (int b = 0; b < nn; b++) put(LD_Q, a, b, q[a][b]);
    for (int a = 0; a < nn; a++) put(LD_C, 0, a, cv[a]);
    for (int i = 0; i < mm; i++) begin
      for (int a = 0; a < nn; a++) put(LD_J, i, a, jm[i][a]);
      put(LD_G, i, 0, gv[i]);
    end
    @(negedge clk);
    ld_en = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!converged) begin
      failures++;
      $display("FAIL n=%0d mc=%0d did not converge", nn, mm);
    end
    checks++;
    if (singular) begin
      failures++;
      $display("FAIL singular matrix reported");
    end
    checks++;
    if (iterations > 8'd50) begin
      failures++;
      $display("FAIL iterations %0d", iterations);
    end
    checks++;
    if (cycles != 32'(cyc)) begin
      failures++;
      $display("FAIL cycle counter %0d, counted %0d", cycles, cyc);
    end
    err = 0.0;
    for (int a = 0; a < nn; a++) begin
      z_idx = NW'(a);
      #1;
      if (rabs(to_real(z_data) - zr[a]) > err) err = rabs(to_real(z_data) - zr[a]);
    end
    checks++;
    if (err > 1e-3) begin
      failures++;
      $display("FAIL n=%0d mc=%0d max|z-zref|=%g", nn, mm, err);
    end
    $display("case n=%0d mc=%0d iterations=%0d cycles=%0d err=%g active=%0d",
             nn, mm, iterations, cycles, err, du > 1e-3);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one_case(6, 32);
    one_case(1, 2);
    one_case(3, 12);
    for (int t = 0; t < 5; t++) one_case(1 + ($urandom % MAX_N), 1 + ($urandom % 32));
    checks++;
    if (active_cases == 0) begin
      failures++;
      $display("FAIL no case had an active constraint");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
