// tb_mat_inv: self-checking testbench for the matrix inversion core.
//
// For sizes n = 1 .. N_MAX it builds random symmetric positive definite
// matrices A = H'H + I (the kind of matrix the solver inverts), loads them,
// runs the core and reads the result back. The check is independent of the
// core's arithmetic: the product A * inv(A) is formed in double precision
// and every element must lie within 1e-4 of the identity. The number of
// clocks from start to done is checked against
// 1 + n*(32 + 5n + 7n(n-1)), the schedule of the sequential datapath.
//
// The document only calls for an inversion core; the matrix class and the
// 1e-4 bound are this testbench's choices.
module tb_mat_inv;
  import mpc_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned N_MAX = 6;
  localparam int unsigned IW = $clog2(N_MAX + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [IW-1:0] n = '0;
  logic          wr_en = 1'b0;
  logic [IW-1:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  fp32_t         wr_data = '0, rd_data;
  logic          start = 1'b0;
  logic          busy, done, singular;

  int checks = 0;
  int failures = 0;

  mat_inv #(.N_MAX(N_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real A [N_MAX][N_MAX];
  real X [N_MAX][N_MAX];

  task automatic one_case(int sz);
    real H [N_MAX][N_MAX];
    real err, s;
    int  cyc;
    for (int r = 0; r < sz; r++)
      for (int c = 0; c < sz; c++) H[r][c] = rand_real(-1.0, 1.0);
    for (int r = 0; r < sz; r++)
      for (int c = 0; c < sz; c++) begin
        s = (r == c) ? 1.0 : 0.0;
        for (int q = 0; q < sz; q++) s += H[q][r] * H[q][c];
        A[r][c] = to_real(to_single(s));
      end
    n = IW'(sz);
    for (int r = 0; r < sz; r++)
      for (int c = 0; c < sz; c++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_row = IW'(r); wr_col = IW'(c); wr_data = to_single(A[r][c]);
      end
    @(negedge clk);
    wr_en = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 1 + sz * (32 + 5 * sz + 7 * sz * (sz - 1))) begin
      failures++;
      $display("FAIL n=%0d cycles=%0d", sz, cyc);
    end
    checks++;
    if (singular) begin
      failures++;
      $display("FAIL singular flagged");
    end
    for (int r = 0; r < sz; r++)
      for (int c = 0; c < sz; c++) begin
        rd_row = IW'(r); rd_col = IW'(c);
        #1;
        X[r][c] = to_real(rd_data);
      end
    err = 0.0;
    for (int r = 0; r < sz; r++)
      for (int c = 0; c < sz; c++) begin
        s = (r == c) ? -1.0 : 0.0;
        for (int q = 0; q < sz; q++) s += A[r][q] * X[q][c];
        if (rabs(s) > err) err = rabs(s);
      end
    checks++;
    if (err > 1e-4) begin
      failures++;
      $display("FAIL n=%0d max|A*inv(A)-I|=%g", sz, err);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) one_case(1 + (t % N_MAX));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
