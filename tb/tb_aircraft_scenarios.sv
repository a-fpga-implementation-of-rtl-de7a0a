// tb_aircraft_scenarios: runs the four aircraft control scenarios on the
// interior point solver at its default size and reports the figures of
// merit per scenario (average iterations and clocks per sample).
//
// How it works: the testbench is the host. Every 0.5 s sample it forms and
// scales the QP from the plant state (tb_aircraft_pkg), rounds it to single
// precision, loads it straight into ipm_qp_solver through its load port
// (the serial link is exercised by tb_mpc_on_chip), starts the solve,
// reads z back and applies the first move to the simulated aircraft.
// Scenarios, 24 samples (12 s) each:
//   1  40 m altitude step, 60 constraints
//   2  400 m altitude step, 60 constraints
//   3  400 m step with the 30 m/s altitude-rate limit, 80 constraints
//   4  as 3, with a 5 m/s altitude-rate disturbance from 5 s to 10 s
// Checks per solve: convergence, no singular pivot, at most MAX_ITER
// iterations, `cycles` equal to the clocks counted here, no constraint
// violated by more than 1e-5 and a cost within mc * 1e-6 + 1e-5 of the
// double precision optimum (tb_qp_ref_pkg): the stopping rule mu < 1e-6
// allows a duality gap t'lambda = mc * mu, plus single precision rounding.
// Per scenario: the elevator and pitch limits hold, and in scenario 1 the
// altitude is within 2 m of 40 m after 12 s.
// Timing: clocks per solve are reported, not bounded; the document's
// figures (6.6 to 8.6 iterations, 368,527 to 475,133 clocks per sample at
// 20 MHz) come from a different datapath.
//
// The scenarios, their sizes, limits and disturbance follow the document;
// the run length and the accuracy bounds are this testbench's choices.
module tb_aircraft_scenarios;
  import mpc_pkg::*;
  import tb_fp_pkg::*;
  import tb_qp_ref_pkg::*;
  import tb_aircraft_pkg::*;

  localparam int unsigned NW = 3;   // $clog2(6 + 1), default MAX_N
  localparam int unsigned MW = 7;   // $clog2(80 + 1), default MAX_MC
  localparam int SAMPLES = 24;

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

  ipm_qp_solver dut (.*);

  always #25 clk = ~clk;   // 20 MHz

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(ld_sel_e s, int r, int c, real v);
    @(negedge clk);
    ld_en = 1'b1; ld_sel = s; ld_row = MW'(r); ld_col = NW'(c); ld_data = to_single(v);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic scenario(int id, real ralt, bit rate_con, bit disturb);
    real    x [4];
    real    up, u, s, fh, fr, vh, dw, max_pitch, max_u;
    mat_n_t q;
    vec_n_t cv, zr, zh;
    mat_j_t jm;
    vec_m_t gv;
    int     m, cyc, it_sum;
    longint cyc_sum;
    for (int r = 0; r < 4; r++) x[r] = 0.0;
    up = 0.0; max_pitch = 0.0; max_u = 0.0;
    it_sum = 0; cyc_sum = 0;
    for (int k = 0; k < SAMPLES; k++) begin
      m = build_qp(x, up, ralt, rate_con, q, cv, jm, gv);
      for (int a = 0; a < NU; a++) begin
        cv[a] = to_real(to_single(cv[a]));
        for (int b = 0; b < NU; b++) q[a][b] = to_real(to_single(q[a][b]));
      end
      for (int i = 0; i < m; i++) begin
        gv[i] = to_real(to_single(gv[i]));
        for (int a = 0; a < NU; a++) jm[i][a] = to_real(to_single(jm[i][a]));
      end
      zr = qp_solve(q, cv, jm, gv, NU, m);
      n  = NW'(NU);
      mc = MW'(m);
      for (int a = 0; a < NU; a++)
        for (int b = 0; b < NU; b++) put(LD_Q, a, b, q[a][b]);
      for (int a = 0; a < NU; a++) put(LD_C, 0, a, cv[a]);
      for (int i = 0; i < m; i++) begin
        for (int a = 0; a < NU; a++) put(LD_J, i, a, jm[i][a]);
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
      for (int a = 0; a < NU; a++) begin
        z_idx = NW'(a);
        #1;
        zh[a] = to_real(z_data);
      end
      fh = 0.0; fr = 0.0; vh = -1.0;
      for (int a = 0; a < NU; a++) begin
        fh += cv[a] * zh[a];
        fr += cv[a] * zr[a];
        for (int b = 0; b < NU; b++) begin
          fh += 0.5 * zh[a] * q[a][b] * zh[b];
          fr += 0.5 * zr[a] * q[a][b] * zr[b];
        end
      end
      for (int i = 0; i < m; i++) begin
        s = -gv[i];
        for (int a = 0; a < NU; a++) s += jm[i][a] * zh[a];
        if (s > vh) vh = s;
      end
      check(converged && !singular && iterations <= 8'd50,
            $sformatf("scenario %0d sample %0d: converged=%0d singular=%0d iterations=%0d",
                      id, k, converged, singular, iterations));
      check(cycles == 32'(cyc),
            $sformatf("scenario %0d sample %0d: cycles %0d, counted %0d", id, k, cycles, cyc));
      check(vh <= 1e-5 && fh <= fr + m * 1e-6 + 1e-5,
            $sformatf("scenario %0d sample %0d: violation %g, cost %g vs %g", id, k, vh, fh, fr));
      it_sum  += int'(iterations);
      cyc_sum += longint'(cycles);
      u = up + zh[0];
      dw = (disturb && k >= 10 && k < 20) ? 5.0 : 0.0;   // 5 s to 10 s
      plant_step(x, u, dw);
      up = u;
      if (rabs(y_of(x, 0)) > max_pitch) max_pitch = rabs(y_of(x, 0));
      if (rabs(u) > max_u) max_u = rabs(u);
    end
    check(max_u <= 0.262 + 1e-3 && max_pitch <= 0.349 + 0.01,
          $sformatf("scenario %0d limits: |u| %g, |pitch| %g", id, max_u, max_pitch));
    if (id == 1)
      check(rabs(y_of(x, 1) - 40.0) < 2.0,
            $sformatf("scenario 1: altitude %g m after 12 s", y_of(x, 1)));
    $display("scenario %0d: %0d constraints, average %0.1f iterations, %0d clocks (%0.1f ms at 20 MHz) per sample, altitude %0.1f m at 12 s",
             id, m, real'(it_sum) / SAMPLES, cyc_sum / SAMPLES,
             real'(cyc_sum) / SAMPLES / 20_000.0, y_of(x, 1));
  endtask

  initial begin
    init_model();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    scenario(1, 40.0, 1'b0, 1'b0);
    scenario(2, 400.0, 1'b0, 1'b0);
    scenario(3, 400.0, 1'b1, 1'b0);
    scenario(4, 400.0, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
