// tb_mpc_on_chip: end-to-end test of the accelerator at its default size,
// in closed loop with the aircraft model (hardware-in-the-loop style).
//
// Every 0.5 s sample the testbench, acting as the host, builds and scales
// the controller's QP from the current plant state (tb_aircraft_pkg), sends
// it bit by bit over the RS232 line (8N1, 174 clocks per bit), and collects
// the 12 bytes of z that come back on the transmit line. The returned z is
// compared with a double precision reference solution of the same
// single-rounded QP: it must violate no constraint by more than 1e-5 and
// its cost may exceed the optimal cost by at most 1e-5. This is the
// accuracy the solver's stopping rule promises: with mu < 1e-6 the duality
// gap t'lambda = mc * mu is below 8e-5, and the scaled data lie within +-1.
// z itself is only reported (largest |z - zref|), not checked: the scaled
// cost is nearly flat along some directions (Q is badly conditioned), so
// z differences of 0.1 to 0.2 rad there change the cost by less than 1e-5. The solve must report convergence, and
// the first move is applied to the plant, whose response is checked against
// the limits.
// Two runs are made: a 40 m altitude step with the 60 constraints, and a
// 400 m step with the altitude-rate limit added (80 constraints), where the
// limit becomes active. The testbench checks that the plant respects the
// elevator, pitch and altitude-rate limits, and counts the mechanisms it
// exercised: solves with 60 and with 80 constraints, solves where the
// constrained optimum differs from the unconstrained one, serial frames in
// both directions. A mechanism that never happened counts as a failure.
//
// The two scenarios, their sizes and limits follow the document's aircraft
// tests; the number of samples and the accuracy bounds are this design's
// choices.
module tb_mpc_on_chip;
  import mpc_pkg::*;
  import tb_fp_pkg::*;
  import tb_qp_ref_pkg::*;
  import tb_aircraft_pkg::*;

  localparam int CPB = 174;   // clocks per serial bit at the default setting

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        rxd = 1'b1;
  logic        txd;
  logic        busy, converged, singular;
  logic [7:0]  iterations;
  logic [31:0] cycles;
  logic        rx_frame_err;

  int checks = 0;
  int failures = 0;
  int n_mc60 = 0, n_mc80 = 0, n_active = 0, n_rx_bytes = 0, n_tx_bytes = 0;
  int n_iter_total = 0, n_solves = 0;
  real max_err = 0.0;
  longint n_cycles_total = 0;

  mpc_on_chip dut (.*);

  always #25 clk = ~clk;   // 20 MHz

  int n_frame_err = 0;
  always @(posedge clk) if (rst_n && rx_frame_err) n_frame_err++;

  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- serial line
  logic [7:0] rxq [$];

  task automatic ser_byte(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd = f[k];
      repeat (CPB) @(negedge clk);
    end
    n_tx_bytes++;
  endtask

  task automatic ser_word(fp32_t w);
    for (int k = 0; k < 4; k++) ser_byte(w[8*k +: 8]);
  endtask

  // receiver for the chip's transmit line
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (rst_n && !txd) begin
        repeat (CPB / 2) @(negedge clk);
        for (int k = 0; k < 8; k++) begin
          repeat (CPB) @(negedge clk);
          b[k] = txd;
        end
        repeat (CPB) @(negedge clk);
        if (!txd) begin
          checks++;
          failures++;
          $display("FAIL stop bit low on the transmit line");
        end
        rxq.push_back(b);
        n_rx_bytes++;
      end
    end
  end

  // ------------------------------------------------------------- one run
  task automatic run(string name, real ralt, bit rate_con, int samples);
    real    x [4];
    real    up, u, err, s, du, fh, fr, vh;
    mat_n_t q, qi;
    vec_n_t cv, zr, zh;
    mat_j_t jm;
    vec_m_t gv;
    int     m, wait_clk;
    real    max_pitch, max_rate, max_u;
    for (int r = 0; r < 4; r++) x[r] = 0.0;
    up = 0.0;
    max_pitch = 0.0; max_rate = 0.0; max_u = 0.0;
    for (int k = 0; k < samples; k++) begin
      m = build_qp(x, up, ralt, rate_con, q, cv, jm, gv);
      // what the chip sees: single precision
      for (int a = 0; a < NU; a++) begin
        cv[a] = to_real(to_single(cv[a]));
        for (int b = 0; b < NU; b++) q[a][b] = to_real(to_single(q[a][b]));
      end
      for (int i = 0; i < m; i++) begin
        gv[i] = to_real(to_single(gv[i]));
        for (int a = 0; a < NU; a++) jm[i][a] = to_real(to_single(jm[i][a]));
      end
      zr = qp_solve(q, cv, jm, gv, NU, m);
      qi = inv_n(q, NU);
      du = 0.0;
      for (int a = 0; a < NU; a++) begin
        s = 0.0;
        for (int b = 0; b < NU; b++) s -= qi[a][b] * cv[b];
        du += rabs(s - zr[a]);
      end
      if (du > 1e-3) n_active++;
      if (m == 60) n_mc60++;
      if (m == 80) n_mc80++;
      // download
      rxq.delete();
      ser_byte(8'(NU));
      ser_byte(8'(m));
      for (int a = 0; a < NU; a++)
        for (int b = 0; b < NU; b++) ser_word(to_single(q[a][b]));
      for (int a = 0; a < NU; a++) ser_word(to_single(cv[a]));
      for (int i = 0; i < m; i++)
        for (int a = 0; a < NU; a++) ser_word(to_single(jm[i][a]));
      for (int i = 0; i < m; i++) ser_word(to_single(gv[i]));
      // read back
      wait_clk = 0;
      while (rxq.size() < 4 * NU && wait_clk < 5_000_000) begin
        @(negedge clk);
        wait_clk++;
      end
      checks++;
      if (rxq.size() != 4 * NU) begin
        failures++;
        $display("FAIL %s sample %0d: %0d bytes returned", name, k, rxq.size());
        return;
      end
      for (int a = 0; a < NU; a++)
        zh[a] = to_real({rxq[4*a+3], rxq[4*a+2], rxq[4*a+1], rxq[4*a]});
      // The scaled QPs are badly conditioned in some directions (the cost is
      // nearly flat there), so optimality is checked through the cost and
      // the constraint violation; |z - zref| is only reported.
      err = 0.0;
      for (int a = 0; a < NU; a++) if (rabs(zh[a] - zr[a]) > err) err = rabs(zh[a] - zr[a]);
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
      checks++;
      if (vh > 1e-5 || fh > fr + 1e-5) begin
        failures++;
        $display("FAIL %s sample %0d: max|z-zref| = %g, violation %g, cost %g vs %g",
                 name, k, err, vh, fh, fr);
      end
      if (err > max_err) max_err = err;
      checks++;
      if (!converged || singular) begin
        failures++;
        $display("FAIL %s sample %0d: converged=%0d singular=%0d", name, k, converged, singular);
      end
      n_solves++;
      n_iter_total += int'(iterations);
      n_cycles_total += longint'(cycles);
      // apply the first move
      u = up + zh[0];
      plant_step(x, u, 0.0);
      up = u;
      if (rabs(y_of(x, 0)) > max_pitch) max_pitch = rabs(y_of(x, 0));
      if (rabs(y_of(x, 2)) > max_rate) max_rate = rabs(y_of(x, 2));
      if (rabs(u) > max_u) max_u = rabs(u);
      $display("%s t=%4.1f s  altitude=%7.2f m  pitch=%6.2f deg  rate=%6.2f m/s  elevator=%6.2f deg  iter=%0d  cycles=%0d",
               name, 0.5 * (k + 1), y_of(x, 1), y_of(x, 0) * 57.2958, y_of(x, 2),
               u * 57.2958, iterations, cycles);
    end
    checks++;
    if (max_u > 0.262 + 1e-3 || max_pitch > 0.349 + 0.01 || (rate_con && max_rate > 30.5)) begin
      failures++;
      $display("FAIL %s limits: |u|=%g |pitch|=%g |rate|=%g", name, max_u, max_pitch, max_rate);
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("mechanism %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    init_model();
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    run("step40", 40.0, 1'b0, 8);
    run("step400_rate", 400.0, 1'b1, 8);
    need("solves with 60 constraints", n_mc60);
    need("solves with 80 constraints", n_mc80);
    need("solves with active constraints", n_active);
    need("bytes received over the serial line", n_tx_bytes);
    need("bytes sent back over the serial line", n_rx_bytes);
    checks++;
    if (n_frame_err != 0) begin
      failures++;
      $display("FAIL %0d framing errors seen by the chip", n_frame_err);
    end
    if (n_solves > 0)
      $display("average %0.1f iterations, %0d clocks per solve, largest |z-zref| %g",
               real'(n_iter_total) / n_solves, n_cycles_total / longint'(n_solves), max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
