// tb_fp_unit: self-checking testbench for the single precision unit.
//
// The reference result of every operation is computed in double precision by
// the simulator and rounded to single precision (round to nearest even) by
// the function to_single below. Double precision has more than twice the
// single precision significand plus two bits, so rounding the double result
// once more gives the correctly rounded single result for +, -, * and /.
// Operands are drawn with exponents in a middle range so that no result is
// subnormal or overflows (the unit flushes those, which the reference does
// not model). Directed cases cover zeros, exact cancellation and division by
// zero. The latency of each operation is checked: one clock for add,
// subtract and multiply, 28 clocks for divide (one clock when an operand
// of the division is zero).
//
// The number format follows the document; the checked latencies and special
// value rules are this design's own.
module tb_fp_unit;
  import mpc_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   start = 1'b0;
  fp_op_e op = FP_ADD;
  fp32_t  a = '0, b = '0;
  fp32_t  y;
  logic   done, busy;

  int checks = 0;
  int failures = 0;

  fp_unit dut (.clk, .rst_n, .start, .op, .a, .b, .y, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(fp32_t v);
    logic [63:0] d;
    if (v[30:23] == 8'd0) return 0.0;
    d = {v[31], 11'(int'(v[30:23]) - 127 + 1023), v[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic fp32_t to_single(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        inc;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    inc = d[28] && ((d[27:0] != 28'd0) || m[0]);
    m = m + 25'(inc);
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic fp32_t rand_fp();
    return {1'($urandom), 8'(100 + ($urandom % 55)), 23'($urandom)};
  endfunction

  task automatic run(fp_op_e o, fp32_t x, fp32_t w, output fp32_t r, output int lat);
    @(negedge clk);
    op = o; a = x; b = w; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    r = y;
  endtask

  task automatic check(fp_op_e o, fp32_t x, fp32_t w);
    fp32_t r, ref_v;
    int    lat;
    real   xr, wr;
    xr = to_real(x);
    wr = to_real(w);
    case (o)
      FP_ADD:  ref_v = to_single(xr + wr);
      FP_SUB:  ref_v = to_single(xr - wr);
      FP_MUL:  ref_v = to_single(xr * wr);
      default: ref_v = to_single(xr / wr);
    endcase
    run(o, x, w, r, lat);
    checks++;
    if (r !== ref_v && !(r[30:0] == 31'd0 && ref_v[30:0] == 31'd0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h got=%h exp=%h", o.name(), x, w, r, ref_v);
    end
    checks++;
    if (lat != ((o == FP_DIV && x[30:23] != 8'd0 && w[30:23] != 8'd0) ? 28 : 1)) begin
      failures++;
      if (failures < 10) $display("FAIL latency op=%s %0d", o.name(), lat);
    end
  endtask

  initial begin
    fp32_t r;
    int    lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed cases
    check(FP_ADD, FP_ONE, FP_ONE);
    check(FP_SUB, FP_ONE, FP_ONE);
    check(FP_MUL, 32'h4040_0000, 32'h3F00_0000);   // 3 * 0.5
    check(FP_DIV, FP_ONE, 32'h4040_0000);          // 1 / 3
    check(FP_ADD, 32'h4B80_0000, 32'h3F80_0001);   // far apart, sticky
    check(FP_SUB, 32'h3F80_0000, 32'h3F7F_FFFF);   // cancellation
    check(FP_MUL, FP_ZERO, 32'h4040_0000);
    check(FP_DIV, FP_ZERO, 32'h4040_0000);
    run(FP_DIV, FP_ONE, FP_ZERO, r, lat);
    checks++;
    if (r != 32'h7F80_0000) begin
      failures++;
      $display("FAIL 1/0 gave %h", r);
    end
    // random cases
    for (int i = 0; i < 3000; i++) begin
      fp32_t x, w;
      x = rand_fp();
      w = rand_fp();
      // close exponents exercise cancellation more often
      if (i % 4 == 0) w = {w[31], x[30:23], w[22:0]};
      check(fp_op_e'(i % 4), x, w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
