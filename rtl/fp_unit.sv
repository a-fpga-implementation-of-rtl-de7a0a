// fp_unit: IEEE-754 single precision arithmetic unit (add, subtract,
// multiply, divide) shared sequentially by the solver's vector-matrix loops.
//
// How it works: operands are unpacked into sign, biased exponent and a
// 24-bit significand with the hidden one. Addition aligns the smaller operand
// with a sticky bit, adds or subtracts, and renormalises with a leading-zero
// count. Multiplication forms the 48-bit product of the significands.
// Division runs a restoring shift-subtract loop, one quotient bit per clock.
// All results go through one round-to-nearest-even step that works on a
// 27-bit significand (24 bits, guard, round, sticky).
//
// Interface and timing: pulse `start` for one cycle with `op`, `a` and `b`
// valid. For FP_ADD, FP_SUB and FP_MUL, `done` pulses and `y` is valid on the
// next clock edge (one cycle of latency). FP_DIV takes 28 clocks
// (one clock when either operand is zero).
// `busy` is high while a division is in progress; `start` is ignored then.
// `y` holds its value until the next operation finishes.
//
// Number format: 8-bit exponent and 23-bit mantissa, as specified for the
// accelerator. The handling of special values is this design's choice:
// subnormal inputs and results are flushed to zero, overflow gives infinity
// with the correct sign, division by zero gives infinity, and NaN is never
// produced (the solver keeps all its quantities finite and positive where it
// divides).
module fp_unit
  import mpc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fp_op_e op,
  input  fp32_t  a,
  input  fp32_t  b,
  output fp32_t  y,
  output logic   done,
  output logic   busy
);

  localparam int unsigned QBITS = 27;   // quotient bits produced by the divider

  // Round a normalised 27-bit significand (hidden one at bit 26) to nearest
  // even and pack it; e is the biased exponent before rounding.
  function automatic fp32_t round_pack(logic s, logic signed [11:0] e, logic [26:0] m);
    logic        inc;
    logic [24:0] mr;
    logic signed [11:0] er;
    inc = m[2] & (m[1] | m[0] | m[3]);
    mr  = {1'b0, m[26:3]} + 25'(inc);
    er  = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 12'sd1;
    end
    if (er >= 12'sd255) return {s, 8'hFF, 23'd0};
    if (er <= 12'sd0)   return {s, 31'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  // ---------------------------------------------------------------- add/sub
  function automatic fp32_t fadd(fp32_t x, fp32_t w, logic sub);
    logic        sx, sw, sl, ss;
    logic [7:0]  el, es;
    logic [23:0] ml, ms;
    logic [26:0] al, as_sh;
    logic [27:0] sum;
    logic [26:0] m;
    logic signed [11:0] e;
    logic [7:0]  d;
    logic        sticky;
    int unsigned lz;
    logic        xz, wz;
    sx = x[31];
    sw = w[31] ^ sub;
    xz = (x[30:23] == 8'd0);
    wz = (w[30:23] == 8'd0);
    if (xz && wz) return {sx & sw, 31'd0};
    if (wz) return {sx, x[30:0]};
    if (xz) return {sw, w[30:0]};
    // order by magnitude
    if (x[30:0] >= w[30:0]) begin
      sl = sx; el = x[30:23]; ml = {1'b1, x[22:0]};
      ss = sw; es = w[30:23]; ms = {1'b1, w[22:0]};
    end else begin
      sl = sw; el = w[30:23]; ml = {1'b1, w[22:0]};
      ss = sx; es = x[30:23]; ms = {1'b1, x[22:0]};
    end
    d  = el - es;
    al = {ml, 3'b000};
    if (d >= 8'd27) begin
      as_sh  = 27'd0;
      sticky = 1'b1;
    end else begin
      as_sh  = {ms, 3'b000} >> d;
      sticky = (({ms, 3'b000} & ((27'd1 << d) - 27'd1)) != 27'd0);
    end
    as_sh[0] = as_sh[0] | sticky;
    e = $signed({4'd0, el});
    if (sl == ss) begin
      sum = {1'b0, al} + {1'b0, as_sh};
      if (sum[27]) begin
        m = sum[27:1];
        m[0] = m[0] | sum[0];
        e = e + 12'sd1;
      end else begin
        m = sum[26:0];
      end
    end else begin
      m = al - as_sh;
      if (m == 27'd0) return FP_ZERO;
      lz = 0;
      for (int i = 0; i < 27; i++) if (m[i]) lz = 26 - i;
      m = m << lz;
      e = e - 12'(lz);
    end
    return round_pack(sl, e, m);
  endfunction

  // --------------------------------------------------------------- multiply
  function automatic fp32_t fmul(fp32_t x, fp32_t w);
    logic        s;
    logic [47:0] p;
    logic [26:0] m;
    logic signed [11:0] e;
    s = x[31] ^ w[31];
    if (x[30:23] == 8'd0 || w[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, x[22:0]} * {1'b1, w[22:0]};
    e = $signed({4'd0, x[30:23]}) + $signed({4'd0, w[30:23]}) - 12'sd127;
    if (p[47]) begin
      m = p[47:21];
      m[0] = m[0] | (p[20:0] != 21'd0);
      e = e + 12'sd1;
    end else begin
      m = p[46:20];
      m[0] = m[0] | (p[19:0] != 20'd0);
    end
    return round_pack(s, e, m);
  endfunction

  // ----------------------------------------------------------------- divider
  logic [25:0]        rem_q;      // partial remainder
  logic [23:0]        dvs_q;      // divisor significand
  logic [25:0]        quo_q;      // quotient bits produced so far
  logic [4:0]         cnt_q;
  logic               sgn_q;
  logic signed [11:0] exp_q;

  logic [25:0] rem_sub;
  logic        rem_ge;
  assign rem_ge  = (rem_q >= {2'b00, dvs_q});
  assign rem_sub = rem_ge ? (rem_q - {2'b00, dvs_q}) : rem_q;

  // Packs the finished quotient: leading one at bit 26 or bit 25.
  function automatic fp32_t div_pack(logic s, logic signed [11:0] e, logic [26:0] q, logic rnz);
    logic [26:0] m;
    if (q[26]) begin
      m = q;
      m[0] = m[0] | rnz;
      return round_pack(s, e, m);
    end
    m = {q[25:0], rnz};
    return round_pack(s, e - 12'sd1, m);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= FP_ZERO;
      done  <= 1'b0;
      busy  <= 1'b0;
      rem_q <= '0;
      dvs_q <= '0;
      quo_q <= '0;
      cnt_q <= '0;
      sgn_q <= 1'b0;
      exp_q <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        quo_q <= {quo_q[24:0], rem_ge};
        rem_q <= {rem_sub[24:0], 1'b0};
        if (cnt_q == 5'(QBITS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= div_pack(sgn_q, exp_q, {quo_q, rem_ge}, rem_sub != 26'd0);
        end
        cnt_q <= cnt_q + 5'd1;
      end else if (start) begin
        unique case (op)
          FP_ADD: begin y <= fadd(a, b, 1'b0); done <= 1'b1; end
          FP_SUB: begin y <= fadd(a, b, 1'b1); done <= 1'b1; end
          FP_MUL: begin y <= fmul(a, b);       done <= 1'b1; end
          FP_DIV: begin
            if (a[30:23] == 8'd0) begin
              y    <= {a[31] ^ b[31], 31'd0};
              done <= 1'b1;
            end else if (b[30:23] == 8'd0) begin
              y    <= {a[31] ^ b[31], 8'hFF, 23'd0};
              done <= 1'b1;
            end else begin
              busy  <= 1'b1;
              cnt_q <= 5'd0;
              quo_q <= '0;
              rem_q <= {2'b00, 1'b1, a[22:0]};
              dvs_q <= {1'b1, b[22:0]};
              sgn_q <= a[31] ^ b[31];
              exp_q <= $signed({4'd0, a[30:23]}) - $signed({4'd0, b[30:23]}) + 12'sd127;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
