// mat_inv: matrix inversion core. Inverts an n x n single precision matrix
// (n <= N_MAX, chosen at run time) in place by Gauss-Jordan elimination.
//
// How it works: for each pivot k the core computes p = 1/a[k][k] (one
// division), sets a[k][k] = 1 and scales row k by p, so that a[k][k] ends up
// holding p. Every other row i is then reduced with f = a[i][k]: a[i][k] is
// set to 0 and a[i][j] -= f * a[k][j] for all j. After the last pivot the
// array holds the inverse. The arithmetic is done one operation at a time on
// a private fp_unit, matching the sequential vector-matrix style of the rest
// of the accelerator. No pivoting is done: the solver only hands it the
// symmetric positive definite matrix Q + J' D J, whose pivots are positive.
// A zero pivot raises `singular` (the result is then meaningless).
//
// Interface: while idle, load the matrix through wr_en/wr_row/wr_col/wr_data
// and read any element through rd_row/rd_col -> rd_data (combinational).
// Pulse `start`; `busy` stays high during the inversion and `done` pulses
// for one clock when the inverse is in place.
//
// Timing: per pivot one division, n multiplications and (n-1)*n
// multiply/subtract pairs, each operation with its hand-over clocks. From the
// clock that samples `start` to the one that raises `done` it takes exactly
// 1 + n*(32 + 5n + 7n(n-1)) clocks: 268 for n = 3, 1633 for n = 6.
//
// The document calls for a matrix inversion core in IEEE single precision;
// the algorithm (Gauss-Jordan, no pivoting) and the interface are this
// design's choices.
module mat_inv
  import mpc_pkg::*;
#(
  parameter int unsigned N_MAX = 6,
  localparam int unsigned IW = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] n,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_row,
  input  logic [IW-1:0] wr_col,
  input  fp32_t         wr_data,
  input  logic [IW-1:0] rd_row,
  input  logic [IW-1:0] rd_col,
  output fp32_t         rd_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          singular
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_PIV, S_PIV_DONE, S_ROW, S_ROW_DONE,
    S_ELIM_I, S_ELIM_MUL, S_ELIM_SUB, S_ELIM_DONE
  } state_e;

  state_e state, ret;
  fp32_t  a [N_MAX][N_MAX];
  logic [IW-1:0] k, i, j;
  fp32_t  p, f;

  logic   fpu_start;
  fp_op_e fpu_op;
  fp32_t  fpu_a, fpu_b, fpu_y;
  logic   fpu_done;

  fp_unit u_fpu (
    .clk, .rst_n, .start(fpu_start), .op(fpu_op), .a(fpu_a), .b(fpu_b),
    .y(fpu_y), .done(fpu_done), .busy()
  );

  assign rd_data = a[rd_row][rd_col];
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ret       <= S_IDLE;
      k         <= '0;
      i         <= '0;
      j         <= '0;
      p         <= FP_ZERO;
      f         <= FP_ZERO;
      done      <= 1'b0;
      singular  <= 1'b0;
      fpu_start <= 1'b0;
      fpu_op    <= FP_ADD;
      fpu_a     <= FP_ZERO;
      fpu_b     <= FP_ZERO;
    end else begin
      done      <= 1'b0;
      fpu_start <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (wr_en) a[wr_row][wr_col] <= wr_data;
          if (start) begin
            k        <= '0;
            singular <= 1'b0;
            state    <= (n == '0) ? S_IDLE : S_PIV;
            done     <= (n == '0);
          end
        end
        S_WAIT: if (fpu_done) state <= ret;
        S_PIV: begin
          if (a[k][k][30:23] == 8'd0) singular <= 1'b1;
          fpu_op <= FP_DIV; fpu_a <= FP_ONE; fpu_b <= a[k][k]; fpu_start <= 1'b1;
          ret <= S_PIV_DONE; state <= S_WAIT;
        end
        S_PIV_DONE: begin
          p       <= fpu_y;
          a[k][k] <= FP_ONE;
          j       <= '0;
          state   <= S_ROW;
        end
        S_ROW: begin
          fpu_op <= FP_MUL; fpu_a <= a[k][j]; fpu_b <= p; fpu_start <= 1'b1;
          ret <= S_ROW_DONE; state <= S_WAIT;
        end
        S_ROW_DONE: begin
          a[k][j] <= fpu_y;
          if (j == n - 1'b1) begin
            i     <= '0;
            state <= S_ELIM_I;
          end else begin
            j     <= j + 1'b1;
            state <= S_ROW;
          end
        end
        S_ELIM_I: begin
          if (i == n) begin
            if (k == n - 1'b1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              k     <= k + 1'b1;
              state <= S_PIV;
            end
          end else if (i == k) begin
            i <= i + 1'b1;
          end else begin
            f       <= a[i][k];
            a[i][k] <= FP_ZERO;
            j       <= '0;
            state   <= S_ELIM_MUL;
          end
        end
        S_ELIM_MUL: begin
          fpu_op <= FP_MUL; fpu_a <= f; fpu_b <= a[k][j]; fpu_start <= 1'b1;
          ret <= S_ELIM_SUB; state <= S_WAIT;
        end
        S_ELIM_SUB: begin
          fpu_op <= FP_SUB; fpu_a <= a[i][j]; fpu_b <= fpu_y; fpu_start <= 1'b1;
          ret <= S_ELIM_DONE; state <= S_WAIT;
        end
        S_ELIM_DONE: begin
          a[i][j] <= fpu_y;
          if (j == n - 1'b1) begin
            i     <= i + 1'b1;
            state <= S_ELIM_I;
          end else begin
            j     <= j + 1'b1;
            state <= S_ELIM_MUL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
