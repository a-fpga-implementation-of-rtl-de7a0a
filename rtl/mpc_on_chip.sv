// mpc_on_chip: constrained model predictive control solver on a chip.
//
// At every sampling instant the controller must solve the quadratic program
//     minimise 1/2 z'Qz + c'z  subject to  Jz <= g
// whose solution z holds the optimal future input moves; only the first is
// applied to the plant. This top level is the programmable-logic side of a
// hardware-in-the-loop set-up: the host (plant simulation, state estimate
// and QP set-up) sends Q, c, J and g over an RS232 line, the chip solves the
// QP with an infeasible primal-dual interior point method in IEEE single
// precision, and sends z back.
//
// Structure: uart_rx -> host_link -> ipm_qp_solver (fp_unit, mat_inv with its
// own fp_unit) -> host_link -> uart_tx. All arithmetic is sequential, one
// floating point operation at a time, as in the document's implementation.
//
// Interface: rxd/txd are the serial lines (8N1, CLKS_PER_BIT clocks per
// bit). The status outputs show whether a solve is running, whether the last
// solve converged, whether the inversion core met a zero pivot, how many
// interior point iterations and how many clocks it took (the figures of
// merit of the design, at a 20 MHz system clock).
//
// Defaults: up to MAX_N = 6 unknowns and MAX_MC = 80 constraints (the
// largest problems the document runs: the 6-variable, 32-constraint test
// problems and the aircraft controller with 3 unknowns and 80 constraints).
module mpc_on_chip
  import mpc_pkg::*;
#(
  parameter int unsigned MAX_N        = 6,
  parameter int unsigned MAX_MC       = 80,
  parameter int unsigned MAX_ITER     = 50,
  parameter int unsigned CLKS_PER_BIT = 174
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic        txd,
  output logic        busy,
  output logic        converged,
  output logic        singular,
  output logic [7:0]  iterations,
  output logic [31:0] cycles,
  output logic        rx_frame_err
);

  localparam int unsigned NW = $clog2(MAX_N + 1);
  localparam int unsigned MW = $clog2(MAX_MC + 1);

  logic [7:0]    rx_data, tx_data;
  logic          rx_valid, tx_valid, tx_ready;
  logic [NW-1:0] n, ld_col, z_idx;
  logic [MW-1:0] mc, ld_row;
  logic          ld_en, start, done;
  ld_sel_e       ld_sel;
  fp32_t         ld_data, z_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid), .frame_err(rx_frame_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd
  );

  host_link #(.MAX_N(MAX_N), .MAX_MC(MAX_MC)) u_link (
    .clk, .rst_n,
    .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .n, .mc, .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data,
    .start, .done, .z_idx, .z_data
  );

  ipm_qp_solver #(.MAX_N(MAX_N), .MAX_MC(MAX_MC), .MAX_ITER(MAX_ITER)) u_solver (
    .clk, .rst_n, .n, .mc,
    .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data,
    .start, .busy, .done, .converged, .singular, .iterations, .cycles,
    .z_idx, .z_data
  );

endmodule
