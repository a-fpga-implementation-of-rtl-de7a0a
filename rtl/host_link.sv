// host_link: download and read-back protocol between the host computer and
// the QP solver, carried over the RS232 byte stream.
//
// How it works. The host sends one problem as
//     n (1 byte), mc (1 byte),
//     Q  n x n  row by row,  c  n,  J  mc x n  row by row,  g  mc,
// every number an IEEE single sent as four bytes, least significant byte
// first. The link assembles each word, writes it into the solver's problem
// memory through the solver's load port, and starts the solver after the
// last element of g. When the solver finishes, the link sends back the n
// elements of z in the same four-byte format and waits for the next
// problem. A header with n = 0, n > MAX_N, mc = 0 or mc > MAX_MC is dropped
// and the link waits for a new header.
//
// Interface and timing: rx_data/rx_valid come from the serial receiver;
// tx_data/tx_valid/tx_ready go to the serial transmitter (a byte moves when
// valid and ready are both high). The ld_* and start outputs drive the
// solver; each load write is a one-clock pulse on ld_en. n and mc stay at
// the received sizes until the next header.
//
// The order of the data (Q, then c, J, g, each in single precision) and the
// read-back of z follow the host test suite of the document. The header
// bytes, the byte order and the automatic start are this design's choices.
module host_link
  import mpc_pkg::*;
#(
  parameter int unsigned MAX_N  = 6,
  parameter int unsigned MAX_MC = 80,
  localparam int unsigned NW = $clog2(MAX_N + 1),
  localparam int unsigned MW = $clog2(MAX_MC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // serial byte stream
  input  logic [7:0]    rx_data,
  input  logic          rx_valid,
  output logic [7:0]    tx_data,
  output logic          tx_valid,
  input  logic          tx_ready,
  // solver side
  output logic [NW-1:0] n,
  output logic [MW-1:0] mc,
  output logic          ld_en,
  output ld_sel_e       ld_sel,
  output logic [MW-1:0] ld_row,
  output logic [NW-1:0] ld_col,
  output fp32_t         ld_data,
  output logic          start,
  input  logic          done,
  output logic [NW-1:0] z_idx,
  input  fp32_t         z_data
);

  typedef enum logic [2:0] {L_N, L_MC, L_DATA, L_SOLVE, L_TX, L_TXWAIT} state_e;

  state_e     state;
  logic [1:0] bcnt;        // byte within the current word
  fp32_t      word;
  ld_sel_e    sel;         // array being downloaded
  logic [MW-1:0] row;
  logic [NW-1:0] col;
  logic [7:0] n_byte;

  // Position of the element after (sel,row,col) in download order.
  wire last_col = (col == n - 1'b1);
  wire last_row_q = (row == MW'(n) - 1'b1);
  wire last_row_m = (row == mc - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_N;
      bcnt     <= '0;
      word     <= '0;
      sel      <= LD_Q;
      row      <= '0;
      col      <= '0;
      n_byte   <= '0;
      n        <= '0;
      mc       <= '0;
      ld_en    <= 1'b0;
      ld_sel   <= LD_Q;
      ld_row   <= '0;
      ld_col   <= '0;
      ld_data  <= '0;
      start    <= 1'b0;
      z_idx    <= '0;
      tx_data  <= '0;
      tx_valid <= 1'b0;
    end else begin
      ld_en <= 1'b0;
      start <= 1'b0;
      unique case (state)
        L_N: if (rx_valid) begin
          n_byte <= rx_data;
          state  <= L_MC;
        end
        L_MC: if (rx_valid) begin
          if (n_byte == 8'd0 || 32'(n_byte) > MAX_N || rx_data == 8'd0 || 32'(rx_data) > MAX_MC) begin
            state <= L_N;
          end else begin
            n     <= NW'(n_byte);
            mc    <= MW'(rx_data);
            sel   <= LD_Q;
            row   <= '0;
            col   <= '0;
            bcnt  <= '0;
            state <= L_DATA;
          end
        end
        L_DATA: if (rx_valid) begin
          word <= {rx_data, word[31:8]};
          bcnt <= bcnt + 2'd1;
          if (bcnt == 2'd3) begin
            ld_en   <= 1'b1;
            ld_sel  <= sel;
            ld_row  <= row;
            ld_col  <= col;
            ld_data <= {rx_data, word[31:8]};
            unique case (sel)
              LD_Q: begin
                if (!last_col) col <= col + 1'b1;
                else begin
                  col <= '0;
                  if (last_row_q) begin
                    row <= '0;
                    sel <= LD_C;
                  end else row <= row + 1'b1;
                end
              end
              LD_C: begin
                if (!last_col) col <= col + 1'b1;
                else begin
                  col <= '0;
                  sel <= LD_J;
                end
              end
              LD_J: begin
                if (!last_col) col <= col + 1'b1;
                else begin
                  col <= '0;
                  if (last_row_m) begin
                    row <= '0;
                    sel <= LD_G;
                  end else row <= row + 1'b1;
                end
              end
              LD_G: begin
                if (!last_row_m) row <= row + 1'b1;
                else begin
                  start <= 1'b1;
                  state <= L_SOLVE;
                end
              end
              default: ;
            endcase
          end
        end
        L_SOLVE: if (done) begin
          z_idx <= '0;
          bcnt  <= '0;
          state <= L_TX;
        end
        L_TX: begin
          // one byte of z[z_idx], least significant first
          tx_data  <= z_data[8*bcnt +: 8];
          tx_valid <= 1'b1;
          state    <= L_TXWAIT;
        end
        L_TXWAIT: if (tx_ready) begin
          tx_valid <= 1'b0;
          bcnt     <= bcnt + 2'd1;
          if (bcnt == 2'd3) begin
            if (z_idx == n - 1'b1) state <= L_N;
            else begin
              z_idx <= z_idx + 1'b1;
              state <= L_TX;
            end
          end else state <= L_TX;
        end
        default: state <= L_N;
      endcase
    end
  end

endmodule
