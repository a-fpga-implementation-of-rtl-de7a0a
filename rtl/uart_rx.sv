// uart_rx: RS232 serial receiver (8 data bits, no parity, 1 stop bit) for
// the link between the host computer and the accelerator.
//
// How it works: the line is brought into the clock domain by two flip-flops.
// A falling edge starts a frame; the receiver waits half a bit time, checks
// that the line is still low (a real start bit), then samples the eight data
// bits (least significant first) and the stop bit in the middle of each bit
// time, counting CLKS_PER_BIT clocks per bit.
//
// Interface and timing: `valid` pulses for one clock, and `data` holds the
// byte from then on, right after the stop bit has been sampled, that is
// about 9.5 bit times after the start edge. `frame_err` pulses instead of
// `valid` when the stop bit is low (the byte is dropped).
//
// The document specifies an RS232 link between the host and the FPGA board
// but not its settings. 8N1 framing and 115200 baud at the 20 MHz system
// clock (CLKS_PER_BIT = 174) are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 174
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: begin
          cnt <= '0;
          if (!sync[1]) state <= R_START;
        end
        R_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= sync[1] ? R_IDLE : R_DATA;
          end else cnt <= cnt + 1'b1;
        end
        R_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {sync[1], shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end else cnt <= cnt + 1'b1;
        end
        R_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= R_IDLE;
            if (sync[1]) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
