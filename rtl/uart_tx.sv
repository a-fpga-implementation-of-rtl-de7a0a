// uart_tx: RS232 serial transmitter (8 data bits, no parity, 1 stop bit)
// that returns results from the accelerator to the host computer.
//
// How it works: a byte accepted on the valid/ready handshake is framed as
// start bit (0), eight data bits least significant first, stop bit (1), and
// shifted out holding each bit for CLKS_PER_BIT clocks. The line idles high.
//
// Interface and timing: `ready` is high when idle; a byte is taken on a
// clock where `valid` and `ready` are both high, and the start bit appears
// on `txd` on the next clock. A frame lasts 10 * CLKS_PER_BIT clocks, after
// which `ready` rises again.
//
// The settings (8N1, 115200 baud at the 20 MHz system clock, so
// CLKS_PER_BIT = 174) are this design's choices; the document only specifies
// an RS232 link.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 174
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;   // stop, data[7:0], start; bit 0 goes out first
  logic [3:0]    left;    // bits still to send, 0 when idle
  logic [CW-1:0] cnt;

  assign ready = (left == 4'd0);
  assign txd   = ready ? 1'b1 : frame[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1;
      left  <= '0;
      cnt   <= '0;
    end else if (ready) begin
      if (valid) begin
        frame <= {1'b1, data, 1'b0};
        left  <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      frame <= {1'b1, frame[9:1]};
      left  <= left - 4'd1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
