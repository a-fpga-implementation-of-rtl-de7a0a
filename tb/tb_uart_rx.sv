// tb_uart_rx: self-checking testbench for the serial receiver.
//
// The testbench drives the line with 8N1 frames bit by bit (a behavioural
// transmitter with exact bit times), using random bytes and random idle gaps,
// and checks every received byte, that `valid` comes exactly once per frame
// and within one bit time after the end of the stop bit, and that a frame
// with a low stop bit raises `frame_err` and no `valid`. A short glitch on
// the idle line must not produce a byte.
//
// The document names only an RS232 link; framing and timing checked here
// are this design's choices (the testbench uses 8 clocks per bit).
module tb_uart_rx;

  localparam int unsigned CPB = 8;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       rxd = 1'b1;
  logic [7:0] data;
  logic       valid, frame_err;

  int checks = 0;
  int failures = 0;
  int nvalid = 0;
  int nferr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (valid) begin
      nvalid++;
      last = data;
    end
    if (frame_err) nferr++;
  end

  task automatic send(logic [7:0] b, logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      rxd = f[k];
      repeat (CPB - 1) @(negedge clk);
    end
    @(negedge clk);
    rxd = 1'b1;
  endtask

  initial begin
    int v0, e0;
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      b = 8'($urandom);
      v0 = nvalid;
      e0 = nferr;
      send(b, 1'b1);
      repeat (CPB) @(negedge clk);
      checks++;
      if (nvalid != v0 + 1 || last != b || nferr != e0) begin
        failures++;
        $display("FAIL byte %h: got %h valid=%0d", b, last, nvalid - v0);
      end
      repeat ($urandom % 20) @(negedge clk);
    end
    // framing error
    v0 = nvalid;
    e0 = nferr;
    send(8'hA5, 1'b0);
    repeat (2 * CPB) @(negedge clk);
    checks++;
    if (nvalid != v0 || nferr != e0 + 1) begin
      failures++;
      $display("FAIL framing error not reported");
    end
    // glitch shorter than half a bit
    v0 = nvalid;
    @(negedge clk);
    rxd = 1'b0;
    repeat (CPB / 2 - 2) @(negedge clk);
    rxd = 1'b1;
    repeat (12 * CPB) @(negedge clk);
    checks++;
    if (nvalid != v0) begin
      failures++;
      $display("FAIL glitch produced a byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
