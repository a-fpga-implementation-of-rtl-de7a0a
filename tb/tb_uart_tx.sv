// tb_uart_tx: self-checking testbench for the serial transmitter.
//
// Random bytes are offered on the valid/ready handshake, sometimes back to
// back. A sampler in the testbench finds each start bit, samples the line in
// the middle of every bit time and checks the data bits, the stop bit, the
// frame length of 10 * CLKS_PER_BIT clocks (ready must stay low exactly
// that long) and that the line idles high.
//
// The document names only an RS232 link; framing and timing checked here
// are this design's choices (the testbench uses 6 clocks per bit).
module tb_uart_tx;

  localparam int unsigned CPB = 6;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] data = '0;
  logic       valid = 1'b0;
  logic       ready, txd;

  int checks = 0;
  int failures = 0;
  logic [7:0] sent [$];

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line sampler
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (rst_n && !txd) begin
        repeat (CPB / 2) @(negedge clk);
        checks++;
        if (txd) begin
          failures++;
          $display("FAIL start bit too short");
        end
        for (int k = 0; k < 8; k++) begin
          repeat (CPB) @(negedge clk);
          b[k] = txd;
        end
        repeat (CPB) @(negedge clk);
        checks++;
        if (!txd) begin
          failures++;
          $display("FAIL stop bit low");
        end
        checks++;
        if (sent.size() == 0 || sent[0] != b) begin
          failures++;
          $display("FAIL got %h", b);
        end
        if (sent.size() != 0) void'(sent.pop_front());
        repeat (CPB / 2 - 1) @(negedge clk);
      end
    end
  end

  initial begin
    int busy_clks;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (!txd || !ready) begin
      failures++;
      $display("FAIL not idle after reset");
    end
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      data = 8'($urandom);
      valid = 1'b1;
      sent.push_back(data);
      @(negedge clk);
      valid = 1'b0;
      busy_clks = 0;
      while (!ready) begin
        busy_clks++;
        @(negedge clk);
      end
      checks++;
      if (busy_clks != 10 * CPB) begin
        failures++;
        $display("FAIL frame took %0d clocks", busy_clks);
      end
      if (t % 3 == 0) repeat ($urandom % 30) @(negedge clk);
    end
    repeat (3 * CPB) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("FAIL %0d bytes never seen", sent.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
