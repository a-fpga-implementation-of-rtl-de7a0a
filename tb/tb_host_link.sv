// tb_host_link: self-checking testbench for the download/read-back protocol.
//
// The testbench plays both neighbours of the link: it delivers the bytes of
// a problem as the serial receiver would (one byte per rx_valid pulse, with
// random gaps), stands in for the solver by recording every load write and
// answering `start` with `done` after a delay, and accepts transmit bytes
// with a ready signal that it toggles at random. It checks that every
// element of Q, c, J and g lands at the right array and index with the
// right value, that start comes once after the last element, that exactly
// 4n bytes come back, least significant first, holding the z the testbench
// put on z_data, and that a header with an illegal size is dropped.
//
// The element order follows the document's host test suite; the header,
// byte order and rejection of illegal sizes are this design's choices.
module tb_host_link;
  import mpc_pkg::*;

  localparam int unsigned MAX_N  = 6;
  localparam int unsigned MAX_MC = 80;
  localparam int unsigned NW = $clog2(MAX_N + 1);
  localparam int unsigned MW = $clog2(MAX_MC + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [7:0]    rx_data = '0;
  logic          rx_valid = 1'b0;
  logic [7:0]    tx_data;
  logic          tx_valid;
  logic          tx_ready = 1'b1;
  logic [NW-1:0] n;
  logic [MW-1:0] mc;
  logic          ld_en;
  ld_sel_e       ld_sel;
  logic [MW-1:0] ld_row;
  logic [NW-1:0] ld_col;
  fp32_t         ld_data;
  logic          start;
  logic          done = 1'b0;
  logic [NW-1:0] z_idx;
  fp32_t         z_data;

  int checks = 0;
  int failures = 0;

  host_link #(.MAX_N(MAX_N), .MAX_MC(MAX_MC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // solver model
  fp32_t q_m [MAX_N][MAX_N];
  fp32_t c_v [MAX_N];
  fp32_t j_m [MAX_MC][MAX_N];
  fp32_t g_v [MAX_MC];
  fp32_t z_v [MAX_N];
  int    nwrites = 0;
  int    nstarts = 0;
  logic [7:0] txq [$];

  assign z_data = z_v[z_idx];

  always @(posedge clk) begin
    if (ld_en) begin
      nwrites++;
      case (ld_sel)
        LD_Q: q_m[ld_row][ld_col] <= ld_data;
        LD_C: c_v[ld_col] <= ld_data;
        LD_J: j_m[ld_row][ld_col] <= ld_data;
        default: g_v[ld_row] <= ld_data;
      endcase
    end
    if (start) nstarts++;
    if (tx_valid && tx_ready) txq.push_back(tx_data);
  end

  // random back-pressure from the transmitter
  always @(negedge clk) tx_ready <= ($urandom % 4) != 0;

  task automatic send_byte(logic [7:0] b);
    @(negedge clk);
    rx_data = b;
    rx_valid = 1'b1;
    @(negedge clk);
    rx_valid = 1'b0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  task automatic send_word(fp32_t w);
    for (int k = 0; k < 4; k++) send_byte(w[8*k +: 8]);
  endtask

  task automatic one_problem(int nn, int mm);
    fp32_t eq [MAX_N][MAX_N];
    fp32_t ec [MAX_N];
    fp32_t ej [MAX_MC][MAX_N];
    fp32_t eg [MAX_MC];
    int    w0, s0, bad;
    fp32_t got;
    w0 = nwrites;
    s0 = nstarts;
    txq.delete();
    send_byte(8'(nn));
    send_byte(8'(mm));
    for (int a = 0; a < nn; a++)
      for (int b = 0; b < nn; b++) begin eq[a][b] = $urandom; send_word(eq[a][b]); end
    for (int a = 0; a < nn; a++) begin ec[a] = $urandom; send_word(ec[a]); end
    for (int i = 0; i < mm; i++)
      for (int a = 0; a < nn; a++) begin ej[i][a] = $urandom; send_word(ej[i][a]); end
    for (int i = 0; i < mm; i++) begin eg[i] = $urandom; send_word(eg[i]); end
    repeat (3) @(negedge clk);
    checks++;
    if (nwrites - w0 != nn * nn + nn + mm * nn + mm || nstarts - s0 != 1) begin
      failures++;
      $display("FAIL writes=%0d starts=%0d", nwrites - w0, nstarts - s0);
    end
    checks++;
    if (32'(n) != nn || 32'(mc) != mm) begin
      failures++;
      $display("FAIL sizes %0d %0d", n, mc);
    end
    bad = 0;
    for (int a = 0; a < nn; a++) begin
      if (ec[a] != c_v[a]) bad++;
      for (int b = 0; b < nn; b++) if (eq[a][b] != q_m[a][b]) bad++;
    end
    for (int i = 0; i < mm; i++) begin
      if (eg[i] != g_v[i]) bad++;
      for (int a = 0; a < nn; a++) if (ej[i][a] != j_m[i][a]) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0d elements misplaced", bad);
    end
    // solver finishes
    for (int a = 0; a < nn; a++) z_v[a] = $urandom;
    repeat (50) @(negedge clk);
    done = 1'b1;
    @(negedge clk);
    done = 1'b0;
    repeat (40 * nn) @(negedge clk);
    checks++;
    if (txq.size() != 4 * nn) begin
      failures++;
      $display("FAIL %0d bytes returned", txq.size());
    end else begin
      for (int a = 0; a < nn; a++) begin
        got = {txq[4*a+3], txq[4*a+2], txq[4*a+1], txq[4*a]};
        checks++;
        if (got != z_v[a]) begin
          failures++;
          $display("FAIL z[%0d] %h expected %h", a, got, z_v[a]);
        end
      end
    end
  endtask

  initial begin
    int w0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one_problem(3, 60);
    one_problem(1, 1);
    one_problem(6, 32);
    one_problem(3, 80);
    // illegal header: n = 7 > MAX_N, then a legal problem must still work
    w0 = nwrites;
    send_byte(8'd7);
    send_byte(8'd5);
    checks++;
    if (nwrites != w0) begin
      failures++;
      $display("FAIL illegal header accepted");
    end
    one_problem(2, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
