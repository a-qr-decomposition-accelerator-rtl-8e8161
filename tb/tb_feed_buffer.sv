// tb_feed_buffer: pushes rows (pivot, target, pivot, ...) with random gaps,
// pops pairs at random times, and checks that each popped pair has the right
// two rows in the right order, that pair_avail is high exactly when a
// complete pair is stored, and that the buffer holds N/2 pairs.
module tb_feed_buffer;
  import qrd_pkg::*;
  localparam int N = 16;
  localparam int LW = N * WORD_W;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic row_valid = 0, issue = 0, pair_avail;
  addr_t row_addr = 0, piv_addr, tgt_addr;
  logic [LW-1:0] row_r = '0, row_q = '0, r_piv_line, r_tgt_line, q_piv_line, q_tgt_line;

  feed_buffer #(.N(N), .DEPTH_P(N/2)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [LW-1:0] pat(int a, int s);
    logic [LW-1:0] l;
    for (int w = 0; w < N; w++) l[w*32 +: 32] = 32'(a * 7919 + w * 31 + s);
    return l;
  endfunction

  initial begin
    int sent = 0, got = 0, stored = 0, half = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill: N/2 full pairs must fit
    for (int i = 0; i < N; i++) begin
      @(negedge clk); row_valid = 1; row_addr = addr_t'(sent); row_r = pat(sent, 1); row_q = pat(sent, 2);
      sent++;
    end
    @(negedge clk); row_valid = 0;
    checks++; if (!pair_avail) failures++;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check head
      if (pair_avail) begin
        checks++;
        if (piv_addr != addr_t'(2*got) || tgt_addr != addr_t'(2*got+1)
            || r_piv_line != pat(2*got, 1) || q_piv_line != pat(2*got, 2)
            || r_tgt_line != pat(2*got+1, 1) || q_tgt_line != pat(2*got+1, 2)) failures++;
      end
      stored = (sent / 2) - got;
      checks++; if (pair_avail != (stored > 0)) failures++;
      issue = pair_avail && $urandom_range(1);
      if (issue) got++;
      row_valid = (stored < N/2 - 1) && $urandom_range(1);
      if (row_valid) begin
        row_addr = addr_t'(sent); row_r = pat(sent, 1); row_q = pat(sent, 2); sent++;
      end
    end
    @(negedge clk); row_valid = 0; issue = 0;
    checks++; if (got < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
