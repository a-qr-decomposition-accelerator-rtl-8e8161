// tb_writeback_buffer: pushes pairs at most every second cycle while the
// consumer takes rows under a random ready; checks that rows leave in order,
// pivot before target, each with its own R line, Q line and address, and
// that at the issue interval of 2 with a ready consumer one row leaves
// every cycle.
module tb_writeback_buffer;
  import qrd_pkg::*;
  localparam int N = 16;
  localparam int LW = N * WORD_W;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, out_valid, out_ready = 0, empty;
  addr_t piv_addr = 0, tgt_addr = 0, out_addr;
  logic [LW-1:0] r_piv_line = '0, r_tgt_line = '0, q_piv_line = '0, q_tgt_line = '0;
  logic [LW-1:0] out_r_line, out_q_line;

  writeback_buffer #(.N(N), .DEPTH_R(8)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [LW-1:0] pat(int a, int s);
    logic [LW-1:0] l;
    for (int w = 0; w < N; w++) l[w*32 +: 32] = 32'(a * 104729 + w * 17 + s);
    return l;
  endfunction

  int sent = 0, got = 0, cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (out_addr != addr_t'(got) || out_r_line != pat(got, 3) || out_q_line != pat(got, 4)) failures++;
      got++;
    end
  end

  initial begin
    int pend;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (!empty || out_valid) failures++;
    // phase 1: steady state, II = 2, always ready: never more than 2 rows stored
    out_ready = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++; if (int'(dut.count) > 2) failures++;
      in_valid = (i % 2 == 0);
      if (in_valid) begin
        piv_addr = addr_t'(sent); r_piv_line = pat(sent, 3); q_piv_line = pat(sent, 4);
        tgt_addr = addr_t'(sent+1); r_tgt_line = pat(sent+1, 3); q_tgt_line = pat(sent+1, 4);
        sent += 2;
      end
    end
    // phase 2: random ready, pushes only with room
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      pend = sent - got;
      in_valid = (pend <= 4) && $urandom_range(1);
      out_ready = $urandom_range(1);
      if (in_valid) begin
        piv_addr = addr_t'(sent); r_piv_line = pat(sent, 3); q_piv_line = pat(sent, 4);
        tgt_addr = addr_t'(sent+1); r_tgt_line = pat(sent+1, 3); q_tgt_line = pat(sent+1, 4);
        sent += 2;
      end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (12) @(negedge clk);
    checks++; if (got != sent || !empty) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
