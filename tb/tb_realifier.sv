// tb_realifier: random complex rows (including -1.0 imaginary parts) go in;
// checks that real rows i and i+8 come out on consecutive cycles as
// [Re, -Im] and [Im, Re], sign-extended, with -(-1.0) saturated, and that
// the handshake holds off the next row meanwhile.
module tb_realifier;
  import qrd_pkg::*;
  localparam int NC = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic cx_valid = 0, cx_ready, wr_valid;
  logic [ADDR_W-1:0] cx_row = 0;
  q15_t cx_re [NC], cx_im [NC];
  addr_t wr_addr;
  logic [2*NC*WORD_W-1:0] wr_line;

  realifier #(.NC(NC)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] sx(int v); return 32'(v); endfunction

  initial begin
    int re [NC], im [NC], sat = 0;
    for (int c = 0; c < NC; c++) begin cx_re[c] = 0; cx_im[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++; if (!cx_ready || wr_valid) failures++;
      cx_valid = 1; cx_row = ADDR_W'(i % 8);
      for (int c = 0; c < NC; c++) begin
        re[c] = int'(q15_t'($urandom));
        im[c] = ($urandom_range(9) == 0) ? -32768 : int'(q15_t'($urandom));
        if (im[c] == -32768) sat++;
        cx_re[c] = q15_t'(re[c]); cx_im[c] = q15_t'(im[c]);
      end
      @(negedge clk); cx_valid = 0;
      checks++;
      if (!wr_valid || cx_ready || wr_addr != addr_t'(i % 8)) failures++;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (wr_line[c*32 +: 32] != sx(re[c])
            || wr_line[(c+NC)*32 +: 32] != sx(im[c] == -32768 ? 32767 : -im[c])) failures++;
      end
      @(negedge clk);
      checks++;
      if (!wr_valid || wr_addr != addr_t'(i % 8 + NC)) failures++;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (wr_line[c*32 +: 32] != sx(im[c]) || wr_line[(c+NC)*32 +: 32] != sx(re[c])) failures++;
      end
    end
    checks++; if (sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
