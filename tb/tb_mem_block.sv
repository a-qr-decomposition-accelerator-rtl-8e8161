// tb_mem_block: random writes and reads against an array model: read data one
// cycle after the request, both banks written together, a read of a line
// being written in the same cycle returns the old contents.
module tb_mem_block;
  localparam int LW = 512, L = 64;
  logic clk = 0;
  always #1 clk = ~clk;
  logic re = 0, we = 0;
  logic [5:0] raddr = 0, waddr = 0;
  logic [LW-1:0] rdata, wdata = '0;

  mem_block #(.LINE_W(LW), .LINES(L)) dut (.*);

  int checks = 0, failures = 0;
  logic [LW-1:0] model [L];
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [LW-1:0] rnd();
    logic [LW-1:0] l;
    for (int w = 0; w < LW/32; w++) l[w*32 +: 32] = $urandom;
    return l;
  endfunction
  initial begin
    logic [LW-1:0] exp_q; bit rd_q = 0; int same = 0;
    for (int a = 0; a < L; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = rnd(); model[a] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (rd_q) begin checks++; if (rdata != exp_q) failures++; end
      re = $urandom_range(1); we = $urandom_range(1);
      raddr = 6'($urandom); waddr = (i % 5 == 0) ? raddr : 6'($urandom);
      wdata = rnd();
      if (re && we && raddr == waddr) same++;
      exp_q = model[raddr]; rd_q = re;
      if (we) model[waddr] = wdata;
    end
    @(negedge clk); re = 0; we = 0;
    if (rd_q) begin checks++; if (rdata != exp_q) failures++; end
    checks++; if (same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
