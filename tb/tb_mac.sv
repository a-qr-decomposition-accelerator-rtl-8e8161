// tb_mac: the memory access controller with two memory blocks. Checks host
// line writes and reads while idle, identity-row initialisation of block 1,
// engine row reads (both blocks, one cycle latency, address returned),
// write-backs to both blocks with a commit pulse one cycle later and
// priority over initialisation, and that host requests during a job are
// rejected and leave the memory untouched.
module tb_mac;
  import qrd_pkg::*;
  localparam int N = 16;
  localparam int LW = N * WORD_W;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic busy = 0;
  logic rd_req = 0, rd_valid;  addr_t rd_addr = 0, rd_addr_out;
  logic [LW-1:0] rd_r_line, rd_q_line;
  logic wb_valid = 0, wb_ready, wr_commit;  addr_t wb_addr = 0;
  logic [LW-1:0] wb_r_line = '0, wb_q_line = '0;
  logic init_valid = 0, init_ready;  addr_t init_addr = 0;
  logic host_en = 0, host_we = 0, host_blk = 0, host_rvalid, host_reject;
  addr_t host_addr = 0;
  logic [LW-1:0] host_wdata = '0, host_rdata;
  logic m_re;  addr_t m_raddr;
  logic [LW-1:0] m_rdata [2];
  logic m_we [2];  addr_t m_waddr [2];  logic [LW-1:0] m_wdata [2];

  mac #(.N(N)) dut (.*);
  for (genvar b = 0; b < 2; b++) begin : g_mem
    mem_block #(.LINE_W(LW), .LINES(DEPTH)) u_mem (.clk, .re(m_re), .raddr(m_raddr),
      .rdata(m_rdata[b]), .we(m_we[b]), .waddr(m_waddr[b]), .wdata(m_wdata[b]));
  end

  int checks = 0, failures = 0;
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [LW-1:0] pat(int a, int s);
    logic [LW-1:0] l;
    for (int w = 0; w < N; w++) l[w*32 +: 32] = 32'(a * 1000 + w + s * 77777);
    return l;
  endfunction
  function automatic logic [LW-1:0] ident(int r);
    logic [LW-1:0] l = '0;
    l[r*32 +: 32] = 32'h7fff;
    return l;
  endfunction
  task automatic hread(bit blk, int a, output logic [LW-1:0] d);
    @(negedge clk); host_en = 1; host_we = 0; host_blk = blk; host_addr = addr_t'(a);
    @(negedge clk); host_en = 0;
    check(host_rvalid, "host_rvalid");
    d = host_rdata;
  endtask

  initial begin
    logic [LW-1:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host fill
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 2; b++) begin
        @(negedge clk); host_en = 1; host_we = 1; host_blk = 1'(b); host_addr = addr_t'(a);
        host_wdata = pat(a, b);
      end
    @(negedge clk); host_en = 0; host_we = 0;
    for (int a = 0; a < 8; a++) begin
      hread(0, a, d); check(d == pat(a, 0), "host read block 0");
      hread(1, a, d); check(d == pat(a, 1), "host read block 1");
    end
    // job: engine reads
    @(negedge clk); busy = 1;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); rd_req = 1; rd_addr = addr_t'(7 - a);
      if (a > 0) check(rd_valid && rd_addr_out == addr_t'(8 - a) && rd_r_line == pat(8 - a, 0)
                       && rd_q_line == pat(8 - a, 1), "engine read");
    end
    @(negedge clk); rd_req = 0;
    check(rd_valid && rd_addr_out == 0 && rd_r_line == pat(0, 0), "last engine read");
    // identity init of rows 8..11 with a write-back competing
    init_valid = 1; init_addr = 8;
    wb_valid = 1; wb_addr = 20; wb_r_line = pat(20, 2); wb_q_line = pat(20, 3);
    #0; check(!init_ready && wb_ready, "write-back before init");
    @(negedge clk); wb_valid = 0;
    check(wr_commit, "commit one cycle after write");
    for (int r = 8; r < 12; r++) begin
      init_addr = addr_t'(r);
      @(negedge clk);
    end
    init_valid = 0;
    check(!wr_commit, "no commit for init");
    // host attempt while busy
    host_en = 1; host_we = 1; host_blk = 0; host_addr = 0; host_wdata = '1;
    @(negedge clk); host_en = 0; host_we = 0;
    check(host_reject, "host rejected while busy");
    @(negedge clk); busy = 0;
    hread(0, 0, d); check(d == pat(0, 0), "rejected write had no effect");
    hread(0, 20, d); check(d == pat(20, 2), "write-back block 0");
    hread(1, 20, d); check(d == pat(20, 3), "write-back block 1");
    for (int r = 8; r < 12; r++) begin
      hread(1, r, d); check(d == ident(r), "identity row");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
