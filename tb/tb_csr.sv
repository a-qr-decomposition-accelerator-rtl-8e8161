// tb_csr: register-bus test of the control, status and counter block: start
// pulse with its dimension, sticky done set by the job and cleared by write,
// every event counter, per-column cycle counts, counters cleared by the next
// start, and start ignored while busy.
module tb_csr;
  import qrd_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic csr_we = 0;  logic [7:0] csr_addr = 0;  logic [31:0] csr_wdata = 0, csr_rdata;
  logic start, done_sticky, busy = 0, done_pulse = 0;
  logic [COL_W:0] n_cfg;
  logic ev_issue = 0, ev_stage = 0, ev_barrier = 0, ev_carry = 0, ev_sat = 0, ev_flip = 0;
  logic ev_reject = 0, ev_col_done = 0;
  logic [COL_W:0] ev_col = 0;

  csr #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic rd(int a, output int d);
    @(negedge clk); csr_addr = 8'(a); #0 d = csr_rdata;
  endtask

  initial begin
    int d, cnt [8];
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(0, d); check(d == (16 << 8), "reset dimension 16");
    // start with n = 6
    @(negedge clk); csr_we = 1; csr_addr = 0; csr_wdata = (6 << 8) | 1;
    #0 check(start && n_cfg == 6, "start pulse carries n");
    @(negedge clk); csr_we = 0; busy = 1;
    #0 check(!start, "start is a pulse");
    // random events for 300 cycles, columns done at known cycles
    cnt = '{default: 0};
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      {ev_issue, ev_stage, ev_barrier, ev_carry, ev_sat, ev_flip, ev_reject} = 7'($urandom);
      ev_col_done = (i == 99 || i == 199);
      ev_col = (i == 99) ? 0 : 1;
      if (ev_issue) cnt[0]++;  if (ev_stage) cnt[1]++;  if (ev_barrier) cnt[2]++;
      if (ev_carry) cnt[3]++;  if (ev_sat) cnt[4]++;  if (ev_flip) cnt[5]++;
      if (ev_reject) cnt[6]++;
      if (i == 150) begin csr_we = 1; csr_addr = 0; csr_wdata = 1; end
      else csr_we = 0;
      check(!start, "no start while busy");
    end
    @(negedge clk);
    {ev_issue, ev_stage, ev_barrier, ev_carry, ev_sat, ev_flip, ev_reject, ev_col_done} = '0;
    done_pulse = 1; busy = 0;
    @(negedge clk); done_pulse = 0;
    rd(1, d); check(d == 2, "done sticky, not busy");
    rd(2, d); check(d == 301, $sformatf("cycles %0d", d));
    rd(3, d); check(d == cnt[0], "issues");
    rd(4, d); check(d == cnt[1], "stages");
    rd(5, d); check(d == cnt[2], "barrier");
    rd(6, d); check(d == cnt[3], "carries");
    rd(7, d); check(d == cnt[4], "sats");
    rd(8, d); check(d == cnt[5], "flips");
    rd(9, d); check(d == cnt[6], "rejects");
    rd(16, d); check(d == 101, $sformatf("column 0 cycles %0d", d));
    rd(17, d); check(d == 100, $sformatf("column 1 cycles %0d", d));
    rd(0, d); check(d == (6 << 8), "dimension kept");
    @(negedge clk); csr_we = 1; csr_addr = 1; csr_wdata = 2;
    @(negedge clk); csr_we = 0;
    rd(1, d); check(d == 0, "done cleared");
    @(negedge clk); csr_we = 1; csr_addr = 0; csr_wdata = (16 << 8) | 1;
    @(negedge clk); csr_we = 0;
    rd(3, d); check(d == 0, "counters cleared by start");
    rd(16, d); check(d == 0, "column counters cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
