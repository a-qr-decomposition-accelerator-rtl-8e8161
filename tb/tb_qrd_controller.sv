// tb_qrd_controller: runs the controller against a model of its environment
// (rows arrive one cycle after a read request, a pair is issuable once both
// rows are in, rows are committed a random 17 to 25 cycles after issue) and
// checks: the identity rows requested, the exact sequence of row reads of the
// binary-tree schedule for n = 16, 6, 5 and 2, the pivot column on lane_map,
// issue only with a pair available, the barrier (no row of the next stage
// requested while a row of the current one is uncommitted), the event
// outputs, and done.
module tb_qrd_controller;
  import qrd_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, busy, done, init_valid, init_ready = 0, rd_req, pair_avail, issue;
  logic wr_commit = 0, ev_stage, ev_carry, ev_barrier, ev_col_done;
  logic [COL_W:0] n_cfg = 16, ev_col;
  addr_t init_addr, rd_addr;
  logic [COL_W-1:0] lane_map;

  qrd_controller #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #400000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", m, $time); end
  endtask

  // environment model
  int exp_addr [$], exp_col [$], exp_stage_of [$];
  int rows_in = 0, pairs_ready = 0, cur_stage = -1, outstanding = 0;
  int commit_at [$];
  int cyc = 0, reads = 0, issues = 0, stages = 0, carries = 0, bar = 0, inits = 0;
  int issue_stage [$];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (init_valid && init_ready) begin
      check(int'(init_addr) == inits, "identity row order");
      inits++;
    end
    if (rd_req) begin
      int a, st;
      a = exp_addr.pop_front(); st = exp_stage_of.pop_front();
      check(int'(rd_addr) == a, $sformatf("read address %0d expected %0d", rd_addr, a));
      if (st != cur_stage) begin
        check(outstanding == 0, "barrier: previous stage fully committed");
        cur_stage = st;
      end
      reads++;
      rows_in++;
    end
    if (issue) begin
      int c;
      check(pairs_ready > 0, "issue only with a pair available");
      c = exp_col.pop_front();
      check(int'(lane_map) == c, "lane map is the pivot column");
      pairs_ready--;
      issues++;
      outstanding += 2;
      commit_at.push_back(cyc + 17 + $urandom_range(8));
    end
    if (wr_commit) outstanding--;
    if (ev_stage) stages++;
    if (ev_carry) carries++;
    if (ev_barrier) bar++;
  end
  // rows arrive one cycle after the request; a pair one cycle after its target
  always @(posedge clk) if (rst_n) begin
    if (rows_in >= 2) begin
      pairs_ready++;
      rows_in -= 2;
    end
  end
  assign pair_avail = pairs_ready > 0;
  // commits: two rows per pair, back to back
  int pend_rows = 0;
  always @(negedge clk) begin
    wr_commit = 0;
    if (commit_at.size() > 0 && commit_at[0] <= cyc) begin
      void'(commit_at.pop_front());
      pend_rows += 2;
    end
    if (pend_rows > 0) begin wr_commit = 1; pend_rows--; end
    init_ready = $urandom_range(3) != 0;
  end

  task automatic run(int n);
    int st_id = 0, exp_stages = 0, exp_carries = 0, exp_pairs = 0;
    exp_addr.delete(); exp_col.delete(); exp_stage_of.delete();
    for (int j = 0; j < n - 1; j++)
      for (int s = 1; s < n - j; s *= 2) begin
        exp_stages++;
        if (((n - j + s - 1) / s) % 2) exp_carries++;
        for (int p = j; p + s < n; p += 2 * s) begin
          exp_addr.push_back(p); exp_addr.push_back(p + s);
          exp_stage_of.push_back(st_id); exp_stage_of.push_back(st_id);
          exp_col.push_back(j);
          exp_pairs++;
        end
        st_id++;
      end
    reads = 0; issues = 0; stages = 0; carries = 0; bar = 0; inits = 0; cur_stage = -1;
    @(negedge clk); start = 1; n_cfg = (COL_W+1)'(n);
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after done");
    check(inits == n, "identity rows");
    check(reads == 2 * exp_pairs && exp_addr.size() == 0, "all reads");
    check(issues == exp_pairs && issues == n * (n - 1) / 2, "all pairs issued");
    check(stages == exp_stages, "stage events");
    check(carries == exp_carries, "carry events");
    check(bar > 0, "barrier waits");
    check(outstanding == 0, "all committed");
    $display("n=%0d pairs=%0d stages=%0d carries=%0d barrier cycles=%0d", n, issues, stages, carries, bar);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16);
    run(6);
    run(5);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
