// tb_qrd_accel_top: end-to-end test of the accelerator at its default size
// (16 x 16 real matrix). For each job it loads a matrix (through the
// realifier for complex inputs, or line by line on the host port), starts
// the job through the register bus, waits for done, reads R and Q^T back and
// compares them bit for bit with the reference model in qrd_ref_pkg. For the
// well-scaled inputs it also checks that Q*R reproduces A and that Q is
// orthogonal to within the fixed-point error, and it checks the timing
// contract: 16-cycle engine latency, issue interval 2 inside a stage, the
// 50 us budget at 245.76 MHz (12288 cycles) and the 926-cycle compute bound.
// It counts each mechanism (barrier wait, carried row, pre-rotation,
// saturation, rejected host access, run-time dimension) and fails if one
// never happened.
module tb_qrd_accel_top;
  import qrd_pkg::*;
  import qrd_ref_pkg::*;

  localparam int N  = 16;
  localparam int LW = N * 32;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic csr_we = 0;  logic [7:0] csr_addr = 0;  logic [31:0] csr_wdata = 0, csr_rdata;
  logic host_en = 0, host_we = 0, host_blk = 0;  addr_t host_addr = 0;
  logic [LW-1:0] host_wdata = '0, host_rdata;  logic host_rvalid;
  logic cx_valid = 0, cx_ready;  addr_t cx_row = 0;
  q15_t cx_re [N/2], cx_im [N/2];
  logic busy, done;

  qrd_accel_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(4 * 400000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- timing monitors ------------------------------------------------------
  longint last_issue = -1, issue_q [$];
  int     bad_gap = 0, gaps2 = 0, bad_lat = 0, lat_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.issue) begin
      if (last_issue >= 0 && !dut.u_ctrl.ev_stage && dut.u_ctrl.issued != 0) begin
        if (cyc - last_issue == 2) gaps2++; else bad_gap++;
      end
      last_issue = (dut.u_ctrl.issued + 1 == dut.u_ctrl.pairs) ? -1 : cyc;
      issue_q.push_back(cyc);
    end
    if (dut.eng_valid) begin
      longint t0;
      t0 = issue_q.pop_front();
      lat_seen++;
      if (cyc - t0 != 16) bad_lat++;
    end
  end

  // ---- bus helpers ----------------------------------------------------------
  task automatic csr_write(int a, int d);
    @(negedge clk); csr_we = 1; csr_addr = 8'(a); csr_wdata = d;
    @(negedge clk); csr_we = 0;
  endtask
  task automatic csr_read(int a, output int d);
    @(negedge clk); csr_addr = 8'(a); #1 d = csr_rdata;
  endtask
  task automatic line_write(bit blk, int row, logic [LW-1:0] data);
    @(negedge clk); host_en = 1; host_we = 1; host_blk = blk; host_addr = addr_t'(row);
    host_wdata = data;
    @(negedge clk); host_en = 0; host_we = 0;
  endtask
  task automatic line_read(bit blk, int row, output logic [LW-1:0] data);
    @(negedge clk); host_en = 1; host_we = 0; host_blk = blk; host_addr = addr_t'(row);
    @(negedge clk); host_en = 0;
    #1 data = host_rdata;
  endtask

  // ---- one job -------------------------------------------------------------
  int n_mech_barrier = 0, n_mech_carry = 0, n_mech_flip = 0, n_mech_sat = 0;
  int n_mech_reject = 0, n_mech_small_n = 0, n_mech_realify = 0;

  task automatic run_job(int n, mat_t a, bit via_cx, bit numeric, bit poke_host);
    mat_t r, qt;
    int nsat = 0, nflip = 0, npairs = 0, nstages = 0, ncarry = 0;
    int d, cycles, st;
    logic [LW-1:0] line;
    longint t_start;

    // load
    if (via_cx) begin
      for (int i = 0; i < n / 2; i++) begin
        for (int c = 0; c < N / 2; c++) begin
          cx_re[c] = q15_t'(a[i][c]);
          cx_im[c] = q15_t'(a[i + N/2][c]);
        end
        @(negedge clk); while (!cx_ready) @(negedge clk);
        cx_valid = 1; cx_row = addr_t'(i);
        @(negedge clk); cx_valid = 0;
        @(negedge clk); @(negedge clk);
      end
      // realified matrix as the reference sees it
      for (int i = 0; i < N/2; i++)
        for (int c = 0; c < N/2; c++) begin
          int re, im;
          re = a[i][c]; im = a[i + N/2][c];
          a[i][c] = re;        a[i][c + N/2] = (im == -32768) ? 32767 : -im;
          a[i + N/2][c] = im;  a[i + N/2][c + N/2] = re;
        end
      n_mech_realify++;
    end else begin
      for (int i = 0; i < N; i++) begin
        for (int c = 0; c < N; c++) line[c*32 +: 32] = 32'(signed'(a[i][c]));
        line_write(0, i, line);
      end
    end
    // read back what was loaded
    for (int i = 0; i < n; i++) begin
      bit ok = 1;
      line_read(0, i, line);
      for (int c = 0; c < N; c++) if (int'(signed'(line[c*32 +: 32])) != a[i][c]) ok = 0;
      check(ok, $sformatf("loaded row %0d", i));
    end

    r = a;
    qrd(n, r, qt, nsat, nflip, npairs, nstages, ncarry);

    csr_write(0, (n << 8) | 1);
    t_start = cyc;
    if (poke_host) begin
      repeat (5) @(negedge clk);
      line_write(0, 0, '1);       // must be dropped: the job owns the memory
    end
    while (!done) begin
      @(negedge clk);
      if (cyc - t_start > 100000) break;
    end
    check(done, "done seen");
    csr_read(1, st);
    check(st[1] == 1 && st[0] == 0, "status done, not busy");
    csr_read(2, cycles);
    $display("job n=%0d: %0d cycles (%0.2f us at 245.76 MHz), ref pairs %0d stages %0d",
             n, cycles, cycles / 245.76, npairs, nstages);
    csr_read(3, d);  check(d == npairs, $sformatf("issue count %0d vs %0d", d, npairs));
    check(npairs == n * (n - 1) / 2, "pairs = n(n-1)/2");
    csr_read(4, d);  check(d == nstages, $sformatf("stage count %0d vs %0d", d, nstages));
    csr_read(5, d);  if (d > 0) n_mech_barrier++;
    check(d > 0, "barrier wait cycles counted");
    csr_read(6, d);  check(d == ncarry, "carry count");  if (d > 0) n_mech_carry++;
    csr_read(7, d);  check((d > 0) == (nsat > 0), "saturation seen iff reference saturates");
    if (d > 0) n_mech_sat++;
    csr_read(8, d);  check(d == nflip, $sformatf("flip count %0d vs %0d", d, nflip));
    if (d > 0) n_mech_flip++;
    if (poke_host) begin
      csr_read(9, d); check(d > 0, "host access rejected while busy"); if (d > 0) n_mech_reject++;
    end
    if (n != N) n_mech_small_n++;
    if (n == N) begin
      check(cycles <= 12288, "within 50 us at 245.76 MHz");
      check(cycles >= 926, "not below the compute-only bound");
      for (int j = 0; j < 4; j++) begin
        csr_read(16 + j, d);
        $display("  column %0d: %0d cycles", j, d);
      end
    end

    // compare results
    begin
      int bad = 0;
      real maxe = 0.0, maxo = 0.0;
      int rr [NMAX][NMAX];
      int qq [NMAX][NMAX];
      for (int i = 0; i < n; i++) begin
        line_read(0, i, line);
        for (int c = 0; c < N; c++) begin
          rr[i][c] = int'(signed'(line[c*32 +: 32]));
          if (line[c*32 +: 32] != 32'(signed'(r[i][c]))) bad++;
        end
        line_read(1, i, line);
        for (int c = 0; c < N; c++) begin
          qq[i][c] = int'(signed'(line[c*32 +: 32]));
          if (line[c*32 +: 32] != 32'(signed'(qt[i][c]))) bad++;
        end
      end
      check(bad == 0, $sformatf("bit-exact R and Q^T (%0d words differ)", bad));
      for (int i = 0; i < n; i++)
        for (int c = 0; c < i; c++) check(rr[i][c] == 0, "R upper triangular");
      if (numeric) begin
        for (int i = 0; i < n; i++)
          for (int c = 0; c < n; c++) begin
            real s = 0.0, o = 0.0;
            for (int k = 0; k < n; k++) begin
              s += real'(qq[k][i]) * real'(rr[k][c]);
              o += real'(qq[i][k]) * real'(qq[c][k]);
            end
            s = s / 32768.0 / 32768.0 - real'(a[i][c]) / 32768.0;
            o = o / 32768.0 / 32768.0 - ((i == c) ? 1.0 : 0.0);
            if (s < 0) s = -s;
            if (o < 0) o = -o;
            if (s > maxe) maxe = s;
            if (o > maxo) maxo = o;
          end
        $display("  max |QR-A| = %f, max |Q'Q-I| = %f", maxe, maxo);
        check(maxe < 0.01, "Q*R reproduces A");
        check(maxo < 0.01, "Q orthogonal");
      end
    end
    csr_write(1, 2);
    csr_read(1, st);
    check(st[1] == 0, "done cleared");
  endtask

  function automatic mat_t rand_mat(int amp);
    mat_t m;
    for (int i = 0; i < NMAX; i++)
      for (int c = 0; c < NMAX; c++) m[i][c] = int'($urandom_range(2 * amp)) - amp;
    return m;
  endfunction

  initial begin
    mat_t a;
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");

    // 1: 8x8 complex matrix through the realifier
    a = rand_mat(5000);
    run_job(N, a, 1, 1, 0);
    // 2: real 16x16 matrix, host poke while busy
    a = rand_mat(6000);
    run_job(N, a, 0, 1, 1);
    // 3: the 6x6 example size, an odd size and 8x8
    a = rand_mat(9000);
    run_job(6, a, 0, 1, 0);
    a = rand_mat(9000);
    run_job(5, a, 0, 1, 0);
    // the 8x8 real size of the operation-count table
    a = rand_mat(9000);
    run_job(8, a, 0, 1, 0);
    // 4: full-scale entries: results clamp, checked bit for bit only
    a = rand_mat(32767);
    run_job(N, a, 0, 0, 0);
    // 5: another complex matrix
    a = rand_mat(4000);
    run_job(N, a, 1, 1, 0);

    check(bad_gap == 0 && gaps2 > 0, $sformatf("issue interval 2 inside a stage (%0d ok, %0d bad)", gaps2, bad_gap));
    check(bad_lat == 0 && lat_seen > 0, $sformatf("engine latency 16 (%0d bad of %0d)", bad_lat, lat_seen));
    $display("mechanisms: barrier %0d carry %0d flip %0d sat %0d reject %0d small-n %0d realify %0d",
             n_mech_barrier, n_mech_carry, n_mech_flip, n_mech_sat, n_mech_reject,
             n_mech_small_n, n_mech_realify);
    check(n_mech_barrier > 0, "barrier exercised");
    check(n_mech_carry > 0, "carried row exercised");
    check(n_mech_flip > 0, "pre-rotation exercised");
    check(n_mech_sat > 0, "saturation exercised");
    check(n_mech_reject > 0, "host rejection exercised");
    check(n_mech_small_n > 0, "run-time dimension exercised");
    check(n_mech_realify > 0, "realifier exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
