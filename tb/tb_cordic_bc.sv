// tb_cordic_bc: streams random (pivot, target) pairs into the boundary cell,
// one per cycle with random gaps, and checks against the reference model:
// the rotated pair after exactly 16 cycles, the pre-rotation bit one cycle
// after acceptance and each direction bit d_k k+1 cycles after acceptance.
module tb_cordic_bc;
  import qrd_pkg::*;
  import qrd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0;
  q15_t x_in = 0, y_in = 0;
  logic stage_flip, out_valid, sat_event, flip_event;
  logic [ITER-1:0] stage_dir;
  q15_t x_out, y_out;

  cordic_bc dut (.*);

  int checks = 0, failures = 0, cyc = 0, nflip = 0, nsat_ev = 0;
  // expected values indexed by acceptance cycle
  bit        v_at  [4096];
  bit        fl_at [4096];
  bit [11:0] d_at  [4096];
  int        xo_at [4096], yo_at [4096];

  initial begin
    #20000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0d", m, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    // outputs for pairs accepted earlier
    if (cyc >= 1 && v_at[cyc-1]) begin
      check(stage_flip == fl_at[cyc-1], "flip");
      check(stage_dir[0] == d_at[cyc-1][0], "dir0");
    end
    for (int k = 1; k < ITER; k++)
      if (cyc >= k + 1 && v_at[cyc-k-1]) check(stage_dir[k] == d_at[cyc-k-1][k], $sformatf("dir%0d", k));
    check(out_valid == (cyc >= 16 && v_at[cyc-16]), "out_valid timing");
    if (cyc >= 16 && v_at[cyc-16]) begin
      check(int'(x_out) == xo_at[cyc-16], "x_out");
      check(int'(y_out) == yo_at[cyc-16], "y_out");
    end
    if (flip_event) nflip++;
    if (sat_event) nsat_ev++;
    cyc++;
  end

  initial begin
    int ns = 0;
    bit f; bit [11:0] d; int xo, yo;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      if (i % 7 == 0) begin x_in = q15_t'(-32768); y_in = q15_t'(32767); end
      else begin x_in = q15_t'($urandom); y_in = q15_t'($urandom); end
      if (in_valid) begin
        vec(int'(x_in), int'(y_in), f, d, xo, yo, ns);
        v_at[cyc] = 1; fl_at[cyc] = f; d_at[cyc] = d; xo_at[cyc] = xo; yo_at[cyc] = yo;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    check(nflip > 0, "pre-rotation exercised");
    check(nsat_ev > 0 && ns > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
