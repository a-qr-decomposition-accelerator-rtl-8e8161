// tb_cordic_rot_lane: feeds random element pairs with random rotation
// sequences, presenting each sequence bit in the cycle the lane needs it
// (pre-rotation and d_0 two cycles after acceptance, d_k k+2 cycles after),
// and checks the result 16 cycles after acceptance against the reference
// rotation.
module tb_cordic_rot_lane;
  import qrd_pkg::*;
  import qrd_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0;
  q15_t x_in = 0, y_in = 0;
  rotseq_t seq = '0;
  logic out_valid, sat_event;
  q15_t x_out, y_out;

  cordic_rot_lane dut (.*);

  int checks = 0, failures = 0, cyc = 0, nsat = 0;
  bit        v_at [4096];
  bit        fl_at [4096];
  bit [11:0] d_at [4096];
  int        xo_at [4096], yo_at [4096];

  initial begin
    #20000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid != (cyc >= 16 && v_at[cyc-16])) failures++;
    if (cyc >= 16 && v_at[cyc-16]) begin
      checks++;
      if (int'(x_out) != xo_at[cyc-16] || int'(y_out) != yo_at[cyc-16]) begin
        failures++;
        if (failures < 5) $display("FAIL @%0d got %0d %0d exp %0d %0d", cyc, x_out, y_out, xo_at[cyc-16], yo_at[cyc-16]);
      end
    end
    if (sat_event) nsat++;
    cyc++;
  end

  initial begin
    int ns = 0, xo, yo;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(2) != 0);
      x_in = q15_t'($urandom); y_in = q15_t'($urandom);
      if (in_valid) begin
        fl_at[cyc] = 1'($urandom); d_at[cyc] = 12'($urandom);
        rot(int'(x_in), int'(y_in), fl_at[cyc], d_at[cyc], xo, yo, ns);
        v_at[cyc] = 1; xo_at[cyc] = xo; yo_at[cyc] = yo;
      end
      // sequence bits for the pairs in flight
      seq.flip = (cyc >= 2) ? fl_at[cyc-2] : 1'b0;
      for (int k = 0; k < ITER; k++) seq.dir[k] = (cyc >= k + 2) ? d_at[cyc-2-k][k] : 1'b0;
    end
    @(negedge clk); in_valid = 0;
    for (int i = 0; i < 20; i++) begin
      seq.flip = fl_at[cyc-2];
      for (int k = 0; k < ITER; k++) seq.dir[k] = d_at[cyc-2-k][k];
      @(negedge clk);
    end
    checks++; if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
