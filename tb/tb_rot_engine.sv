// tb_rot_engine: drives N lanes with random element pairs and one random
// rotation sequence per row pair (bits presented in the cycles the lanes
// need them), and checks every lane's output 16 cycles later against the
// reference rotation.
module tb_rot_engine;
  import qrd_pkg::*;
  import qrd_ref_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0;
  q15_t piv_in [N], tgt_in [N], piv_out [N], tgt_out [N];
  rotseq_t seq = '0;
  logic out_valid, sat_event;

  rot_engine #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  bit        v_at [1024];
  bit        fl_at [1024];
  bit [11:0] d_at [1024];
  int        po_at [1024][N], to_at [1024][N];

  initial begin
    #20000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid != (cyc >= 16 && v_at[cyc-16])) failures++;
    if (cyc >= 16 && v_at[cyc-16])
      for (int n = 0; n < N; n++) begin
        checks++;
        if (int'(piv_out[n]) != po_at[cyc-16][n] || int'(tgt_out[n]) != to_at[cyc-16][n]) failures++;
      end
    cyc++;
  end

  initial begin
    int ns = 0, xo, yo;
    for (int n = 0; n < N; n++) begin piv_in[n] = 0; tgt_in[n] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(1) != 0);
      fl_at[cyc] = 1'($urandom); d_at[cyc] = 12'($urandom);
      for (int n = 0; n < N; n++) begin
        piv_in[n] = q15_t'($urandom); tgt_in[n] = q15_t'($urandom);
        rot(int'(piv_in[n]), int'(tgt_in[n]), fl_at[cyc], d_at[cyc], xo, yo, ns);
        po_at[cyc][n] = xo; to_at[cyc][n] = yo;
      end
      v_at[cyc] = in_valid;
      seq.flip = (cyc >= 2) ? fl_at[cyc-2] : 1'b0;
      for (int k = 0; k < ITER; k++) seq.dir[k] = (cyc >= k + 2) ? d_at[cyc-2-k][k] : 1'b0;
    end
    @(negedge clk); in_valid = 0;
    for (int i = 0; i < 20; i++) begin
      seq.flip = fl_at[cyc-2];
      for (int k = 0; k < ITER; k++) seq.dir[k] = d_at[cyc-2-k][k];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
