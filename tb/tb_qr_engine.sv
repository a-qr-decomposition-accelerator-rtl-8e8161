// tb_qr_engine: streams random row pairs (one per cycle, with gaps) through
// the QR engine and checks, 16 cycles after each was accepted, the boundary
// cell result, all R and Q lanes and the returned tag against the reference
// model: vectoring on the pivot-column pair, the same rotation on every
// element.
module tb_qr_engine;
  import qrd_pkg::*;
  import qrd_ref_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0;
  pair_tag_t in_tag = '0, out_tag;
  q15_t bc_piv = 0, bc_tgt = 0, bc_piv_out, bc_tgt_out;
  q15_t r_piv [N], r_tgt [N], q_piv [N], q_tgt [N];
  q15_t r_piv_out [N], r_tgt_out [N], q_piv_out [N], q_tgt_out [N];
  logic out_valid, sat_event, flip_event;

  qr_engine #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, nflip = 0;
  bit        v_at [1024];
  pair_tag_t tag_at [1024];
  int        bx_at [1024], by_at [1024];
  int        e_at [1024][4][N];

  initial begin
    #20000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid != (cyc >= 16 && v_at[cyc-16])) failures++;
    if (cyc >= 16 && v_at[cyc-16]) begin
      checks++;
      if (out_tag != tag_at[cyc-16] || int'(bc_piv_out) != bx_at[cyc-16]
          || int'(bc_tgt_out) != by_at[cyc-16]) failures++;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (int'(r_piv_out[n]) != e_at[cyc-16][0][n] || int'(r_tgt_out[n]) != e_at[cyc-16][1][n]
            || int'(q_piv_out[n]) != e_at[cyc-16][2][n] || int'(q_tgt_out[n]) != e_at[cyc-16][3][n]) begin
          failures++;
          if (failures < 5) $display("FAIL lane %0d @%0d", n, cyc);
        end
      end
    end
    if (flip_event) nflip++;
    cyc++;
  end

  initial begin
    int ns = 0, xo, yo;
    bit f; bit [11:0] d;
    for (int n = 0; n < N; n++) begin r_piv[n] = 0; r_tgt[n] = 0; q_piv[n] = 0; q_tgt[n] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_tag = pair_tag_t'($urandom);
      for (int n = 0; n < N; n++) begin
        r_piv[n] = q15_t'($urandom); r_tgt[n] = q15_t'($urandom);
        q_piv[n] = q15_t'($urandom); q_tgt[n] = q15_t'($urandom);
      end
      bc_piv = r_piv[in_tag.col]; bc_tgt = r_tgt[in_tag.col];
      vec(int'(bc_piv), int'(bc_tgt), f, d, xo, yo, ns);
      bx_at[cyc] = xo; by_at[cyc] = yo;
      for (int n = 0; n < N; n++) begin
        rot(int'(r_piv[n]), int'(r_tgt[n]), f, d, xo, yo, ns);
        e_at[cyc][0][n] = xo; e_at[cyc][1][n] = yo;
        rot(int'(q_piv[n]), int'(q_tgt[n]), f, d, xo, yo, ns);
        e_at[cyc][2][n] = xo; e_at[cyc][3][n] = yo;
      end
      v_at[cyc] = in_valid; tag_at[cyc] = in_tag;
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    checks++; if (nflip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
