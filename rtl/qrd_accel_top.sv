// qrd_accel_top: QR decomposition accelerator for an N x N real matrix
// (N = 16: an 8 x 8 complex covariance matrix after realification).
//
// A host loads the matrix into memory block 0 (row i at line i, one Q1.15
// element per 32-bit word), either line by line on the host port or one
// complex row at a time through the realifier; sets n and writes start to
// the CSR. The accelerator then runs fire-and-forget: the controller writes
// the identity into block 1, and for every pivot column runs the
// binary-tree stages; in each stage the memory access controller (mac)
// fetches the rows into the feed buffer, the lane mapper hands each pair to
// the QR engine (boundary cell, rotation sequence broadcaster, R and Q
// engines), the reorder buffer rebuilds row lines, and the write-back buffer
// returns them through the mac. The next stage starts only after every row
// of the stage is committed. At the end block 0 holds R (upper triangular)
// and block 1 holds Q transposed (line i is column i of Q), so that
// A = Q * R; done is sticky until cleared or the next start.
//
// Timing: QR engine latency 16 cycles, one pair every 2 cycles (two row
// reads per pair on the 1R1W port), one row written per cycle, commit
// visible one cycle after the write. Host accesses are served only while
// the accelerator is idle; a realifier write takes precedence over a host
// access in the same cycle.
module qrd_accel_top
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  // register bus
  input  logic                csr_we,
  input  logic [7:0]          csr_addr,
  input  logic [31:0]         csr_wdata,
  output logic [31:0]         csr_rdata,
  // host line access to the memory blocks (idle only)
  input  logic                host_en,
  input  logic                host_we,
  input  logic                host_blk,
  input  addr_t               host_addr,
  input  logic [N*WORD_W-1:0] host_wdata,
  output logic                host_rvalid,
  output logic [N*WORD_W-1:0] host_rdata,
  // complex row load through the realifier (idle only)
  input  logic                cx_valid,
  output logic                cx_ready,
  input  addr_t               cx_row,
  input  q15_t                cx_re [N/2],
  input  q15_t                cx_im [N/2],
  // status
  output logic                busy,
  output logic                done
);

  localparam int LW = N * WORD_W;

  // controller
  logic             start, done_pulse;
  logic [COL_W:0]   n_cfg;
  logic             init_valid, init_ready;
  addr_t            init_addr;
  logic             rd_req;
  addr_t            rd_addr;
  logic             pair_avail, issue;
  logic [COL_W-1:0] lane_map;
  logic             wr_commit;
  logic             ev_stage, ev_carry, ev_barrier, ev_col_done;
  logic [COL_W:0]   ev_col;

  // memory
  logic             m_re;
  addr_t            m_raddr;
  logic [LW-1:0]    m_rdata [2];
  logic             m_we [2];
  addr_t            m_waddr [2];
  logic [LW-1:0]    m_wdata [2];

  // read path
  logic             rd_valid;
  addr_t            rd_addr_out;
  logic [LW-1:0]    rd_r_line, rd_q_line;
  addr_t            fb_piv, fb_tgt;
  logic [LW-1:0]    fb_rp, fb_rt, fb_qp, fb_qt;

  // engine; bc_tgt_o (the boundary cell's residual) is left unread because
  // the eliminated element is written back as an exact zero
  q15_t             bc_piv, bc_tgt, bc_piv_o, bc_tgt_o;
  q15_t             r_piv [N], r_tgt [N], q_piv [N], q_tgt [N];
  q15_t             r_piv_o [N], r_tgt_o [N], q_piv_o [N], q_tgt_o [N];
  logic             eng_valid, sat_event, flip_event;
  pair_tag_t        eng_tag;

  // write path
  logic             rob_valid;
  addr_t            rob_piv, rob_tgt;
  logic [LW-1:0]    rob_rp, rob_rt, rob_qp, rob_qt;
  logic             wb_valid, wb_ready, wbb_empty;
  addr_t            wb_addr;
  logic [LW-1:0]    wb_r, wb_q;

  // host side
  logic             rl_valid;
  addr_t            rl_addr;
  logic [LW-1:0]    rl_line;
  logic             h_en, h_we, h_blk, host_reject;
  addr_t            h_addr;
  logic [LW-1:0]    h_wdata;

  csr #(.N(N)) u_csr (
    .clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata,
    .start, .n_cfg, .done_sticky(done), .busy, .done_pulse,
    .ev_issue(issue), .ev_stage, .ev_barrier, .ev_carry,
    .ev_sat(sat_event), .ev_flip(flip_event), .ev_reject(host_reject),
    .ev_col_done, .ev_col
  );

  qrd_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .n_cfg, .busy, .done(done_pulse),
    .init_valid, .init_addr, .init_ready,
    .rd_req, .rd_addr, .pair_avail, .issue, .lane_map, .wr_commit,
    .ev_stage, .ev_carry, .ev_barrier, .ev_col_done, .ev_col
  );

  realifier #(.NC(N/2)) u_realifier (
    .clk, .rst_n, .cx_valid(cx_valid && !busy), .cx_ready, .cx_row, .cx_re, .cx_im,
    .wr_valid(rl_valid), .wr_addr(rl_addr), .wr_line(rl_line)
  );

  always_comb begin
    h_en    = rl_valid || host_en;
    h_we    = rl_valid || host_we;
    h_blk   = rl_valid ? 1'b0 : host_blk;
    h_addr  = rl_valid ? rl_addr : host_addr;
    h_wdata = rl_valid ? rl_line : host_wdata;
  end

  mac #(.N(N)) u_mac (
    .clk, .rst_n, .busy,
    .rd_req, .rd_addr, .rd_valid, .rd_addr_out, .rd_r_line, .rd_q_line,
    .wb_valid, .wb_ready, .wb_addr, .wb_r_line(wb_r), .wb_q_line(wb_q), .wr_commit,
    .init_valid, .init_ready, .init_addr,
    .host_en(h_en), .host_we(h_we), .host_blk(h_blk), .host_addr(h_addr),
    .host_wdata(h_wdata), .host_rvalid, .host_rdata, .host_reject,
    .m_re, .m_raddr, .m_rdata, .m_we, .m_waddr, .m_wdata
  );

  for (genvar b = 0; b < 2; b++) begin : g_mem
    mem_block #(.LINE_W(LW), .LINES(DEPTH)) u_mem (
      .clk, .re(m_re), .raddr(m_raddr), .rdata(m_rdata[b]),
      .we(m_we[b]), .waddr(m_waddr[b]), .wdata(m_wdata[b])
    );
  end

  feed_buffer #(.N(N), .DEPTH_P(N/2)) u_fb (
    .clk, .rst_n, .row_valid(rd_valid), .row_addr(rd_addr_out),
    .row_r(rd_r_line), .row_q(rd_q_line), .issue, .pair_avail,
    .piv_addr(fb_piv), .tgt_addr(fb_tgt),
    .r_piv_line(fb_rp), .r_tgt_line(fb_rt), .q_piv_line(fb_qp), .q_tgt_line(fb_qt)
  );

  lane_mapper #(.N(N)) u_lane_map (
    .r_piv_line(fb_rp), .r_tgt_line(fb_rt), .q_piv_line(fb_qp), .q_tgt_line(fb_qt),
    .col(lane_map), .bc_piv, .bc_tgt, .r_piv, .r_tgt, .q_piv, .q_tgt
  );

  qr_engine #(.N(N)) u_engine (
    .clk, .rst_n, .in_valid(issue),
    .in_tag('{piv: fb_piv, tgt: fb_tgt, col: lane_map}),
    .bc_piv, .bc_tgt, .r_piv, .r_tgt, .q_piv, .q_tgt,
    .out_valid(eng_valid), .out_tag(eng_tag),
    .bc_piv_out(bc_piv_o), .bc_tgt_out(bc_tgt_o),
    .r_piv_out(r_piv_o), .r_tgt_out(r_tgt_o), .q_piv_out(q_piv_o), .q_tgt_out(q_tgt_o),
    .sat_event, .flip_event
  );

  reorder_buffer #(.N(N)) u_rob (
    .in_valid(eng_valid), .in_tag(eng_tag), .bc_piv(bc_piv_o),
    .r_piv(r_piv_o), .r_tgt(r_tgt_o), .q_piv(q_piv_o), .q_tgt(q_tgt_o),
    .out_valid(rob_valid), .piv_addr(rob_piv), .tgt_addr(rob_tgt),
    .r_piv_line(rob_rp), .r_tgt_line(rob_rt), .q_piv_line(rob_qp), .q_tgt_line(rob_qt)
  );

  writeback_buffer #(.N(N), .DEPTH_R(8)) u_wbb (
    .clk, .rst_n, .in_valid(rob_valid), .piv_addr(rob_piv), .tgt_addr(rob_tgt),
    .r_piv_line(rob_rp), .r_tgt_line(rob_rt), .q_piv_line(rob_qp), .q_tgt_line(rob_qt),
    .out_valid(wb_valid), .out_ready(wb_ready), .out_addr(wb_addr),
    .out_r_line(wb_r), .out_q_line(wb_q), .empty(wbb_empty)
  );

  // the barrier leaves nothing behind: a job ends with an empty write-back buffer
  a_drained: assert property (@(posedge clk) disable iff (!rst_n) done_pulse |-> wbb_empty);

endmodule
