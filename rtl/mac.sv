// mac: memory access controller. Owns the read and write ports of the two
// memory blocks (block 0: input matrix / R, block 1: orthogonal factor) and
// serves, in order, whole-row requests:
//   - row reads for the feed buffer: one row per cycle, the same row index
//     read from both blocks; the lines come back one cycle later, tagged
//     with their row address;
//   - row write-backs from the write-back buffer: one row per cycle to both
//     blocks (write acceptance interval 1); the cycle after a write the row
//     is visible and a commit pulse tells the controller (commit latency 1);
//   - identity rows for block 1, written at the start of a job so that the
//     orthogonal factor starts as the identity matrix;
//   - host accesses (line reads and writes of either block), served only
//     while no job runs; a host request during a job is dropped and flagged
//     on host_reject.
// Which requests exist and their order follow the design's description of
// the controller; the identity initialisation, the host port and its
// rejection rule are this design's choices.
module mac
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                busy,
  // engine row reads
  input  logic                rd_req,
  input  addr_t               rd_addr,
  output logic                rd_valid,
  output addr_t               rd_addr_out,
  output logic [N*WORD_W-1:0] rd_r_line,
  output logic [N*WORD_W-1:0] rd_q_line,
  // write-back
  input  logic                wb_valid,
  output logic                wb_ready,
  input  addr_t               wb_addr,
  input  logic [N*WORD_W-1:0] wb_r_line,
  input  logic [N*WORD_W-1:0] wb_q_line,
  output logic                wr_commit,
  // identity initialisation of block 1
  input  logic                init_valid,
  output logic                init_ready,
  input  addr_t               init_addr,
  // host
  input  logic                host_en,
  input  logic                host_we,
  input  logic                host_blk,
  input  addr_t               host_addr,
  input  logic [N*WORD_W-1:0] host_wdata,
  output logic                host_rvalid,
  output logic [N*WORD_W-1:0] host_rdata,
  output logic                host_reject,
  // memory ports
  output logic                m_re,
  output addr_t               m_raddr,
  input  logic [N*WORD_W-1:0] m_rdata [2],
  output logic                m_we [2],
  output addr_t               m_waddr [2],
  output logic [N*WORD_W-1:0] m_wdata [2]
);

  logic host_ok;
  logic rd_eng_q, rd_host_q, rd_blk_q;
  addr_t rd_addr_q;
  logic [N*WORD_W-1:0] ident;

  assign host_ok = host_en && !busy;

  always_comb begin
    ident = '0;
    for (int n = 0; n < N; n++)
      if (n == int'(init_addr)) ident[n*WORD_W +: WORD_W] = WORD_W'(32'h7fff);
  end

  // read port: engine reads while busy, host reads while idle
  always_comb begin
    m_re    = (busy && rd_req) || (host_ok && !host_we);
    m_raddr = busy ? rd_addr : host_addr;
  end

  // write ports: write-back first, then identity rows, host when idle
  always_comb begin
    wb_ready   = busy;
    init_ready = busy && !wb_valid;
    for (int b = 0; b < 2; b++) begin
      m_we[b]    = 1'b0;
      m_waddr[b] = wb_addr;
      m_wdata[b] = '0;
    end
    if (busy) begin
      if (wb_valid) begin
        m_we[0] = 1'b1;  m_wdata[0] = wb_r_line;
        m_we[1] = 1'b1;  m_wdata[1] = wb_q_line;
      end else if (init_valid) begin
        m_we[1] = 1'b1;  m_waddr[1] = init_addr;  m_wdata[1] = ident;
      end
    end else if (host_ok && host_we) begin
      m_we[host_blk]    = 1'b1;
      m_waddr[host_blk] = host_addr;
      m_wdata[host_blk] = host_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_eng_q    <= 1'b0;
      rd_host_q   <= 1'b0;
      wr_commit   <= 1'b0;
      host_reject <= 1'b0;
    end else begin
      rd_eng_q    <= busy && rd_req;
      rd_host_q   <= host_ok && !host_we;
      wr_commit   <= busy && wb_valid;
      host_reject <= host_en && busy;
    end
  end

  always_ff @(posedge clk) begin
    rd_addr_q <= rd_addr;
    rd_blk_q  <= host_blk;
  end

  assign rd_valid    = rd_eng_q;
  assign rd_addr_out = rd_addr_q;
  assign rd_r_line   = m_rdata[0];
  assign rd_q_line   = m_rdata[1];
  assign host_rvalid = rd_host_q;
  assign host_rdata  = m_rdata[rd_blk_q];

endmodule
