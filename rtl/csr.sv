// csr: configuration, status and performance-counter registers of the
// accelerator, on a simple word-addressed register bus (write strobe,
// address, data; read data combinational on the address).
//
// Map (word addresses):
//   0x00 CTRL      W: bit 0 start (pulse), bits 12:8 dimension n.  R: n.
//   0x01 STATUS    R: bit 0 busy, bit 1 done (sticky). W: bit 1 = 1 clears done.
//   0x02 CYCLES    cycles of the last job, start to done
//   0x03 ISSUES    row pairs issued to the QR engine
//   0x04 STAGES    tree stages run
//   0x05 BARRIER   cycles spent waiting on commits after a stage's last issue
//   0x06 CARRIES   stages that carried an unpaired row
//   0x07 SATS      cycles in which the datapath clamped a result
//   0x08 FLIPS     pairs that needed the 180-degree pre-rotation
//   0x09 REJECTS   host memory requests dropped during a job
//   0x10+j COLCYC  cycles spent on pivot column j
// All counters clear on start. A sticky done bit and per-job cycle counters
// follow the design's description of its control and performance registers;
// the bus, the map and the exact set of counters are this design's choice.
module csr
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             csr_we,
  input  logic [7:0]       csr_addr,
  input  logic [31:0]      csr_wdata,
  output logic [31:0]      csr_rdata,
  output logic             start,
  output logic [COL_W:0]   n_cfg,        // dimension for the job being started
  output logic             done_sticky,
  input  logic             busy,
  input  logic             done_pulse,
  input  logic             ev_issue,
  input  logic             ev_stage,
  input  logic             ev_barrier,
  input  logic             ev_carry,
  input  logic             ev_sat,
  input  logic             ev_flip,
  input  logic             ev_reject,
  input  logic             ev_col_done,
  input  logic [COL_W:0]   ev_col
);

  logic [31:0] cycles, issues, stages, barrier, carries, sats, flips, rejects;
  logic [31:0] col_cyc [N];
  logic [31:0] col_start;
  logic [COL_W:0] n_reg;

  // a start write carries the dimension of its own job
  assign n_cfg = start ? csr_wdata[8 +: COL_W+1] : n_reg;

  assign start = csr_we && csr_addr == 8'h00 && csr_wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_reg       <= (COL_W+1)'(N);
      done_sticky <= 1'b0;
      cycles      <= '0;
      issues      <= '0;
      stages      <= '0;
      barrier     <= '0;
      carries     <= '0;
      sats        <= '0;
      flips       <= '0;
      rejects     <= '0;
      col_start   <= '0;
      for (int c = 0; c < N; c++) col_cyc[c] <= '0;
    end else begin
      if (csr_we && csr_addr == 8'h00 && !busy) n_reg <= csr_wdata[8 +: COL_W+1];
      if (csr_we && csr_addr == 8'h01 && csr_wdata[1]) done_sticky <= 1'b0;
      if (done_pulse) done_sticky <= 1'b1;
      if (start) begin
        done_sticky <= 1'b0;
        cycles  <= '0;
        issues  <= '0;
        stages  <= '0;
        barrier <= '0;
        carries <= '0;
        sats    <= '0;
        flips   <= '0;
        col_start <= '0;
        for (int c = 0; c < N; c++) col_cyc[c] <= '0;
      end else begin
        if (busy) cycles <= cycles + 1;
        if (ev_issue)   issues  <= issues + 1;
        if (ev_stage)   stages  <= stages + 1;
        if (ev_barrier) barrier <= barrier + 1;
        if (ev_carry)   carries <= carries + 1;
        if (ev_sat)     sats    <= sats + 1;
        if (ev_flip)    flips   <= flips + 1;
        if (ev_col_done && int'(ev_col) < N) begin
          col_cyc[ev_col[COL_W-1:0]] <= cycles + 1 - col_start;
          col_start <= cycles + 1;
        end
      end
      if (ev_reject) rejects <= rejects + 1;
    end
  end

  always_comb begin
    csr_rdata = '0;
    unique case (csr_addr)
      8'h00: csr_rdata = 32'(n_reg) << 8;
      8'h01: csr_rdata = {30'd0, done_sticky, busy};
      8'h02: csr_rdata = cycles;
      8'h03: csr_rdata = issues;
      8'h04: csr_rdata = stages;
      8'h05: csr_rdata = barrier;
      8'h06: csr_rdata = carries;
      8'h07: csr_rdata = sats;
      8'h08: csr_rdata = flips;
      8'h09: csr_rdata = rejects;
      default:
        if (csr_addr >= 8'h10 && int'(csr_addr) < 16 + N) csr_rdata = col_cyc[csr_addr[COL_W-1:0]];
    endcase
  end

endmodule
