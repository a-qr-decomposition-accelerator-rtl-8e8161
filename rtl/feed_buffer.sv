// feed_buffer: holds fetched row pairs until the controller issues them to
// the QR engine. Rows arrive from the memory access controller one per cycle,
// always pivot first and target second, each carrying the R line and the
// orthogonal-factor line of the same row. The buffer pairs them up and
// keeps complete pairs in a FIFO of DEPTH_P entries; the controller sees
// pair_avail and pops the head with issue.
//
// Timing: a target row arriving in cycle t makes its pair available in
// cycle t+1. The FIFO must never overflow; the controller fetches at most
// one stage (N/2 pairs) ahead, so DEPTH_P = N/2 is enough. An assertion
// guards it.
module feed_buffer
  import qrd_pkg::*;
#(
  parameter int N       = N_DEF,
  parameter int DEPTH_P = N_DEF / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                row_valid,
  input  addr_t               row_addr,
  input  logic [N*WORD_W-1:0] row_r,
  input  logic [N*WORD_W-1:0] row_q,
  input  logic                issue,
  output logic                pair_avail,
  output addr_t               piv_addr,
  output addr_t               tgt_addr,
  output logic [N*WORD_W-1:0] r_piv_line,
  output logic [N*WORD_W-1:0] r_tgt_line,
  output logic [N*WORD_W-1:0] q_piv_line,
  output logic [N*WORD_W-1:0] q_tgt_line
);

  localparam int PW = $clog2(DEPTH_P);

  typedef struct packed {
    addr_t               piv;
    addr_t               tgt;
    logic [N*WORD_W-1:0] rp;
    logic [N*WORD_W-1:0] rt;
    logic [N*WORD_W-1:0] qp;
    logic [N*WORD_W-1:0] qt;
  } entry_t;

  entry_t          mem [DEPTH_P];
  logic [PW-1:0]   wp, rp;
  logic [PW:0]     count;
  logic            have_piv;
  addr_t           hold_addr;
  logic [N*WORD_W-1:0] hold_r, hold_q;
  logic            push;

  assign push = row_valid && have_piv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      have_piv <= 1'b0;
    end else begin
      if (row_valid) have_piv <= !have_piv;
      if (push) wp <= (int'(wp) == DEPTH_P - 1) ? '0 : wp + 1'b1;
      if (issue && count != 0) rp <= (int'(rp) == DEPTH_P - 1) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(issue && count != 0);
    end
  end

  always_ff @(posedge clk) begin
    if (row_valid && !have_piv) begin
      hold_addr <= row_addr;
      hold_r    <= row_r;
      hold_q    <= row_q;
    end
    if (push) mem[wp] <= '{piv: hold_addr, tgt: row_addr, rp: hold_r, rt: row_r,
                          qp: hold_q, qt: row_q};
  end

  assign pair_avail = count != 0;
  assign piv_addr   = mem[rp].piv;
  assign tgt_addr   = mem[rp].tgt;
  assign r_piv_line = mem[rp].rp;
  assign r_tgt_line = mem[rp].rt;
  assign q_piv_line = mem[rp].qp;
  assign q_tgt_line = mem[rp].qt;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (int'(count) < DEPTH_P || issue));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   issue |-> count != 0);

endmodule
