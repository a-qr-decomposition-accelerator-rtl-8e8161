// writeback_buffer: holds updated row lines until the memory access
// controller commits them. The reorder buffer delivers a whole pair at
// once (pivot and target, each with its R and orthogonal-factor line); the
// buffer stores both as two entries and releases one row per cycle, pivot
// first, through a valid/ready handshake. At the sustained issue interval of
// two cycles per pair, one write per cycle keeps it from filling.
//
// Timing: a pair pushed in cycle t has its pivot row on out_valid in cycle
// t+1 at the earliest and its target row one cycle later. DEPTH rows of
// storage; an assertion guards against overflow.
module writeback_buffer
  import qrd_pkg::*;
#(
  parameter int N     = N_DEF,
  parameter int DEPTH_R = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  addr_t               piv_addr,
  input  addr_t               tgt_addr,
  input  logic [N*WORD_W-1:0] r_piv_line,
  input  logic [N*WORD_W-1:0] r_tgt_line,
  input  logic [N*WORD_W-1:0] q_piv_line,
  input  logic [N*WORD_W-1:0] q_tgt_line,
  output logic                out_valid,
  input  logic                out_ready,
  output addr_t               out_addr,
  output logic [N*WORD_W-1:0] out_r_line,
  output logic [N*WORD_W-1:0] out_q_line,
  output logic                empty
);

  localparam int PW = $clog2(DEPTH_R);

  typedef struct packed {
    addr_t               addr;
    logic [N*WORD_W-1:0] r;
    logic [N*WORD_W-1:0] q;
  } entry_t;

  entry_t        mem [DEPTH_R];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;
  logic          pop;

  assign pop = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (in_valid) wp <= wp + PW'(2);
      if (pop)      rp <= rp + 1'b1;
      count <= count + (in_valid ? (PW+1)'(2) : '0) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[wp]        <= '{addr: piv_addr, r: r_piv_line, q: q_piv_line};
      mem[wp + 1'b1] <= '{addr: tgt_addr, r: r_tgt_line, q: q_tgt_line};
    end
  end

  assign out_valid  = count != 0;
  assign empty      = count == 0;
  assign out_addr   = mem[rp].addr;
  assign out_r_line = mem[rp].r;
  assign out_q_line = mem[rp].q;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> int'(count) + 2 - int'(pop) <= DEPTH_R);

endmodule
