// lane_mapper: connects a row pair waiting in the feed buffer to the lanes
// of the QR engine. Each stored 32-bit word holds a sign-extended Q1.15
// element; the mapper takes the low 16 bits of word n of each row line to
// lane n of the R and Q engines, and selects, under control of the pivot
// column (the controller's lane map), the pivot-column elements of the two
// R rows for the boundary cell.
//
// Purely combinational; the QR engine registers its inputs.
module lane_mapper
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic [N*WORD_W-1:0] r_piv_line,
  input  logic [N*WORD_W-1:0] r_tgt_line,
  input  logic [N*WORD_W-1:0] q_piv_line,
  input  logic [N*WORD_W-1:0] q_tgt_line,
  input  logic [COL_W-1:0]    col,
  output q15_t                bc_piv,
  output q15_t                bc_tgt,
  output q15_t                r_piv [N],
  output q15_t                r_tgt [N],
  output q15_t                q_piv [N],
  output q15_t                q_tgt [N]
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      r_piv[n] = q15_t'(r_piv_line[n*WORD_W +: ELEM_W]);
      r_tgt[n] = q15_t'(r_tgt_line[n*WORD_W +: ELEM_W]);
      q_piv[n] = q15_t'(q_piv_line[n*WORD_W +: ELEM_W]);
      q_tgt[n] = q15_t'(q_tgt_line[n*WORD_W +: ELEM_W]);
    end
    bc_piv = q15_t'(r_piv_line[col*WORD_W +: ELEM_W]);
    bc_tgt = q15_t'(r_tgt_line[col*WORD_W +: ELEM_W]);
  end

endmodule
