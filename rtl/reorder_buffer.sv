// reorder_buffer: turns the lane-wise output of the QR engine back into
// memory row lines. For each finished pair it builds four lines (pivot and
// target rows of R and of the orthogonal factor), each element
// sign-extended to a 32-bit word. In the pivot column the R lines take the
// boundary cell's result: the rotated pivot, and an exact zero for the
// eliminated target element (the CORDIC residual is dropped, which keeps R
// exactly upper triangular; this is this design's choice).
//
// Timing: combinational; the write-back buffer behind it registers the
// lines, so the first row of a pair can be written to memory one cycle after
// it leaves the QR engine (the one-cycle output-to-write offset of the
// design's timing model).
module reorder_buffer
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic                in_valid,
  input  pair_tag_t           in_tag,
  input  q15_t                bc_piv,
  input  q15_t                r_piv [N],
  input  q15_t                r_tgt [N],
  input  q15_t                q_piv [N],
  input  q15_t                q_tgt [N],
  output logic                out_valid,
  output addr_t               piv_addr,
  output addr_t               tgt_addr,
  output logic [N*WORD_W-1:0] r_piv_line,
  output logic [N*WORD_W-1:0] r_tgt_line,
  output logic [N*WORD_W-1:0] q_piv_line,
  output logic [N*WORD_W-1:0] q_tgt_line
);

  function automatic logic [WORD_W-1:0] sext(q15_t v);
    return {{(WORD_W-ELEM_W){v[ELEM_W-1]}}, v};
  endfunction

  always_comb begin
    out_valid = in_valid;
    piv_addr  = in_tag.piv;
    tgt_addr  = in_tag.tgt;
    for (int n = 0; n < N; n++) begin
      if (n == int'(in_tag.col)) begin
        r_piv_line[n*WORD_W +: WORD_W] = sext(bc_piv);
        r_tgt_line[n*WORD_W +: WORD_W] = '0;
      end else begin
        r_piv_line[n*WORD_W +: WORD_W] = sext(r_piv[n]);
        r_tgt_line[n*WORD_W +: WORD_W] = sext(r_tgt[n]);
      end
      q_piv_line[n*WORD_W +: WORD_W] = sext(q_piv[n]);
      q_tgt_line[n*WORD_W +: WORD_W] = sext(q_tgt[n]);
    end
  end

endmodule
