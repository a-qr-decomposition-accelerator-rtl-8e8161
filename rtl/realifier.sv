// realifier: turns a complex matrix into the equivalent real matrix the
// accelerator works on. For an NC x NC complex matrix A = Ar + j*Ai it
// produces the 2NC x 2NC real matrix
//     [ Ar  -Ai ]
//     [ Ai   Ar ]
// one complex row at a time: complex row i (NC real parts, NC imaginary
// parts, Q1.15) becomes real row i = [Ar(i,:), -Ai(i,:)] and real row
// i+NC = [Ai(i,:), Ar(i,:)], emitted as two memory-line writes on
// consecutive cycles, each element sign-extended to 32 bits. Negating
// -1.0 saturates to +1 - 2^-15 (the Q1.15 saturation rule).
//
// Handshake: cx_valid/cx_ready; a row is accepted when both are high, the
// first line is written the next cycle and the second the cycle after;
// cx_ready is low meanwhile. The block form of the transform is the
// design's; doing it as a hardware load path is this design's choice.
module realifier
  import qrd_pkg::*;
#(
  parameter int NC = N_DEF / 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cx_valid,
  output logic                   cx_ready,
  input  logic [ADDR_W-1:0]      cx_row,
  input  q15_t                   cx_re [NC],
  input  q15_t                   cx_im [NC],
  output logic                   wr_valid,
  output addr_t                  wr_addr,
  output logic [2*NC*WORD_W-1:0] wr_line
);


  typedef enum logic [1:0] {R_IDLE, R_TOP, R_BOT} rstate_t;
  rstate_t state;
  addr_t row_q;
  q15_t  re_q [NC];
  q15_t  im_q [NC];

  function automatic logic [WORD_W-1:0] sext(q15_t v);
    return {{(WORD_W-ELEM_W){v[ELEM_W-1]}}, v};
  endfunction

  function automatic q15_t neg_sat(q15_t v);
    return (v == q15_t'(16'sh8000)) ? q15_t'(16'sh7fff) : -v;
  endfunction

  assign cx_ready = state == R_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= R_IDLE;
    else unique case (state)
      R_IDLE: if (cx_valid) state <= R_TOP;
      R_TOP:  state <= R_BOT;
      R_BOT:  state <= R_IDLE;
      default: state <= R_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (cx_valid && cx_ready) begin
      row_q <= cx_row;
      re_q  <= cx_re;
      im_q  <= cx_im;
    end
  end

  always_comb begin
    wr_valid = state != R_IDLE;
    wr_addr  = (state == R_BOT) ? row_q + addr_t'(NC) : row_q;
    for (int c = 0; c < NC; c++) begin
      if (state == R_BOT) begin
        wr_line[c*WORD_W +: WORD_W]      = sext(im_q[c]);
        wr_line[(c+NC)*WORD_W +: WORD_W] = sext(re_q[c]);
      end else begin
        wr_line[c*WORD_W +: WORD_W]      = sext(re_q[c]);
        wr_line[(c+NC)*WORD_W +: WORD_W] = sext(neg_sat(im_q[c]));
      end
    end
  end

endmodule
