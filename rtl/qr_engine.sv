// qr_engine: the compute core. For one issued row pair it finds the Givens
// rotation that zeroes the target row's element in the pivot column and
// applies it to the whole row pair of R and to the matching row pair of the
// orthogonal factor, all in one fully pipelined pass.
//
// Structure: the boundary cell (cordic_bc) runs vectoring CORDIC on the
// pivot-column pair; the rotation sequence broadcaster (rsb) registers the
// per-stage directions and drives the R engine and the Q engine
// (rot_engine, N rotation lanes each), which replay the rotation on every
// element. The pair's tag (row addresses and pivot column) travels in a
// delay line of the same depth.
//
// Timing: fixed latency LAT = 16 cycles from in_valid to out_valid; a new
// pair may enter every cycle (II = 1 structurally; the memory system limits
// the accelerator to one pair every two cycles).
module qr_engine
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  pair_tag_t in_tag,
  input  q15_t      bc_piv,        // pivot-column element of the pivot row
  input  q15_t      bc_tgt,        // pivot-column element of the target row
  input  q15_t      r_piv [N],
  input  q15_t      r_tgt [N],
  input  q15_t      q_piv [N],
  input  q15_t      q_tgt [N],
  output logic      out_valid,
  output pair_tag_t out_tag,
  output q15_t      bc_piv_out,
  output q15_t      bc_tgt_out,
  output q15_t      r_piv_out [N],
  output q15_t      r_tgt_out [N],
  output q15_t      q_piv_out [N],
  output q15_t      q_tgt_out [N],
  output logic      sat_event,
  output logic      flip_event
);

  logic            stage_flip;
  logic [ITER-1:0] stage_dir;
  rotseq_t         seq [2];
  logic            bc_valid, r_valid, q_valid;
  logic            bc_sat, r_sat, q_sat;

  cordic_bc u_bc (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x_in       (bc_piv),
    .y_in       (bc_tgt),
    .stage_flip (stage_flip),
    .stage_dir  (stage_dir),
    .out_valid  (bc_valid),
    .x_out      (bc_piv_out),
    .y_out      (bc_tgt_out),
    .sat_event  (bc_sat),
    .flip_event (flip_event)
  );

  rsb #(.GROUPS(2)) u_rsb (
    .clk        (clk),
    .rst_n      (rst_n),
    .stage_flip (stage_flip),
    .stage_dir  (stage_dir),
    .seq_out    (seq)
  );

  rot_engine #(.N(N)) u_r_engine (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .piv_in    (r_piv),
    .tgt_in    (r_tgt),
    .seq       (seq[0]),
    .out_valid (r_valid),
    .piv_out   (r_piv_out),
    .tgt_out   (r_tgt_out),
    .sat_event (r_sat)
  );

  rot_engine #(.N(N)) u_q_engine (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .piv_in    (q_piv),
    .tgt_in    (q_tgt),
    .seq       (seq[1]),
    .out_valid (q_valid),
    .piv_out   (q_piv_out),
    .tgt_out   (q_tgt_out),
    .sat_event (q_sat)
  );

  // tag delay line, LAT deep
  pair_tag_t tag_q [LAT];
  always_ff @(posedge clk) begin
    tag_q[0] <= in_tag;
    for (int k = 1; k < LAT; k++) tag_q[k] <= tag_q[k-1];
  end

  assign out_valid = r_valid;
  assign out_tag   = tag_q[LAT-1];
  assign sat_event = bc_sat | r_sat | q_sat;

  // all three pipelines have the same depth
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                              (r_valid == q_valid) && (r_valid == bc_valid));

endmodule
