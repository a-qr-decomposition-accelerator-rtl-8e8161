// cordic_rot_lane: one rotation lane of the R or Q engine. Applies to one
// (pivot, target) element pair the plane rotation that the boundary cell
// found, by replaying its rotation sequence in CORDIC rotation mode: the
// optional 180-degree pre-rotation and then ITER micro-rotations whose
// directions come from the rotation sequence broadcaster instead of from an
// angle accumulator. Because the lane uses the same arithmetic as the boundary
// cell, a lane fed the pivot-column pair reproduces the boundary cell's
// result bit for bit.
//
// Timing: in_valid/x_in/y_in accepted in cycle 0 give out_valid in cycle
// LAT = 16: input register, alignment register, 12 iterations (the
// pre-rotation merged with the first), gain multiply, round/saturate.
// seq.flip and seq.dir[0] must belong to this pair in cycle 2, seq.dir[k] in
// cycle k+2, which is what the broadcaster delivers.
module cordic_rot_lane
  import qrd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  q15_t    x_in,
  input  q15_t    y_in,
  input  rotseq_t seq,
  output logic    out_valid,
  output q15_t    x_out,
  output q15_t    y_out,
  output logic    sat_event
);

  logic a_v, d_v;
  q15_t a_x, a_y, d_x, d_y;
  logic l_v [ITER];
  cw_t  l_x [ITER];
  cw_t  l_y [ITER];
  logic  p_v, o_v;
  prod_t p_x, p_y;
  q15_t  o_x, o_y;
  logic  o_sat;
  cw_t   pre_x, pre_y;

  always_comb begin
    pre_x = seq.flip ? -to_cw(d_x) : to_cw(d_x);
    pre_y = seq.flip ? -to_cw(d_y) : to_cw(d_y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_v <= 1'b0;
      d_v <= 1'b0;
      p_v <= 1'b0;
      o_v <= 1'b0;
      for (int k = 0; k < ITER; k++) l_v[k] <= 1'b0;
    end else begin
      a_v <= in_valid;
      d_v <= a_v;
      l_v[0] <= d_v;
      for (int k = 1; k < ITER; k++) l_v[k] <= l_v[k-1];
      p_v <= l_v[ITER-1];
      o_v <= p_v;
    end
  end

  always_ff @(posedge clk) begin
    a_x <= x_in;
    a_y <= y_in;
    d_x <= a_x;
    d_y <= a_y;
    l_x[0] <= micro_x(pre_x, pre_y, seq.dir[0], 0);
    l_y[0] <= micro_y(pre_x, pre_y, seq.dir[0], 0);
    for (int k = 1; k < ITER; k++) begin
      l_x[k] <= micro_x(l_x[k-1], l_y[k-1], seq.dir[k], k);
      l_y[k] <= micro_y(l_x[k-1], l_y[k-1], seq.dir[k], k);
    end
    p_x <= scale_mul(l_x[ITER-1]);
    p_y <= scale_mul(l_y[ITER-1]);
    o_x <= round_sat(p_x);
    o_y <= round_sat(p_y);
    o_sat <= would_sat(p_x) || would_sat(p_y);
  end

  assign out_valid = o_v;
  assign x_out     = o_x;
  assign y_out     = o_y;
  assign sat_event = o_v && o_sat;

endmodule
