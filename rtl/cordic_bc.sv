// cordic_bc: boundary cell of the QR engine. Runs CORDIC in vectoring mode
// on the (pivot, target) pair of the pivot column and emits the rotation
// sequence that zeroes the target.
//
// How it works: the input pair is registered, then pre-rotated by 180
// degrees when the pivot is negative (so the vector lies in the right half
// plane, where 12 micro-rotations converge), then driven towards the x axis
// by ITER micro-rotations, each choosing d_k from the sign of y. The
// vectoring mode and the per-iteration choice of d_k follow the CORDIC
// equations of the design; the 180-degree pre-rotation is this design's
// choice. The chosen direction of each stage is exported combinationally on
// stage_dir[k] (and the pre-rotation on stage_flip) in the cycle that stage
// computes, for the rotation sequence broadcaster to register and fan out.
//
// Timing: an input accepted in cycle 0 (in_valid) gives out_valid in cycle
// LAT = 16: 1 input register, 12 iterations (pre-rotation merged with the
// first), 1 gain multiply, 1 round/saturate and 1 alignment register that
// lines the result up with the rotation lanes, which run one cycle behind.
// stage_flip and stage_dir[0] belong to the operation accepted one cycle
// earlier; stage_dir[k] to the one accepted k+1 cycles earlier.
module cordic_bc
  import qrd_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  q15_t            x_in,       // pivot element
  input  q15_t            y_in,       // target element
  output logic            stage_flip,
  output logic [ITER-1:0] stage_dir,
  output logic            out_valid,
  output q15_t            x_out,      // rotated pivot (r)
  output q15_t            y_out,      // rotated target (residual, ~0)
  output logic            sat_event,  // a result was clamped this cycle
  output logic            flip_event  // a valid pair needed the pre-rotation
);

  // input register
  logic b_v;
  q15_t b_x, b_y;
  // iteration registers: s_*[k] holds the state after k+1 micro-rotations
  logic s_v [ITER];
  cw_t  s_x [ITER];
  cw_t  s_y [ITER];
  // gain compensation, rounding and alignment
  logic  p_v, o_v, a_v;
  prod_t p_x, p_y;
  q15_t  o_x, o_y, a_x, a_y;
  logic  o_sat;

  cw_t pre_x, pre_y;

  always_comb begin
    stage_flip = b_x < 0;
    pre_x = stage_flip ? -to_cw(b_x) : to_cw(b_x);
    pre_y = stage_flip ? -to_cw(b_y) : to_cw(b_y);
    stage_dir[0] = pre_y < 0;
    for (int k = 1; k < ITER; k++) stage_dir[k] = s_y[k-1] < 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_v <= 1'b0;
      p_v <= 1'b0;
      o_v <= 1'b0;
      a_v <= 1'b0;
      for (int k = 0; k < ITER; k++) s_v[k] <= 1'b0;
    end else begin
      b_v <= in_valid;
      s_v[0] <= b_v;
      for (int k = 1; k < ITER; k++) s_v[k] <= s_v[k-1];
      p_v <= s_v[ITER-1];
      o_v <= p_v;
      a_v <= o_v;
    end
  end

  always_ff @(posedge clk) begin
    b_x <= x_in;
    b_y <= y_in;
    s_x[0] <= micro_x(pre_x, pre_y, stage_dir[0], 0);
    s_y[0] <= micro_y(pre_x, pre_y, stage_dir[0], 0);
    for (int k = 1; k < ITER; k++) begin
      s_x[k] <= micro_x(s_x[k-1], s_y[k-1], stage_dir[k], k);
      s_y[k] <= micro_y(s_x[k-1], s_y[k-1], stage_dir[k], k);
    end
    p_x <= scale_mul(s_x[ITER-1]);
    p_y <= scale_mul(s_y[ITER-1]);
    o_x <= round_sat(p_x);
    o_y <= round_sat(p_y);
    o_sat <= p_v && (would_sat(p_x) || would_sat(p_y));
    a_x <= o_x;
    a_y <= o_y;
  end

  assign out_valid = a_v;
  assign x_out     = a_x;
  assign y_out     = a_y;
  assign sat_event = o_v && o_sat;
  assign flip_event = b_v && stage_flip;

endmodule
