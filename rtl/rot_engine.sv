// rot_engine: a bank of N parallel CORDIC rotation lanes. The accelerator
// uses two of them: the R engine rotates the two rows of the matrix being
// triangularised and the Q engine rotates the matching two rows of the
// orthogonal factor, both with the rotation sequence of the same pair.
// Lane n takes element n of the pivot row and of the target row.
//
// Timing: the latency of one lane, LAT = 16 cycles, one row pair accepted
// per cycle at most. sat_event is high in a cycle where any lane clamped
// its result to the Q1.15 range.
module rot_engine
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  q15_t    piv_in [N],
  input  q15_t    tgt_in [N],
  input  rotseq_t seq,
  output logic    out_valid,
  output q15_t    piv_out [N],
  output q15_t    tgt_out [N],
  output logic    sat_event
);

  // all lanes see the same valid, so only lane 0's copy is read
  logic [N-1:0] lane_valid;
  logic [N-1:0] lane_sat;

  for (genvar n = 0; n < N; n++) begin : g_lane
    cordic_rot_lane u_lane (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .x_in      (piv_in[n]),
      .y_in      (tgt_in[n]),
      .seq       (seq),
      .out_valid (lane_valid[n]),
      .x_out     (piv_out[n]),
      .y_out     (tgt_out[n]),
      .sat_event (lane_sat[n])
    );
  end

  assign out_valid = lane_valid[0];
  assign sat_event = |lane_sat;

endmodule
