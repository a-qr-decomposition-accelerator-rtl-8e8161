// rsb: rotation sequence broadcaster. Takes the direction bits that the
// boundary cell decides stage by stage, registers them once so that they
// line up with the rotation lanes (which run one cycle behind the boundary
// cell), and fans them out to GROUPS independent register copies, one per
// group of rotation lanes (the R engine and the Q engine by default).
// Duplicating the register per group keeps each broadcast net local to its
// engine; the duplication is this design's choice.
//
// Timing: a bit presented in cycle t is on every group output in cycle t+1.
// seq_out[g].flip and seq_out[g].dir[k] therefore drive the pre-rotation and
// micro-rotation k of the lanes in group g.
module rsb
  import qrd_pkg::*;
#(
  parameter int GROUPS = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stage_flip,
  input  logic [ITER-1:0] stage_dir,
  output rotseq_t         seq_out [GROUPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < GROUPS; g++) seq_out[g] <= '0;
    end else begin
      for (int g = 0; g < GROUPS; g++) begin
        seq_out[g].flip <= stage_flip;
        seq_out[g].dir  <= stage_dir;
      end
    end
  end

endmodule
