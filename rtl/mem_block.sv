// mem_block: one on-chip memory block with one read port and one write
// port (1R1W). A line is LINE_W bits (one full matrix row: 16 words of 32
// bits = 64 bytes) and is split over two banks of LINE_W/2 bits that are
// always accessed together, as in the memory organisation of the design:
// two blocks (block 0 holds the input matrix and then R, block 1 the
// orthogonal factor), each 64 lines deep and made of two 256-bit banks.
//
// Timing: a read issued in cycle t returns its line in cycle t+1. A write in
// cycle t is visible to a read issued in cycle t+1 or later; a read of the
// same line in the same cycle returns the old contents (this design's
// choice; the controller never does it).
module mem_block
  import qrd_pkg::*;
#(
  parameter int LINE_W = N_DEF * WORD_W,
  parameter int LINES  = DEPTH
) (
  input  logic              clk,
  input  logic              re,
  input  logic [$clog2(LINES)-1:0] raddr,
  output logic [LINE_W-1:0] rdata,
  input  logic              we,
  input  logic [$clog2(LINES)-1:0] waddr,
  input  logic [LINE_W-1:0] wdata
);

  localparam int BW = LINE_W / 2;

  logic [BW-1:0] bank0 [LINES];
  logic [BW-1:0] bank1 [LINES];

  always_ff @(posedge clk) begin
    if (we) begin
      bank0[waddr] <= wdata[BW-1:0];
      bank1[waddr] <= wdata[LINE_W-1:BW];
    end
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= {bank1[raddr], bank0[raddr]};
  end

endmodule
