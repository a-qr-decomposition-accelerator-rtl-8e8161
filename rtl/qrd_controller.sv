// qrd_controller: schedule-driven controller of the accelerator. It walks the
// pivot columns left to right and, inside each column, runs the binary-tree
// elimination schedule stage by stage under a hard visibility barrier.
//
// Schedule: for pivot column j of an n x n matrix and stage s (stride
// 2^s), the row pairs are (j + 2k*2^s, j + 2k*2^s + 2^s) for every k whose
// target row is below n. After stage s the surviving rows are the pivots of
// that stage plus an unpaired last row, if any, which is carried over; the
// column ends when 2^s >= n - j. This is the tree schedule of the design
// (column 0 of a 16 x 16 matrix runs 8, 4, 2 and 1 pairs).
//
// Per stage: the controller requests the rows in order, pivot then target,
// one row per cycle; issues each complete pair from the feed buffer to the
// QR engine as soon as it is there (one pair every two cycles, the rate of
// the read port); and counts commit pulses from the memory access
// controller. Only when all 2P rows of the stage are committed does the
// next stage start: no forwarding, no scoreboard.
//
// Job: start (with n) -> identity rows written to the orthogonal factor ->
// columns 0 .. n-2 -> done pulse. One setup cycle precedes every stage and
// every column change. The identity initialisation, the setup cycle and the
// run-time dimension n (2 .. N) are this design's choices.
module qrd_controller
  import qrd_pkg::*;
#(
  parameter int N = N_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [COL_W:0]   n_cfg,
  output logic             busy,
  output logic             done,          // one-cycle pulse at job end
  // identity initialisation
  output logic             init_valid,
  output addr_t            init_addr,
  input  logic             init_ready,
  // row fetch
  output logic             rd_req,
  output addr_t            rd_addr,
  // issue from the feed buffer
  input  logic             pair_avail,
  output logic             issue,
  output logic [COL_W-1:0] lane_map,      // pivot column for the lane mapper
  // write-back commits
  input  logic             wr_commit,
  // events for the performance counters
  output logic             ev_stage,       // a stage started
  output logic             ev_carry,       // a stage started with an unpaired row
  output logic             ev_barrier,     // waiting on commits after the last issue
  output logic             ev_col_done,
  output logic [COL_W:0]   ev_col
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SETUP, S_RUN, S_DONE} state_t;
  state_t state;

  logic [COL_W:0]   n_q;
  logic [COL_W:0]   j;          // pivot column
  logic [COL_W:0]   stride;     // 2^s
  logic [COL_W:0]   pairs;      // P of the current stage
  logic [COL_W:0]   rd_pair;    // pairs requested so far
  logic             rd_tgt;     // next request is the target row
  logic [COL_W:0]   issued;
  logic [COL_W+1:0] committed;
  logic [COL_W:0]   m;          // active rows of column j
  logic [COL_W:0]   active;     // ceil(m / stride)

  always_comb begin
    m = n_q - j;
    active = '0;
    for (int a = 0; a <= N; a++)
      if (a * int'(stride) < int'(m)) active = (COL_W+1)'(a + 1);
  end

  assign busy       = state != S_IDLE;
  assign init_valid = state == S_INIT;
  assign lane_map   = j[COL_W-1:0];
  assign rd_req     = state == S_RUN && rd_pair != pairs;
  assign rd_addr    = addr_t'(int'(j) + 2 * int'(rd_pair) * int'(stride)
                              + (rd_tgt ? int'(stride) : 0));
  assign issue      = state == S_RUN && pair_avail && issued != pairs;
  assign ev_barrier = state == S_RUN && issued == pairs;
  assign ev_stage   = state == S_SETUP && (j + 1 < n_q) && stride < m;
  assign ev_carry   = ev_stage && active[0];
  assign ev_col_done = state == S_SETUP && (j + 1 < n_q) && stride >= m;
  assign ev_col     = j;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      n_q       <= (COL_W+1)'(N);
      j         <= '0;
      stride    <= (COL_W+1)'(1);
      pairs     <= '0;
      rd_pair   <= '0;
      rd_tgt    <= 1'b0;
      issued    <= '0;
      committed <= '0;
      init_addr <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_q       <= (n_cfg < 2 || int'(n_cfg) > N) ? (COL_W+1)'(N) : n_cfg;
          j         <= '0;
          stride    <= (COL_W+1)'(1);
          init_addr <= '0;
          state     <= S_INIT;
        end
        S_INIT: if (init_ready) begin
          init_addr <= init_addr + 1'b1;
          if (int'(init_addr) == int'(n_q) - 1) state <= S_SETUP;
        end
        S_SETUP: begin
          rd_pair   <= '0;
          rd_tgt    <= 1'b0;
          issued    <= '0;
          committed <= '0;
          if (j + 1 >= n_q) begin
            state <= S_DONE;
          end else if (stride >= m) begin
            j      <= j + 1'b1;
            stride <= (COL_W+1)'(1);
          end else begin
            pairs <= active >> 1;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (rd_req) begin
            rd_tgt <= !rd_tgt;
            if (rd_tgt) rd_pair <= rd_pair + 1'b1;
          end
          if (issue) issued <= issued + 1'b1;
          if (wr_commit) begin
            committed <= committed + 1'b1;
            // barrier: the next stage starts only once every row is visible
            if (int'(committed) + 1 == 2 * int'(pairs)) begin
              stride <= stride << 1;
              state  <= S_SETUP;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_commit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && wr_commit) |-> int'(committed) < 2 * int'(pairs));

endmodule
