// tb_lane_mapper: random row lines and pivot columns; checks that every lane
// gets the low 16 bits of its word and the boundary cell gets the pivot
// column of the two R rows.
module tb_lane_mapper;
  import qrd_pkg::*;
  localparam int N = 16;
  logic [N*WORD_W-1:0] r_piv_line, r_tgt_line, q_piv_line, q_tgt_line;
  logic [COL_W-1:0] col;
  q15_t bc_piv, bc_tgt, r_piv [N], r_tgt [N], q_piv [N], q_tgt [N];

  lane_mapper #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int w = 0; w < N; w++) begin
        r_piv_line[w*32 +: 32] = $urandom; r_tgt_line[w*32 +: 32] = $urandom;
        q_piv_line[w*32 +: 32] = $urandom; q_tgt_line[w*32 +: 32] = $urandom;
      end
      col = COL_W'($urandom);
      #1;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (r_piv[n] != r_piv_line[n*32 +: 16] || r_tgt[n] != r_tgt_line[n*32 +: 16]
            || q_piv[n] != q_piv_line[n*32 +: 16] || q_tgt[n] != q_tgt_line[n*32 +: 16]) failures++;
      end
      checks++;
      if (bc_piv != r_piv_line[int'(col)*32 +: 16] || bc_tgt != r_tgt_line[int'(col)*32 +: 16]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
