// tb_reorder_buffer: random lane outputs and tags; checks that the four row
// lines hold the sign-extended lane values, that the pivot column carries
// the boundary cell's pivot and an exact zero for the target, and that the
// valid flag and row addresses follow the tag.
module tb_reorder_buffer;
  import qrd_pkg::*;
  localparam int N = 16;
  logic in_valid = 0, out_valid;
  pair_tag_t in_tag = '0;
  q15_t bc_piv = 0, r_piv [N], r_tgt [N], q_piv [N], q_tgt [N];
  addr_t piv_addr, tgt_addr;
  logic [N*WORD_W-1:0] r_piv_line, r_tgt_line, q_piv_line, q_tgt_line;

  reorder_buffer #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] sx(q15_t v); return 32'(signed'(v)); endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      in_valid = 1'($urandom); in_tag = pair_tag_t'($urandom); bc_piv = q15_t'($urandom);
      for (int n = 0; n < N; n++) begin
        r_piv[n] = q15_t'($urandom); r_tgt[n] = q15_t'($urandom);
        q_piv[n] = q15_t'($urandom); q_tgt[n] = q15_t'($urandom);
      end
      #1;
      checks++;
      if (out_valid != in_valid || piv_addr != in_tag.piv || tgt_addr != in_tag.tgt) failures++;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (n == int'(in_tag.col)) begin
          if (r_piv_line[n*32 +: 32] != sx(bc_piv) || r_tgt_line[n*32 +: 32] != 0) failures++;
        end else if (r_piv_line[n*32 +: 32] != sx(r_piv[n]) || r_tgt_line[n*32 +: 32] != sx(r_tgt[n])) failures++;
        if (q_piv_line[n*32 +: 32] != sx(q_piv[n]) || q_tgt_line[n*32 +: 32] != sx(q_tgt[n])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
