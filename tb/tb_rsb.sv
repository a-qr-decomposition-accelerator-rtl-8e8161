// tb_rsb: drives random direction bits into the broadcaster and checks that
// every group output shows them exactly one cycle later, and that all
// outputs are cleared by reset.
module tb_rsb;
  import qrd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic stage_flip = 0;
  logic [ITER-1:0] stage_dir = 0;
  rotseq_t seq_out [3];

  rsb #(.GROUPS(3)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rotseq_t prev;
    stage_flip = 1; stage_dir = '1;
    repeat (2) @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      checks++; if (seq_out[g] != '0) failures++;
    end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int g = 0; g < 3; g++) begin
        checks++;
        if (i > 0 && seq_out[g] != prev) failures++;
      end
      stage_flip = 1'($urandom); stage_dir = ITER'($urandom);
      prev = '{flip: stage_flip, dir: stage_dir};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
