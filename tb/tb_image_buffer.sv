// tb_image_buffer: streams four macroblocks of words while the consumer takes them
// slowly; checks that each delivered macroblock matches the input in order, that the
// input stalls while both banks are full, and that no word is lost.
module tb_image_buffer;
  import svc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, mb_valid, mb_take = 0;
  logic [63:0] in_data;
  pix_t mb [256];
  int checks = 0, failures = 0, stalls = 0;
  pix_t ref_mb [4][256];
  image_buffer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (in_valid && !in_ready) stalls++;
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int m = 0; m < 4; m++) for (int i = 0; i < 256; i++) ref_mb[m][i] = pix_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int m = 0; m < 4; m++) for (int w = 0; w < 32; w++) begin
        @(negedge clk);
        in_valid = 1;
        for (int k = 0; k < 8; k++) in_data[8*k +: 8] = ref_mb[m][w*8 + k];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
      end
      for (int m = 0; m < 4; m++) begin
        @(negedge clk);
        while (!mb_valid) @(negedge clk);
        repeat (100) @(negedge clk);
        checks++;
        for (int i = 0; i < 256; i++) if (mb[i] != ref_mb[m][i]) begin failures++; $display("mb %0d px %0d", m, i); break; end
        mb_take = 1; @(negedge clk); mb_take = 0;
      end
    join
    checks++; if (stalls == 0) begin failures++; $display("no stall"); end
    checks++; if (mb_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
