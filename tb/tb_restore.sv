// tb_restore: checks the DMA request address and pitch for several macroblock positions,
// the words served on the local read port, and that `done` follows the DMA completion.
module tb_restore;
  import svc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, dma_req, dma_done = 0;
  pix_t mb [256], cp [256];
  logic [7:0] mb_x, mb_y, width_mb;
  logic [31:0] rec_base, dma_ext_addr, dma_pitch;
  logic [4:0] rd_addr;
  logic [63:0] rd_data;
  int checks = 0, failures = 0;
  restore dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < 256; i++) mb[i] = pix_t'($urandom);
      width_mb = 8'($urandom_range(1, 120)); mb_x = 8'($urandom_range(0, width_mb - 1)); mb_y = 8'($urandom_range(0, 67));
      rec_base = $urandom & 32'hffff_ff00;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cp = mb;
      for (int i = 0; i < 256; i++) mb[i] = 8'h00;        // must have been captured
      checks += 3;
      if (!dma_req) failures++;
      if (dma_pitch != 32'(width_mb) * 16) failures++;
      if (dma_ext_addr != rec_base + 32'(mb_y) * 16 * 32'(width_mb) * 16 + 32'(mb_x) * 16) failures++;
      for (int w = 0; w < 32; w++) begin
        rd_addr = 5'(w); #1;
        checks++;
        for (int k = 0; k < 8; k++) if (rd_data[8*k +: 8] != cp[w*8 + k]) begin failures++; break; end
      end
      repeat (5) @(negedge clk);
      checks++; if (done) failures++;
      dma_done = 1; @(negedge clk); dma_done = 0;
      checks += 2;
      if (!done) failures++;
      if (busy) failures++;
    end
    // data check with a known pattern
    for (int i = 0; i < 256; i++) mb[i] = pix_t'(i);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int w = 0; w < 32; w++) begin
      rd_addr = 5'(w); #1;
      checks++;
      for (int k = 0; k < 8; k++) if (rd_data[8*k +: 8] != 8'(w*8 + k)) begin failures++; break; end
    end
    dma_done = 1; @(negedge clk); dma_done = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
