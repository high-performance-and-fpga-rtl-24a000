// tb_vlc: codes random sparse blocks, rebuilds the expected bit string here as a queue of
// bits (Exp-Golomb written bit by bit), and compares every emitted 32-bit word and the bit
// count; the last partial word is checked after `flush`. Also checks 18 cycles per block.
module tb_vlc;
  import svc_pkg::*;
  logic clk = 0, rst_n = 0, blk_valid = 0, flush = 0;
  coef_t levels [16];
  logic ready, word_valid;
  logic [31:0] word, bit_count;
  int checks = 0, failures = 0;
  bit bits [$];
  int nwords = 0;
  int zz [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  vlc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_ue(int k);
    int n, v;
    v = k + 1; n = 0;
    while ((v >> n) > 1) n++;
    repeat (n) bits.push_back(1'b0);
    for (int i = n; i >= 0; i--) bits.push_back(v[i]);
  endtask

  always @(posedge clk) if (word_valid) begin
    logic [31:0] e;
    e = '0;
    for (int i = 31; i >= 0; i--) e[i] = (bits.size() > 0) ? bits.pop_front() : 1'b0;
    checks++; nwords++;
    if (word !== e) begin failures++; $display("word %h expected %h", word, e); end
  end

  initial begin
    int total, t0, v;
    total = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      int nz, run;
      for (int k = 0; k < 16; k++) levels[k] = ($urandom_range(0, 3) == 0) ? coef_t'($urandom_range(0, 60) - 30) : 0;
      if (b == 3) for (int k = 0; k < 16; k++) levels[k] = 0;
      if (b == 4) begin levels[0] = 2047; levels[15] = -2047; end
      nz = 0; for (int k = 0; k < 16; k++) if (levels[k] != 0) nz++;
      put_ue(nz);
      run = 0;
      for (int k = 0; k < 16; k++) begin
        v = int'(levels[zz[k]]);
        if (v != 0) begin put_ue(run); put_ue(v > 0 ? 2*v - 1 : -2*v); run = 0; end
        else run++;
      end
      while (!ready) @(negedge clk);
      @(negedge clk);
      blk_valid = 1; t0 = $time;
      @(negedge clk); blk_valid = 0;
      while (!ready) @(negedge clk);
      if (b == 0) begin checks++; if (($time - t0) / 10 != 18) begin failures++; $display("cycles %0d", ($time - t0) / 10); end end
    end
    total = nwords * 32 + bits.size();
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (bits.size() != 0) begin failures++; $display("%0d bits left", bits.size()); end
    checks++;
    if (nwords < 20) failures++;
    checks++;
    if (int'(bit_count) != total) begin failures++; $display("bit_count %0d expected %0d", bit_count, total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
