// tb_upsample: random and flat base blocks; the 16x16 output is compared with a 2-D
// convolution computed here directly (outer product of the two 4-tap phase filters over
// the 4x4 base neighbourhood, one rounding at the end), and the run time of 16 cycles.
// A flat block must upsample to the same flat value.
module tb_upsample;
  import svc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  pix_t base [144], up [256];
  int checks = 0, failures = 0;
  int f [2][4] = '{'{-1, 8, 28, -3}, '{-3, 28, 8, -1}};
  upsample dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int b(int x, int y); return int'(base[(y+2)*12 + x+2]); endfunction
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int t0;
      for (int i = 0; i < 144; i++) base[i] = (t == 0) ? 8'd77 : pix_t'($urandom);
      @(negedge clk); start = 1; t0 = $time;
      @(negedge clk); start = 0;
      @(posedge done);
      checks++;
      if (($time - t0) / 10 != 16) begin failures++; $display("cycles %0d", ($time - t0) / 10); end
      @(negedge clk);
      for (int oy = 0; oy < 16; oy++) for (int ox = 0; ox < 16; ox++) begin
        int s, x0, y0, e;
        x0 = (ox % 2) ? ox / 2 - 1 : ox / 2 - 2;
        y0 = (oy % 2) ? oy / 2 - 1 : oy / 2 - 2;
        s = 0;
        for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) s += f[oy % 2][j] * f[ox % 2][i] * b(x0 + i, y0 + j);
        e = (s + 512) >>> 10; e = e < 0 ? 0 : e > 255 ? 255 : e;
        checks++;
        if (int'(up[oy*16+ox]) != e) begin failures++; if (failures < 5) $display("(%0d,%0d) %0d %0d", ox, oy, up[oy*16+ox], e); end
        if (t == 0) begin checks++; if (up[oy*16+ox] != 77) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
