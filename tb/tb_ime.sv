// tb_ime: random reference windows with a copy of the current macroblock planted at a
// random displacement. The best cost and motion vector of all nine partitions are
// compared with an exhaustive search computed here (same row subsampling, first
// candidate wins ties), and the search time with (2*SR)^2*4 + 3 cycles.
module tb_ime;
  import svc_pkg::*;
  localparam int SR = 6, W = 16 + 2*SR;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t cur [256];
  pix_t win [W*W];
  logic busy, done;
  logic signed [7:0] mv_x [9], mv_y [9];
  logic [17:0] cost [9];
  int checks = 0, failures = 0;

  ime #(.SR(SR), .SUB(1'b1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int part_cost(int p, int dx, int dy);
    int s, q;
    s = 0;
    for (int y = 0; y < 16; y += 2)
      for (int x = 0; x < 16; x++) begin
        q = (y / 8) * 2 + (x / 8);
        if ((p == 0) || (p == 1 && y < 8) || (p == 2 && y >= 8) || (p == 3 && x < 8) ||
            (p == 4 && x >= 8) || (p >= 5 && q == p - 5))
          s += iabs(int'(cur[y*16+x]) - int'(win[(y+dy+SR)*W + x+dx+SR]));
      end
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      int pdx, pdy, t0, t1;
      for (int i = 0; i < 256; i++) cur[i] = pix_t'($urandom);
      for (int i = 0; i < W*W; i++) win[i] = (t == 3) ? 8'd0 : pix_t'($urandom);
      if (t == 3) for (int i = 0; i < 256; i++) cur[i] = 8'd0;   // all ties
      pdx = $urandom_range(0, 2*SR-1) - SR; pdy = $urandom_range(0, 2*SR-1) - SR;
      if (t < 2) for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
        win[(y+pdy+SR)*W + x+pdx+SR] = cur[y*16+x];
      @(negedge clk); start = 1; t0 = $time;
      @(negedge clk); start = 0;
      @(posedge done); t1 = $time;
      @(negedge clk);
      checks++;
      if ((t1 - t0) / 10 != (2*SR)*(2*SR)*4 + 3) begin failures++; $display("cycles %0d", (t1-t0)/10); end
      for (int p = 0; p < 9; p++) begin
        int best, bx, by;
        best = 1 << 30; bx = 0; by = 0;
        for (int dy = -SR; dy < SR; dy++) for (int dx = -SR; dx < SR; dx++) begin
          int c;
          c = part_cost(p, dx, dy);
          if (c < best) begin best = c; bx = dx; by = dy; end
        end
        checks++;
        if (int'(cost[p]) != best || int'(mv_x[p]) != bx || int'(mv_y[p]) != by) begin
          failures++;
          $display("t%0d p%0d got %0d (%0d,%0d) expected %0d (%0d,%0d)", t, p, cost[p], mv_x[p], mv_y[p], best, bx, by);
        end
      end
      if (t < 2) begin checks++; if (cost[0] != 0 || mv_x[0] != pdx || mv_y[0] != pdy) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
