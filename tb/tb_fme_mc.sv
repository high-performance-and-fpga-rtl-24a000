// tb_fme_mc: builds a reference window, makes the current macroblock the exact
// quarter-pel interpolation of the window at a chosen vector near the integer start
// vector, and checks that the engine finds that vector with zero cost, that its
// prediction equals the macroblock, and the 576-cycle run time. The interpolation here
// is written independently: a half-pel grid is formed first, and every quarter-pel sample
// is the rounded average of the two half-grid samples around it whose coordinates differ
// in parity (or of the two neighbours along the odd axis).
module tb_fme_mc;
  import svc_pkg::*;
  localparam int SR = 6, W = 16 + 2*SR;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t cur [256];
  pix_t win [W*W];
  logic signed [7:0] mv_x, mv_y;
  logic busy, done;
  logic signed [9:0] qmv_x, qmv_y;
  logic [17:0] cost;
  pix_t pred [256];
  int checks = 0, failures = 0;

  fme_mc #(.SR(SR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gp(int x, int y);
    return int'(win[clip3(0, W-1, y)*W + clip3(0, W-1, x)]);
  endfunction
  function automatic int f6(int x, int y, int dx, int dy);   // 6-tap along (dx,dy)
    int c[6] = '{1, -5, 20, 20, -5, 1};
    int s = 0;
    for (int t = 0; t < 6; t++) s += c[t] * gp(x + (t-2)*dx, y + (t-2)*dy);
    return s;
  endfunction
  // half-grid sample: integer position (hx/2, hy/2) plus half offsets
  function automatic int hg(int hx, int hy);
    int x, y, s;
    x = hx >>> 1; y = hy >>> 1;
    if (!hx[0] && !hy[0]) return gp(x, y);
    if (hx[0] && !hy[0]) return int'(clip1((f6(x, y, 1, 0) + 16) >>> 5));
    if (!hx[0] && hy[0]) return int'(clip1((f6(x, y, 0, 1) + 16) >>> 5));
    s = 0;
    for (int t = 0; t < 6; t++) s += ((t == 0 || t == 5) ? 1 : (t == 1 || t == 4) ? -5 : 20) * f6(x, y + t - 2, 1, 0);
    return int'(clip1((s + 512) >>> 10));
  endfunction
  function automatic int ref_q(int x4, int y4);
    int hx, hy;
    hx = x4 >>> 1; hy = y4 >>> 1;
    if (!x4[0] && !y4[0]) return hg(hx, hy);
    if (x4[0] && !y4[0]) return (hg(hx, hy) + hg(hx+1, hy) + 1) >>> 1;
    if (!x4[0] && y4[0]) return (hg(hx, hy) + hg(hx, hy+1) + 1) >>> 1;
    if (hx[0] != hy[0]) return (hg(hx, hy) + hg(hx+1, hy+1) + 1) >>> 1;
    return (hg(hx+1, hy) + hg(hx, hy+1) + 1) >>> 1;
  endfunction

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int qx, qy, ix, iy;
      // smooth random picture so that the vector is unambiguous
      for (int y = 0; y < W; y++) for (int x = 0; x < W; x++)
        win[y*W+x] = pix_t'((x*x*3 + y*7 + x*y*2 + $urandom_range(0, 40)) & 8'hff);
      ix = $urandom_range(0, 4) - 2; iy = $urandom_range(0, 4) - 2;
      qx = 4*ix + $urandom_range(0, 6) - 3; qy = 4*iy + $urandom_range(0, 6) - 3;
      if (t == 0) begin qx = 4*ix; qy = 4*iy; end
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
        cur[y*16+x] = pix_t'(ref_q(4*(x+SR) + qx, 4*(y+SR) + qy));
      mv_x = 8'(ix); mv_y = 8'(iy);
      @(negedge clk); start = 1; t0 = $time;
      @(negedge clk); start = 0;
      @(posedge done); t1 = $time;
      @(negedge clk);
      checks += 3;
      if ((t1 - t0) / 10 != 576) begin failures++; $display("cycles %0d", (t1-t0)/10); end
      if (cost != 0 || int'(qmv_x) != qx || int'(qmv_y) != qy) begin
        failures++; $display("t%0d got (%0d,%0d) cost %0d expected (%0d,%0d)", t, qmv_x, qmv_y, cost, qx, qy);
      end
      for (int i = 0; i < 256; i++) if (pred[i] != cur[i]) begin failures++; $display("pred %0d", i); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
