// tb_deblock: blocky random macroblocks (flat 4x4 tiles plus noise) with random qp and
// boundary strengths; the whole 20x20 area is filtered here with the H.264 luma
// equations in the same edge order and compared pixel by pixel, together with the
// 128-cycle run time. A case with both picture edges checks that those edges stay put.
module tb_deblock;
  import svc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t mb_in [256], left_in [64], top_in [64], mb_out [256], left_out [64], top_out [64];
  logic left_ok, top_ok, busy, done;
  logic [5:0] qp;
  logic [2:0] bs_v [4], bs_h [4];
  int checks = 0, failures = 0;
  int img [20][20];
  int at [52], bt [52], ct [52][3];
  int nfilt = 0;

  deblock dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int c3(int lo, int hi, int v); return v < lo ? lo : v > hi ? hi : v; endfunction
  function automatic int ab(int v); return v < 0 ? -v : v; endfunction

  // filter samples s[0..7] = p3 p2 p1 p0 q0 q1 q2 q3
  function automatic void fl(ref int s [8], input int bs, input int q);
    int a, b, t0, tc, d, ap, aq, p0, p1, p2, p3, q0, q1, q2, q3;
    p3 = s[0]; p2 = s[1]; p1 = s[2]; p0 = s[3]; q0 = s[4]; q1 = s[5]; q2 = s[6]; q3 = s[7];
    a = at[q]; b = bt[q];
    if (bs == 0 || ab(p0 - q0) >= a || ab(p1 - p0) >= b || ab(q1 - q0) >= b) return;
    nfilt++;
    ap = ab(p2 - p0); aq = ab(q2 - q0);
    if (bs < 4) begin
      t0 = ct[q][bs-1];
      tc = t0 + (ap < b) + (aq < b);
      d = c3(-tc, tc, (4*(q0 - p0) + (p1 - q1) + 4) >>> 3);
      s[3] = c3(0, 255, p0 + d); s[4] = c3(0, 255, q0 - d);
      if (ap < b) s[2] = p1 + c3(-t0, t0, (p2 + ((p0 + q0 + 1) >> 1) - 2*p1) >>> 1);
      if (aq < b) s[5] = q1 + c3(-t0, t0, (q2 + ((p0 + q0 + 1) >> 1) - 2*q1) >>> 1);
    end else begin
      if (ap < b && ab(p0 - q0) < (a / 4 + 2)) begin
        s[3] = (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) / 8;
        s[2] = (p2 + p1 + p0 + q0 + 2) / 4;
        s[1] = (2*p3 + 3*p2 + p1 + p0 + q0 + 4) / 8;
      end else s[3] = (2*p1 + p0 + q1 + 2) / 4;
      if (aq < b && ab(p0 - q0) < (a / 4 + 2)) begin
        s[4] = (p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) / 8;
        s[5] = (p0 + q0 + q1 + q2 + 2) / 4;
        s[6] = (2*q3 + 3*q2 + q1 + q0 + p0 + 4) / 8;
      end else s[4] = (2*q1 + q0 + p1 + 2) / 4;
    end
  endfunction

  initial begin
    int av [36] = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
    int bv [36] = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
    int tj [35][3] = '{'{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},'{1,1,1},'{1,1,1},'{1,1,1},
      '{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},'{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},
      '{3,4,6},'{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},'{8,11,16},'{9,12,18},'{10,13,20},
      '{11,15,23},'{13,17,25}};
    for (int i = 0; i < 52; i++) begin
      at[i] = i < 16 ? 0 : av[i-16]; bt[i] = i < 16 ? 0 : bv[i-16];
      for (int k = 0; k < 3; k++) ct[i][k] = i < 17 ? 0 : tj[i-17][k];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int t0, s [8];
      qp = 6'($urandom_range(20, 51));
      left_ok = (t != 5); top_ok = (t != 5);
      for (int e = 0; e < 4; e++) begin bs_v[e] = 3'($urandom_range(0, 4)); bs_h[e] = 3'($urandom_range(0, 4)); end
      if (t < 4) for (int e = 0; e < 4; e++) begin bs_v[e] = 3'(t + 1); bs_h[e] = 3'(t + 1); end
      for (int y = 0; y < 20; y++) for (int x = 0; x < 20; x++)
        img[y][x] = (y < 4 && x < 4) ? 0 : c3(0, 255, 100 + ((x / 4) * 7 + (y / 4) * 5) % 23 + $urandom_range(0, 3));
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) mb_in[y*16+x] = pix_t'(img[y+4][x+4]);
      for (int y = 0; y < 16; y++) for (int x = 0; x < 4; x++) left_in[y*4+x] = pix_t'(img[y+4][x]);
      for (int y = 0; y < 4; y++) for (int x = 0; x < 16; x++) top_in[y*16+x] = pix_t'(img[y][x+4]);
      // reference
      for (int e = 0; e < 4; e++) for (int l = 0; l < 16; l++) begin
        int bs;
        bs = (e == 0 && !left_ok) ? 0 : int'(bs_v[e]);
        for (int k = 0; k < 8; k++) s[k] = img[4+l][4*e + k];
        fl(s, bs, qp);
        for (int k = 0; k < 8; k++) img[4+l][4*e + k] = s[k];
      end
      for (int e = 0; e < 4; e++) for (int l = 0; l < 16; l++) begin
        int bs;
        bs = (e == 0 && !top_ok) ? 0 : int'(bs_h[e]);
        for (int k = 0; k < 8; k++) s[k] = img[4*e + k][4+l];
        fl(s, bs, qp);
        for (int k = 0; k < 8; k++) img[4*e + k][4+l] = s[k];
      end
      @(negedge clk); start = 1; t0 = $time;
      @(negedge clk); start = 0;
      @(posedge done);
      checks++;
      if (($time - t0) / 10 != 128) begin failures++; $display("cycles %0d", ($time - t0) / 10); end
      @(negedge clk);
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        checks++; if (int'(mb_out[y*16+x]) != img[y+4][x+4]) begin failures++; if (failures < 10) $display("t%0d mb (%0d,%0d) %0d %0d", t, x, y, mb_out[y*16+x], img[y+4][x+4]); end
      end
      for (int y = 0; y < 16; y++) for (int x = 0; x < 4; x++) begin
        checks++; if (int'(left_out[y*4+x]) != img[y+4][x]) failures++;
      end
      for (int y = 0; y < 4; y++) for (int x = 0; x < 16; x++) begin
        checks++; if (int'(top_out[y*16+x]) != img[y][x+4]) failures++;
      end
    end
    checks++;
    if (nfilt < 100) begin failures++; $display("too few filtered lines %0d", nfilt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
