// tb_intra4x4_pred: random neighbours and availabilities; every mode's prediction is
// compared with the per-mode equations of the H.264 4x4 luma predictor, written here
// in terms of p[x,-1] / p[-1,y] (not with the edge-filter indexing of the block).
module tb_intra4x4_pred;
  import svc_pkg::*;
  pix_t top [8], left [4], corner;
  logic top_ok, left_ok;
  logic [3:0] mode;
  pix_t pred [16];
  logic mode_ok;
  int checks = 0, failures = 0;

  intra4x4_pred dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int p(int x, int y);       // neighbour p[x,y], x or y = -1
    if (x == -1 && y == -1) return int'(corner);
    if (y == -1) return int'(top[x]);
    return int'(left[y]);
  endfunction

  function automatic int ref_pred(int m, int x, int y);
    int z, st, sl;
    case (m)
      0: return p(x, -1);
      1: return p(-1, y);
      2: begin
        st = 0; sl = 0;
        for (int i = 0; i < 4; i++) begin st += p(i, -1); sl += p(-1, i); end
        if (top_ok && left_ok) return (st + sl + 4) >> 3;
        if (top_ok) return (st + 2) >> 2;
        if (left_ok) return (sl + 2) >> 2;
        return 128;
      end
      3: if (x == 3 && y == 3) return (p(6,-1) + 3*p(7,-1) + 2) >> 2;
         else return (p(x+y,-1) + 2*p(x+y+1,-1) + p(x+y+2,-1) + 2) >> 2;
      4: if (x > y) return (p(x-y-2,-1) + 2*p(x-y-1,-1) + p(x-y,-1) + 2) >> 2;
         else if (x < y) return (p(-1,y-x-2) + 2*p(-1,y-x-1) + p(-1,y-x) + 2) >> 2;
         else return (p(0,-1) + 2*p(-1,-1) + p(-1,0) + 2) >> 2;
      5: begin
        z = 2*x - y;
        if (z == 0 || z == 2 || z == 4 || z == 6) return (p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 1) >> 1;
        if (z == 1 || z == 3 || z == 5) return (p(x-(y>>1)-2,-1) + 2*p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 2) >> 2;
        if (z == -1) return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
        return (p(-1,y-1) + 2*p(-1,y-2) + p(-1,y-3) + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z == 0 || z == 2 || z == 4 || z == 6) return (p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 1) >> 1;
        if (z == 1 || z == 3 || z == 5) return (p(-1,y-(x>>1)-2) + 2*p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 2) >> 2;
        if (z == -1) return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
        return (p(x-1,-1) + 2*p(x-2,-1) + p(x-3,-1) + 2) >> 2;
      end
      7: if (y == 0 || y == 2) return (p(x+(y>>1),-1) + p(x+(y>>1)+1,-1) + 1) >> 1;
         else return (p(x+(y>>1),-1) + 2*p(x+(y>>1)+1,-1) + p(x+(y>>1)+2,-1) + 2) >> 2;
      default: begin
        z = x + 2*y;
        if (z == 0 || z == 2 || z == 4) return (p(-1,y+(x>>1)) + p(-1,y+(x>>1)+1) + 1) >> 1;
        if (z == 1 || z == 3) return (p(-1,y+(x>>1)) + 2*p(-1,y+(x>>1)+1) + p(-1,y+(x>>1)+2) + 2) >> 2;
        if (z == 5) return (p(-1,2) + 3*p(-1,3) + 2) >> 2;
        return p(-1,3);
      end
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 8; i++) top[i] = pix_t'($urandom);
      for (int i = 0; i < 4; i++) left[i] = pix_t'($urandom);
      corner = pix_t'($urandom);
      top_ok = (t % 4 != 1); left_ok = (t % 4 != 2);
      if (t % 4 == 3) begin top_ok = 0; left_ok = 0; end
      for (int m = 0; m < 9; m++) begin
        bit ok;
        mode = 4'(m);
        #1;
        ok = (m == 2) || ((m == 0 || m == 3 || m == 7) && top_ok) || ((m == 1 || m == 8) && left_ok) ||
             ((m >= 4 && m <= 6) && top_ok && left_ok);
        checks++;
        if (mode_ok != ok) begin failures++; $display("mode_ok m%0d", m); end
        if (ok) for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          checks++;
          if (int'(pred[y*4+x]) != ref_pred(m, x, y)) begin
            failures++;
            if (failures < 10) $display("m%0d (%0d,%0d) got %0d exp %0d", m, x, y, pred[y*4+x], ref_pred(m, x, y));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
