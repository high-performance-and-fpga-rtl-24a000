// tb_intra16_pred: a 16x16 luma and an 8x8 chroma instance, random neighbours and every
// availability combination; each mode is compared with the H.264 formulas written out
// here separately for the two sizes (luma plane with 5/64, chroma plane with 34/64,
// chroma DC chosen per 4x4 quarter).
module tb_intra16_pred;
  import svc_pkg::*;
  pix_t t16 [16], l16 [16], t8 [8], l8 [8], corner;
  logic top_ok, left_ok;
  logic [1:0] mode;
  pix_t p16 [256], p8 [64];
  logic ok16, ok8;
  int checks = 0, failures = 0;

  intra16_pred #(.N(16)) u16 (.top(t16), .left(l16), .corner, .top_ok, .left_ok, .mode, .pred(p16), .mode_ok(ok16));
  intra16_pred #(.N(8))  u8  (.top(t8),  .left(l8),  .corner, .top_ok, .left_ok, .mode, .pred(p8),  .mode_ok(ok8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref16(int m, int x, int y);
    int s, h, v, a, b, c;
    case (m)
      0: return t16[x];
      1: return l16[y];
      2: begin
        s = 0;
        for (int i = 0; i < 16; i++) s += (top_ok ? t16[i] : 0) + (left_ok ? l16[i] : 0);
        if (top_ok && left_ok) return (s + 16) >> 5;
        if (top_ok || left_ok) return (s + 8) >> 4;
        return 128;
      end
      default: begin
        h = 0; v = 0;
        for (int i = 1; i <= 8; i++) begin
          h += i * (int'(t16[7+i]) - ((7-i) < 0 ? int'(corner) : int'(t16[7-i])));
          v += i * (int'(l16[7+i]) - ((7-i) < 0 ? int'(corner) : int'(l16[7-i])));
        end
        a = 16 * (l16[15] + t16[15]); b = (5*h + 32) >>> 6; c = (5*v + 32) >>> 6;
        return int'(clip1((a + b*(x-7) + c*(y-7) + 16) >>> 5));
      end
    endcase
  endfunction

  function automatic int ref8(int m, int x, int y);
    int h, v, a, b, c, st, sl, bx, by;
    case (m)
      0: return t8[x];
      1: return l8[y];
      2: begin
        bx = x / 4; by = y / 4; st = 0; sl = 0;
        for (int i = 0; i < 4; i++) begin st += t8[4*bx+i]; sl += l8[4*by+i]; end
        if ((bx == 0 && by == 0) || (bx == 1 && by == 1)) begin
          if (top_ok && left_ok) return (st + sl + 4) >> 3;
          if (top_ok) return (st + 2) >> 2;
          if (left_ok) return (sl + 2) >> 2;
          return 128;
        end
        if (by == 0) begin    // top-right quarter
          if (top_ok) return (st + 2) >> 2;
          if (left_ok) return (sl + 2) >> 2;
          return 128;
        end
        if (left_ok) return (sl + 2) >> 2;   // bottom-left quarter
        if (top_ok) return (st + 2) >> 2;
        return 128;
      end
      default: begin
        h = 0; v = 0;
        for (int i = 1; i <= 4; i++) begin
          h += i * (int'(t8[3+i]) - ((3-i) < 0 ? int'(corner) : int'(t8[3-i])));
          v += i * (int'(l8[3+i]) - ((3-i) < 0 ? int'(corner) : int'(l8[3-i])));
        end
        a = 16 * (l8[7] + t8[7]); b = (34*h + 32) >>> 6; c = (34*v + 32) >>> 6;
        return int'(clip1((a + b*(x-3) + c*(y-3) + 16) >>> 5));
      end
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 80; t++) begin
      for (int i = 0; i < 16; i++) begin t16[i] = pix_t'($urandom); l16[i] = pix_t'($urandom); end
      for (int i = 0; i < 8; i++) begin t8[i] = pix_t'($urandom); l8[i] = pix_t'($urandom); end
      if (t % 5 == 4) for (int i = 0; i < 16; i++) begin t16[i] = pix_t'(i * 16); l16[i] = pix_t'(255 - i * 8); end
      corner = pix_t'($urandom);
      top_ok = t[0]; left_ok = t[1];
      for (int m = 0; m < 4; m++) begin
        bit ok;
        mode = 2'(m);
        #1;
        ok = (m == 2) || (m == 0 && top_ok) || (m == 1 && left_ok) || (m == 3 && top_ok && left_ok);
        checks += 2;
        if (ok16 != ok) failures++;
        if (ok8 != ok) failures++;
        if (ok) begin
          for (int i = 0; i < 256; i++) begin
            checks++;
            if (int'(p16[i]) != ref16(m, i % 16, i / 16)) begin failures++; if (failures < 8) $display("16 m%0d i%0d", m, i); end
          end
          for (int i = 0; i < 64; i++) begin
            checks++;
            if (int'(p8[i]) != ref8(m, i % 8, i / 8)) begin failures++; if (failures < 8) $display("8 m%0d i%0d", m, i); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
