// tb_itiq4x4: random levels for all qp and the three modes, compared with the H.264
// scaling and inverse-transform equations written here with a V table of this file;
// also a round trip through tq4x4 at low qp, where the reconstructed residual must stay
// within 2 of the original.
module tb_itiq4x4;
  import svc_pkg::*;
  coef_t z [16], r [16], dc, xin [16], w [16], zq [16];
  logic [5:0] qp;
  logic [1:0] dc_mode;
  logic use_dc;
  int checks = 0, failures = 0;
  int vt [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16}, '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  itiq4x4 dut (.*);
  tq4x4 u_fwd (.x(xin), .qp, .dc_mode(2'd0), .intra(1'b1), .w, .z(zq));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void idct(ref int a [4]);
    int b [4];
    b[0] = a[0] + a[2]; b[1] = a[0] - a[2]; b[2] = (a[1] >>> 1) - a[3]; b[3] = a[1] + (a[3] >>> 1);
    a[0] = b[0] + b[3]; a[1] = b[1] + b[2]; a[2] = b[1] - b[2]; a[3] = b[0] - b[3];
  endfunction

  initial begin
    for (int t = 0; t < 600; t++) begin
      int c [4][4], row [4], e;
      dc_mode = 2'(t % 3); qp = 6'(t % 52); use_dc = t[3] && dc_mode == 0;
      dc = coef_t'($urandom_range(0, 4000) - 2000);
      for (int k = 0; k < 16; k++) z[k] = coef_t'(dc_mode == 0 ? $urandom_range(0, 40) - 20 : $urandom_range(0, 16) - 8);
      #1;
      if (dc_mode == 0) begin
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          int cls;
          cls = (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
          c[i][j] = (int'(z[i*4+j]) * vt[qp % 6][cls]) * (1 << (qp / 6));
        end
        if (use_dc) c[0][0] = int'(dc);
        for (int i = 0; i < 4; i++) begin for (int j = 0; j < 4; j++) row[j] = c[i][j]; idct(row); for (int j = 0; j < 4; j++) c[i][j] = row[j]; end
        for (int j = 0; j < 4; j++) begin for (int i = 0; i < 4; i++) row[i] = c[i][j]; idct(row); for (int i = 0; i < 4; i++) c[i][j] = row[i]; end
        for (int k = 0; k < 16; k++) begin
          e = (c[k/4][k%4] + 32) >>> 6;
          checks++;
          if (int'(r[k]) != e) begin failures++; if (failures < 10) $display("m0 qp%0d k%0d %0d %0d", qp, k, r[k], e); end
        end
      end else if (dc_mode == 1) begin
        int hd [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
        int f [4][4], tm [4][4];
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          tm[i][j] = 0; for (int k = 0; k < 4; k++) tm[i][j] += hd[i][k] * int'(z[k*4+j]);
        end
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          f[i][j] = 0; for (int k = 0; k < 4; k++) f[i][j] += tm[i][k] * hd[k][j];
          if (qp >= 36) e = (f[i][j] * vt[qp % 6][0]) << (qp / 6 - 6);
          else e = (f[i][j] * vt[qp % 6][0] * (1 << (qp / 6)) + (1 << (5 - qp / 6))) >>> (6 - qp / 6);
          checks++;
          if (int'(r[i*4+j]) != e) begin failures++; if (failures < 10) $display("m1 qp%0d %0d %0d", qp, r[i*4+j], e); end
        end
      end else begin
        int f [4];
        f[0] = z[0] + z[1] + z[2] + z[3]; f[1] = z[0] - z[1] + z[2] - z[3];
        f[2] = z[0] + z[1] - z[2] - z[3]; f[3] = z[0] - z[1] - z[2] + z[3];
        for (int k = 0; k < 4; k++) begin
          e = ((f[k] * vt[qp % 6][0]) << (qp / 6)) >>> 5;
          checks++;
          if (int'(r[k]) != e) begin failures++; if (failures < 10) $display("m2 %0d %0d", r[k], e); end
        end
      end
    end
    // round trip at low qp
    dc_mode = 0; use_dc = 0;
    for (int t = 0; t < 200; t++) begin
      qp = 6'(t % 4);
      for (int k = 0; k < 16; k++) xin[k] = coef_t'($urandom_range(0, 510) - 255);
      #1;
      z = zq;
      #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (iabs(int'(r[k]) - int'(xin[k])) > 2) begin failures++; if (failures < 10) $display("rt %0d %0d", r[k], xin[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
