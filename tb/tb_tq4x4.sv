// tb_tq4x4: random residual blocks and DC sets over all qp values; coefficients are
// compared with matrix products computed here (Cf*X*Cf', H*X*H/2, the 2x2 Hadamard) and
// levels with the quantiser formula using an MF table held in this file.
module tb_tq4x4;
  import svc_pkg::*;
  coef_t x [16], w [16], z [16];
  logic [5:0] qp;
  logic [1:0] dc_mode;
  logic intra;
  int checks = 0, failures = 0;
  int cf [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  int hd [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
  int mft [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                     '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};

  tq4x4 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      int m [4][4], tmp [4][4], res [4][4];
      int qb, f;
      dc_mode = 2'(t % 3); qp = 6'(t % 52); intra = t[2];
      for (int k = 0; k < 16; k++)
        x[k] = coef_t'(dc_mode == 0 ? $urandom_range(0, 510) - 255 : $urandom_range(0, 8160) - 4080);
      if (dc_mode == 2) for (int k = 4; k < 16; k++) x[k] = 0;
      #1;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) m[i][j] = int'(x[i*4+j]);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        tmp[i][j] = 0;
        for (int k = 0; k < 4; k++) tmp[i][j] += (dc_mode == 1 ? hd[i][k] : cf[i][k]) * m[k][j];
      end
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        res[i][j] = 0;
        for (int k = 0; k < 4; k++) res[i][j] += tmp[i][k] * (dc_mode == 1 ? hd[j][k] : cf[j][k]);
        if (dc_mode == 1) res[i][j] = res[i][j] >>> 1;
      end
      if (dc_mode == 2) begin
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) res[i][j] = 0;
        res[0][0] = m[0][0] + m[0][1] + m[0][2] + m[0][3];
        res[0][1] = m[0][0] - m[0][1] + m[0][2] - m[0][3];
        res[0][2] = m[0][0] + m[0][1] - m[0][2] - m[0][3];
        res[0][3] = m[0][0] - m[0][1] - m[0][2] + m[0][3];
      end
      qb = 15 + qp / 6;
      f = intra ? (1 << qb) / 3 : (1 << qb) / 6;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        longint a;
        int lv, cls;
        cls = (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
        a = (res[i][j] < 0) ? -res[i][j] : res[i][j];
        if (dc_mode == 0) lv = int'((a * mft[qp % 6][cls] + f) >> qb);
        else lv = int'((a * mft[qp % 6][0] + 2 * f) >> (qb + 1));
        if (res[i][j] < 0) lv = -lv;
        checks += 2;
        if (int'(w[i*4+j]) != res[i][j]) begin failures++; if (failures < 10) $display("w m%0d (%0d,%0d) %0d %0d", dc_mode, i, j, w[i*4+j], res[i][j]); end
        if (int'(z[i*4+j]) != lv) begin failures++; if (failures < 10) $display("z m%0d (%0d,%0d) %0d %0d", dc_mode, i, j, z[i*4+j], lv); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
