// itiq4x4: dequantisation and inverse transform of one 4x4 block (combinational).
// dc_mode 0: every level is scaled, W' = Z * V * 2^(qp/6) (V from the H.264 table by
// qp%6 and position); if `use_dc` is set the DC position takes `dc` instead (the
// already dequantised DC from the luma or chroma DC path). The inverse core transform
// (rows, then columns: e0=w0+w2, e1=w0-w2, e2=(w1>>1)-w3, e3=w1+(w3>>1); outputs
// e0+e3, e1+e2, e1-e2, e0-e3) is followed by (r + 32) >> 6, giving the residual.
// dc_mode 1: inverse 4x4 Hadamard of the luma DC levels, then
// (f*V0*2^(qp/6) + 2^(5-qp/6)) >> (6-qp/6) for qp < 36, or f*V0 << (qp/6-6) above.
// dc_mode 2: inverse 2x2 Hadamard of the chroma DC levels (entries 0..3), then
// ((f*V0) << (qp/6)) >> 5.
// Following the design: the inverse of the three transforms with dequantisation,
// 4x4 block unit. The arithmetic is that of the H.264 decoding process.
module itiq4x4 (
  input  svc_pkg::coef_t z [16],
  input  logic [5:0]     qp,
  input  logic [1:0]     dc_mode,
  input  logic           use_dc,
  input  svc_pkg::coef_t dc,
  output svc_pkg::coef_t r [16]     // residual (mode 0) or dequantised DC values (1, 2)
);
  import svc_pkg::*;
  int d [16], th [16], ti [16], o [16];   // scaled input, first-pass rows, output

  always_comb begin
    int qd;
    qd = int'(qp) / 6;
    for (int k = 0; k < 16; k++)
      d[k] = (int'(z[k]) * dequant_v(int'(qp) % 6, pos_class(k / 4, k % 4))) <<< qd;
    if (use_dc) d[0] = int'(dc);
  end

  // first (row) pass: Hadamard of the luma DC levels, and the inverse core transform
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      int a0, a1, a2, a3, e0, e1, e2, e3;
      a0 = int'(z[i*4]); a1 = int'(z[i*4+1]); a2 = int'(z[i*4+2]); a3 = int'(z[i*4+3]);
      th[i*4+0] = a0 + a1 + a2 + a3;  th[i*4+1] = a0 + a1 - a2 - a3;
      th[i*4+2] = a0 - a1 - a2 + a3;  th[i*4+3] = a0 - a1 + a2 - a3;
      e0 = d[i*4] + d[i*4+2];              e1 = d[i*4] - d[i*4+2];
      e2 = (d[i*4+1] >>> 1) - d[i*4+3];    e3 = d[i*4+1] + (d[i*4+3] >>> 1);
      ti[i*4+0] = e0 + e3; ti[i*4+1] = e1 + e2; ti[i*4+2] = e1 - e2; ti[i*4+3] = e0 - e3;
    end
  end

  always_comb begin
    int qd, v0, b0, b1, b2, b3, e0, e1, e2, e3;
    int f [4];
    b0 = 0; b1 = 0; b2 = 0; b3 = 0; e0 = 0; e1 = 0; e2 = 0; e3 = 0;
    for (int k = 0; k < 4; k++) f[k] = 0;
    qd = int'(qp) / 6;
    v0 = dequant_v(int'(qp) % 6, 0);
    for (int k = 0; k < 16; k++) o[k] = 0;
    case (dc_mode)
      2'd1: begin
        for (int j = 0; j < 4; j++) begin
          b0 = th[j]; b1 = th[4+j]; b2 = th[8+j]; b3 = th[12+j];
          f[0] = b0 + b1 + b2 + b3;  f[1] = b0 + b1 - b2 - b3;
          f[2] = b0 - b1 - b2 + b3;  f[3] = b0 - b1 + b2 - b3;
          for (int i = 0; i < 4; i++)
            o[i*4+j] = (qd < 6) ? (f[i] * v0 * (1 << qd) + (1 << (5 - qd))) >>> (6 - qd)
                                : (f[i] * v0) <<< (qd - 6);
        end
      end
      2'd2: begin
        f[0] = int'(z[0]) + int'(z[1]) + int'(z[2]) + int'(z[3]);
        f[1] = int'(z[0]) - int'(z[1]) + int'(z[2]) - int'(z[3]);
        f[2] = int'(z[0]) + int'(z[1]) - int'(z[2]) - int'(z[3]);
        f[3] = int'(z[0]) - int'(z[1]) - int'(z[2]) + int'(z[3]);
        for (int k = 0; k < 4; k++) o[k] = ((f[k] * v0) <<< qd) >>> 5;
      end
      default: begin
        for (int j = 0; j < 4; j++) begin
          e0 = ti[j] + ti[8+j];                e1 = ti[j] - ti[8+j];
          e2 = (ti[4+j] >>> 1) - ti[12+j];     e3 = ti[4+j] + (ti[12+j] >>> 1);
          o[j]    = (e0 + e3 + 32) >>> 6;      o[4+j]  = (e1 + e2 + 32) >>> 6;
          o[8+j]  = (e1 - e2 + 32) >>> 6;      o[12+j] = (e0 - e3 + 32) >>> 6;
        end
      end
    endcase
    for (int k = 0; k < 16; k++) r[k] = coef_t'(o[k]);
  end
endmodule
