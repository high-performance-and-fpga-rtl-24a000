// tq4x4: forward transform and quantisation of one 4x4 block (combinational).
// dc_mode selects one of the three transforms of the encoder:
//   0  core 4x4 integer transform W = Cf*X*Cf' of a residual block
//      (Cf rows 1 1 1 1 / 2 1 -1 -2 / 1 -1 -1 1 / 1 -2 2 -1), then per-coefficient
//      quantisation |Z| = (|W|*MF + f) >> qbits, with qbits = 15 + qp/6;
//   1  4x4 Hadamard of the sixteen luma DC coefficients of an Intra_16x16 macroblock,
//      halved, then |Z| = (|W|*MF0 + 2f) >> (qbits+1);
//   2  2x2 Hadamard of the four chroma DC coefficients (entries 0..3, raster order),
//      quantised like the luma DC.
// MF is the H.264 multiplier table indexed by qp%6 and coefficient position; the rounding
// offset f is 2^qbits/3 for intra and 2^qbits/6 for inter blocks.
// Following the design: a 4x4 block as the transform unit and the three transforms it
// lists. The quantiser is the usual H.264 reference-encoder one, a choice of this design.
module tq4x4 (
  input  svc_pkg::coef_t x [16],       // residuals (mode 0) or DC coefficients (modes 1, 2)
  input  logic [5:0]     qp,
  input  logic [1:0]     dc_mode,
  input  logic           intra,
  output svc_pkg::coef_t w [16],       // transform coefficients before quantisation
  output svc_pkg::coef_t z [16]        // quantised levels
);
  import svc_pkg::*;
  int t [16], c [16];

  always_comb begin
    // rows then columns
    for (int i = 0; i < 4; i++) begin
      int a0, a1, a2, a3;
      a0 = int'(x[i*4+0]); a1 = int'(x[i*4+1]); a2 = int'(x[i*4+2]); a3 = int'(x[i*4+3]);
      if (dc_mode == 2'd1) begin
        t[i*4+0] = a0 + a1 + a2 + a3;  t[i*4+1] = a0 + a1 - a2 - a3;
        t[i*4+2] = a0 - a1 - a2 + a3;  t[i*4+3] = a0 - a1 + a2 - a3;
      end else begin
        t[i*4+0] = a0 + a1 + a2 + a3;      t[i*4+1] = 2*a0 + a1 - a2 - 2*a3;
        t[i*4+2] = a0 - a1 - a2 + a3;      t[i*4+3] = a0 - 2*a1 + 2*a2 - a3;
      end
    end
    for (int j = 0; j < 4; j++) begin
      int b0, b1, b2, b3;
      b0 = t[j]; b1 = t[4+j]; b2 = t[8+j]; b3 = t[12+j];
      if (dc_mode == 2'd1) begin
        c[j]    = (b0 + b1 + b2 + b3) >>> 1;  c[4+j]  = (b0 + b1 - b2 - b3) >>> 1;
        c[8+j]  = (b0 - b1 - b2 + b3) >>> 1;  c[12+j] = (b0 - b1 + b2 - b3) >>> 1;
      end else begin
        c[j]    = b0 + b1 + b2 + b3;      c[4+j]  = 2*b0 + b1 - b2 - 2*b3;
        c[8+j]  = b0 - b1 - b2 + b3;      c[12+j] = b0 - 2*b1 + 2*b2 - b3;
      end
    end
    if (dc_mode == 2'd2) begin
      for (int k = 0; k < 16; k++) c[k] = 0;
      c[0] = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]);
      c[1] = int'(x[0]) - int'(x[1]) + int'(x[2]) - int'(x[3]);
      c[2] = int'(x[0]) + int'(x[1]) - int'(x[2]) - int'(x[3]);
      c[3] = int'(x[0]) - int'(x[1]) - int'(x[2]) + int'(x[3]);
    end
  end

  always_comb begin
    int qbits, f, mf, mag, lev;
    qbits = 15 + int'(qp) / 6;
    f = intra ? (1 << qbits) / 3 : (1 << qbits) / 6;
    for (int k = 0; k < 16; k++) begin
      w[k] = coef_t'(c[k]);
      mag = iabs(c[k]);
      if (dc_mode == 2'd0) begin
        mf = quant_mf(int'(qp) % 6, pos_class(k / 4, k % 4));
        lev = int'((longint'(mag) * mf + longint'(f)) >>> qbits);
      end else begin
        mf = quant_mf(int'(qp) % 6, 0);
        lev = int'((longint'(mag) * mf + longint'(2*f)) >>> (qbits + 1));
      end
      z[k] = coef_t'((c[k] < 0) ? -lev : lev);
    end
  end
endmodule
