// svc_pkg: types, constants and arithmetic helpers shared by the encoder engines.
// Pixels are 8-bit unsigned; a macroblock (MB) is 16x16 luma pixels stored row-major,
// element [y*16+x]. Transform coefficients are 16-bit signed. The quantisation tables
// are those of the H.264 4x4 integer transform (MF for the encoder, V for the decoder),
// indexed by qp%6 and by the position class of the coefficient.
package svc_pkg;
  typedef logic [7:0] pix_t;
  typedef logic signed [15:0] coef_t;

  localparam int N_STAGES = 9;        // stages of the MB pipeline
  localparam int SLOT_CYCLES = 600;   // cycle budget of one pipeline stage

  typedef pix_t mb_pix_t [256];
  typedef pix_t blk4_t   [16];
  typedef coef_t cblk4_t [16];

  // clip an integer to the 8-bit pixel range
  function automatic pix_t clip1(input int v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return pix_t'(v);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int clip3(input int lo, input int hi, input int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  // position class of coefficient (row i, column j): 0 = both even, 1 = both odd, 2 = mixed
  function automatic int pos_class(input int i, input int j);
    if ((i % 2 == 0) && (j % 2 == 0)) return 0;
    if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    return 2;
  endfunction

  // forward quantisation multiplier MF(qp%6, class)
  function automatic int quant_mf(input int qm, input int cls);
    case (qm)
      0: return (cls == 0) ? 13107 : (cls == 1) ? 5243 : 8066;
      1: return (cls == 0) ? 11916 : (cls == 1) ? 4660 : 7490;
      2: return (cls == 0) ? 10082 : (cls == 1) ? 4194 : 6554;
      3: return (cls == 0) ?  9362 : (cls == 1) ? 3647 : 5825;
      4: return (cls == 0) ?  8192 : (cls == 1) ? 3355 : 5243;
      default: return (cls == 0) ? 7282 : (cls == 1) ? 2893 : 4559;
    endcase
  endfunction

  // dequantisation scale V(qp%6, class)
  function automatic int dequant_v(input int qm, input int cls);
    case (qm)
      0: return (cls == 0) ? 10 : (cls == 1) ? 16 : 13;
      1: return (cls == 0) ? 11 : (cls == 1) ? 18 : 14;
      2: return (cls == 0) ? 13 : (cls == 1) ? 20 : 16;
      3: return (cls == 0) ? 14 : (cls == 1) ? 23 : 18;
      4: return (cls == 0) ? 16 : (cls == 1) ? 25 : 20;
      default: return (cls == 0) ? 18 : (cls == 1) ? 29 : 23;
    endcase
  endfunction
endpackage
