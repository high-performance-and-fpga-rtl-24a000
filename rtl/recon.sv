// recon: reconstruction of one 4x4 block, rec = clip(pred + residual) to 0..255
// (combinational). Used by the transform/reconstruction stage for each of the sixteen
// blocks of a macroblock. The clipping range is that of 8-bit video; the block size
// follows the 4x4 transform unit.
module recon (
  input  svc_pkg::pix_t  pred [16],
  input  svc_pkg::coef_t res [16],
  output svc_pkg::pix_t  rec [16]
);
  import svc_pkg::*;
  always_comb
    for (int k = 0; k < 16; k++) rec[k] = clip1(int'(pred[k]) + int'(res[k]));
endmodule
