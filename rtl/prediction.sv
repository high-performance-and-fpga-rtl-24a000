// prediction: forms the final predictor of a macroblock for residual coding and
// reconstruction (combinational). Three sources:
//   sel 0  inter: the motion-compensated block from fme_mc;
//   sel 1  intra: Intra_16x16 prediction in the decided mode, regenerated here from
//          the reconstructed neighbours (the mode was decided on original pixels);
//   sel 2  inter-layer: the upsampled base-layer macroblock.
// Following the design: a prediction block fed by motion compensation, intra prediction
// and upsampling ahead of reconstruction. The selection code and the regeneration from
// reconstructed neighbours are this design's choices.
module prediction (
  input  logic [1:0]    sel,
  input  svc_pkg::pix_t inter_pred [256],
  input  svc_pkg::pix_t base_up [256],
  input  logic [1:0]    intra_mode,
  input  svc_pkg::pix_t rec_top [16],
  input  svc_pkg::pix_t rec_left [16],
  input  svc_pkg::pix_t rec_corner,
  input  logic          top_ok,
  input  logic          left_ok,
  output svc_pkg::pix_t pred [256],
  output logic          pred_ok
);
  import svc_pkg::*;
  pix_t ipred [256];
  logic iok;
  intra16_pred #(.N(16)) u_i16 (
    .top(rec_top), .left(rec_left), .corner(rec_corner), .top_ok, .left_ok,
    .mode(intra_mode), .pred(ipred), .mode_ok(iok)
  );
  always_comb begin
    case (sel)
      2'd1:    begin pred = ipred; pred_ok = iok; end
      2'd2:    begin pred = base_up; pred_ok = 1'b1; end
      default: begin pred = inter_pred; pred_ok = 1'b1; end
    endcase
  end
endmodule
