// intra4x4_pred: H.264 luma 4x4 intra predictor, all nine modes (combinational).
// Modes: 0 vertical, 1 horizontal, 2 DC, 3 diagonal down-left, 4 diagonal down-right,
// 5 vertical-right, 6 horizontal-down, 7 vertical-left, 8 horizontal-up.
// The 13 neighbour pixels are laid out as one edge e[0..12] = L K J I M A B C D E F G H
// (left column bottom to top, corner, top row, top-right row). Every directional mode
// then reads either a two-tap average f2[i] = (e[i]+e[i+1]+1)>>1 or a three-tap value
// f3[i] = (e[i-1]+2e[i]+e[i+1]+2)>>2 of that edge, at an index that depends only on the
// pixel position, so one set of edge filters serves all six directional modes. The edge
// is extended by repeating L below and H beyond the end.
// Interface: top[0..7] = A..H (the caller substitutes D for E..H when the top-right is
// unavailable), left[0..3] = I..L, corner = M. `mode_ok` is low when the mode needs a
// neighbour flagged unavailable (DC is always allowed and falls back to 128).
// Following the design: the nine modes listed for luma blocks. The edge-filter
// formulation is this design's own.
module intra4x4_pred (
  input  svc_pkg::pix_t top [8],
  input  svc_pkg::pix_t left [4],
  input  svc_pkg::pix_t corner,
  input  logic          top_ok,
  input  logic          left_ok,
  input  logic [3:0]    mode,
  output svc_pkg::pix_t pred [16],
  output logic          mode_ok
);
  import svc_pkg::*;
  logic signed [31:0] e [-1:13];
  logic signed [31:0] f2 [0:12];
  logic signed [31:0] f3 [0:12];
  logic signed [31:0] dc;

  always_comb begin
    for (int y = 0; y < 4; y++) e[3-y] = int'(left[y]);
    e[4] = int'(corner);
    for (int x = 0; x < 8; x++) e[5+x] = int'(top[x]);
    e[-1] = e[0];
    e[13] = e[12];
    for (int i = 0; i <= 12; i++) begin
      f2[i] = (e[i] + e[i+1] + 1) >>> 1;
      f3[i] = (e[i-1] + 2*e[i] + e[i+1] + 2) >>> 2;
    end
  end

  always_comb begin
    int st, sl;
    st = 0; sl = 0;
    for (int i = 0; i < 4; i++) begin st += int'(top[i]); sl += int'(left[i]); end
    if (top_ok && left_ok) dc = (st + sl + 4) >>> 3;
    else if (top_ok)       dc = (st + 2) >>> 2;
    else if (left_ok)      dc = (sl + 2) >>> 2;
    else                   dc = 128;
  end

  always_comb begin
    case (mode)
      4'd0, 4'd3, 4'd7:  mode_ok = top_ok;
      4'd1, 4'd8:        mode_ok = left_ok;
      4'd2:              mode_ok = 1'b1;
      4'd4, 4'd5, 4'd6:  mode_ok = top_ok && left_ok;
      default:           mode_ok = 1'b0;
    endcase
  end

  always_comb begin
    int v, z;
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        z = 0;
        case (mode)
          4'd0: v = int'(top[x]);
          4'd1: v = int'(left[y]);
          4'd3: v = f3[6 + x + y];
          4'd4: v = f3[4 + x - y];
          4'd5: begin
            z = 2*x - y;
            if (z >= 0 && z % 2 == 0) v = f2[4 + x - (y >>> 1)];
            else if (z > 0)           v = f3[4 + x - (y >>> 1)];
            else if (z == -1)         v = f3[4];
            else                      v = f3[5 - y];
          end
          4'd6: begin
            z = 2*y - x;
            if (z >= 0 && z % 2 == 0) v = f2[3 - y + (x >>> 1)];
            else if (z > 0)           v = f3[4 - y + (x >>> 1)];
            else if (z == -1)         v = f3[4];
            else                      v = f3[3 + x];
          end
          4'd7: v = (y % 2 == 0) ? f2[5 + x + (y >>> 1)] : f3[6 + x + (y >>> 1)];
          4'd8: begin
            z = x + 2*y;
            if (z < 5 && z % 2 == 0) v = f2[2 - y - (x >>> 1)];
            else if (z < 5)          v = f3[2 - y - (x >>> 1)];
            else if (z == 5)         v = f3[0];
            else                     v = e[0];
          end
          default: v = dc;
        endcase
        pred[y*4 + x] = pix_t'(v);
      end
    end
  end
endmodule
