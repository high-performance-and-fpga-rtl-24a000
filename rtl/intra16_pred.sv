// intra16_pred: H.264 intra predictor for a 16x16 luma macroblock (N=16) or an 8x8
// chroma block (N=8); combinational.
// Modes (numbered as for 16x16 luma): 0 vertical, 1 horizontal, 2 DC, 3 plane.
// Luma DC is one mean of the available top and left neighbours (128 if none). Chroma DC
// is formed per 4x4 quarter: the top-left and bottom-right quarters use both edges, the
// top-right quarter prefers its top neighbours and the bottom-left quarter its left ones.
// Plane prediction fits a gradient through the edges:
//   H = sum_i (i+1)*(top[N/2+i] - top[N/2-2-i]),  V likewise on the left column
//   (index -1 is the corner pixel), b = (5H+32)>>6 for N=16 or (34H+32)>>6 for N=8,
//   a = 16*(left[N-1] + top[N-1]), pred(x,y) = clip((a + b*(x-N/2+1) + c*(y-N/2+1) + 16)>>5).
// Following the design: the four modes named for Intra_16x16 luma and chroma; the
// formulas are those of H.264. `mode_ok` is low when a mode's neighbours are missing.
module intra16_pred #(
  parameter int N = 16
) (
  input  svc_pkg::pix_t top [N],
  input  svc_pkg::pix_t left [N],
  input  svc_pkg::pix_t corner,
  input  logic          top_ok,
  input  logic          left_ok,
  input  logic [1:0]    mode,
  output svc_pkg::pix_t pred [N*N],
  output logic          mode_ok
);
  import svc_pkg::*;
  localparam int HF = N / 2;

  function automatic int tp(int i);           // top row with corner at index -1
    return (i < 0) ? int'(corner) : int'(top[i]);
  endfunction
  function automatic int lp(int i);
    return (i < 0) ? int'(corner) : int'(left[i]);
  endfunction

  logic signed [31:0] hgrad, vgrad, pa, pb, pc;
  always_comb begin
    hgrad = 0; vgrad = 0;
    for (int i = 0; i < HF; i++) begin
      hgrad += (i + 1) * (tp(HF + i) - tp(HF - 2 - i));
      vgrad += (i + 1) * (lp(HF + i) - lp(HF - 2 - i));
    end
    pa = 16 * (lp(N-1) + tp(N-1));
    pb = (N == 16) ? (5*hgrad + 32) >>> 6 : (34*hgrad + 32) >>> 6;
    pc = (N == 16) ? (5*vgrad + 32) >>> 6 : (34*vgrad + 32) >>> 6;
  end

  always_comb begin
    case (mode)
      2'd0:    mode_ok = top_ok;
      2'd1:    mode_ok = left_ok;
      2'd2:    mode_ok = 1'b1;
      default: mode_ok = top_ok && left_ok;
    endcase
  end

  // DC value of each 4x4 quarter (all equal for luma). sum_t/sum_l are the sums of the
  // four top / left neighbours above / beside quarter column / row q.
  logic signed [31:0] sum_t [4], sum_l [4], st_all, sl_all;
  logic [7:0] dcq [4][4];
  always_comb begin
    for (int q = 0; q < 4; q++) begin
      sum_t[q] = 0; sum_l[q] = 0;
      if (q < N / 4)
        for (int i = 0; i < 4; i++) begin
          sum_t[q] += int'(top[(4*q + i) % N]);
          sum_l[q] += int'(left[(4*q + i) % N]);
        end
    end
    st_all = sum_t[0] + sum_t[1] + sum_t[2] + sum_t[3];
    sl_all = sum_l[0] + sum_l[1] + sum_l[2] + sum_l[3];
  end
  always_comb begin
    int a, b;
    logic ua, ub;
    for (int qy = 0; qy < 4; qy++) for (int qx = 0; qx < 4; qx++) begin
      if (N == 16) begin
        a = st_all; b = sl_all; ua = top_ok; ub = left_ok;
      end else if (qx == qy || (qx != 0 && qy != 0)) begin
        a = sum_t[qx]; b = sum_l[qy]; ua = top_ok; ub = left_ok;
      end else if (qy == 0) begin        // top edge quarter: prefer its top neighbours
        a = sum_t[qx]; b = sum_l[qy]; ua = top_ok; ub = !top_ok && left_ok;
      end else begin                     // left edge quarter: prefer its left neighbours
        a = sum_t[qx]; b = sum_l[qy]; ua = !left_ok && top_ok; ub = left_ok;
      end
      if (N == 16) begin
        if (ua && ub)  dcq[qy][qx] = 8'((a + b + 16) >>> 5);
        else if (ua)   dcq[qy][qx] = 8'((a + 8) >>> 4);
        else if (ub)   dcq[qy][qx] = 8'((b + 8) >>> 4);
        else           dcq[qy][qx] = 8'd128;
      end else begin
        if (ua && ub)  dcq[qy][qx] = 8'((a + b + 4) >>> 3);
        else if (ua)   dcq[qy][qx] = 8'((a + 2) >>> 2);
        else if (ub)   dcq[qy][qx] = 8'((b + 2) >>> 2);
        else           dcq[qy][qx] = 8'd128;
      end
    end
  end

  always_comb begin
    int v, qx, qy;
    for (int y = 0; y < N; y++) begin
      for (int x = 0; x < N; x++) begin
        qx = x / 4; qy = y / 4;
        case (mode)
          2'd0: v = tp(x);
          2'd1: v = lp(y);
          2'd2: v = int'(dcq[qy][qx]);
          default: v = int'(clip1((pa + pb * (x - HF + 1) + pc * (y - HF + 1) + 16) >>> 5));
        endcase
        pred[y*N + x] = pix_t'(v);
      end
    end
  end
endmodule
