// fme_mc: fractional motion estimation and motion compensation for a 16x16 partition.
// Starting from the integer vector found by ime, the engine refines hierarchically:
// the centre and its eight half-pel neighbours are scored by SAD against the current
// macroblock, then the eight quarter-pel neighbours of the best half-pel position. The
// winning quarter-pel vector is then used to produce the 16x16 inter prediction.
// Samples at fractional positions use the H.264 luma interpolation: the 6-tap filter
// (1,-5,20,20,-5,1) for half-pel samples (the centre sample from the intermediate
// unrounded values) and rounded averages of two neighbours for quarter-pel samples.
// Reference pixels outside the W x W window are replaced by the nearest window pixel.
// Eight interpolators work in parallel (one 64-bit word of eight pixels per cycle), so a
// candidate takes 32 cycles; 17 candidates and the compensation pass take 576 cycles and
// `done` rises 576 cycles after the edge that samples `start`, inside the 600-cycle stage.
// Following the design: half- then quarter-pel hierarchical refinement, quarter-pel
// motion compensation, the eight-pixel-wide datapath. This design's own choices: one
// 16x16 partition only, the square neighbour pattern, the first-scored-wins tie rule.
// Interface: `mv_x/mv_y` integer vector with the window as in ime (window pixel (0,0) is
// SR pixels above-left of the macroblock); results in quarter-pel units hold until the
// next start.
module fme_mc #(
  parameter int SR = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  svc_pkg::pix_t cur [256],
  input  svc_pkg::pix_t win [(16+2*SR)*(16+2*SR)],
  input  logic signed [7:0] mv_x,
  input  logic signed [7:0] mv_y,
  output logic          busy,
  output logic          done,
  output logic signed [9:0] qmv_x,
  output logic signed [9:0] qmv_y,
  output logic [17:0]   cost,
  output svc_pkg::pix_t pred [256]
);
  import svc_pkg::*;
  localparam int W = 16 + 2*SR;

  function automatic int px(int x, int y);
    return int'(win[clip3(0, W-1, y)*W + clip3(0, W-1, x)]);
  endfunction

  function automatic int tap6(int e, int f, int g, int h, int i, int j);
    return e - 5*f + 20*g + 20*h - 5*i + j;
  endfunction

  // unrounded horizontal half-pel value between (x,y) and (x+1,y)
  function automatic int hb1(int x, int y);
    return tap6(px(x-2,y), px(x-1,y), px(x,y), px(x+1,y), px(x+2,y), px(x+3,y));
  endfunction
  // unrounded vertical half-pel value between (x,y) and (x,y+1)
  function automatic int vh1(int x, int y);
    return tap6(px(x,y-2), px(x,y-1), px(x,y), px(x,y+1), px(x,y+2), px(x,y+3));
  endfunction

  // luma sample at quarter-pel window coordinates (x4, y4)
  function automatic int qpel(int x4, int y4);
    int x, y, xf, yf, g, b, h, m, s, j;
    x = x4 >>> 2; y = y4 >>> 2; xf = x4 & 3; yf = y4 & 3;
    g = px(x, y);
    b = int'(clip1((hb1(x, y) + 16) >>> 5));
    h = int'(clip1((vh1(x, y) + 16) >>> 5));
    m = int'(clip1((vh1(x+1, y) + 16) >>> 5));
    s = int'(clip1((hb1(x, y+1) + 16) >>> 5));
    j = int'(clip1((tap6(hb1(x, y-2), hb1(x, y-1), hb1(x, y), hb1(x, y+1), hb1(x, y+2), hb1(x, y+3)) + 512) >>> 10));
    case ({yf[1:0], xf[1:0]})
      4'b00_00: return g;
      4'b00_01: return (g + b + 1) >>> 1;
      4'b00_10: return b;
      4'b00_11: return (px(x+1, y) + b + 1) >>> 1;
      4'b01_00: return (g + h + 1) >>> 1;
      4'b01_01: return (b + h + 1) >>> 1;
      4'b01_10: return (b + j + 1) >>> 1;
      4'b01_11: return (b + m + 1) >>> 1;
      4'b10_00: return h;
      4'b10_01: return (h + j + 1) >>> 1;
      4'b10_10: return j;
      4'b10_11: return (j + m + 1) >>> 1;
      4'b11_00: return (px(x, y+1) + h + 1) >>> 1;
      4'b11_01: return (h + s + 1) >>> 1;
      4'b11_10: return (j + s + 1) >>> 1;
      default:  return (m + s + 1) >>> 1;
    endcase
  endfunction

  typedef enum logic [1:0] {IDLE, EVAL, COMP} state_t;
  state_t state;
  logic [4:0] beat;            // 8-pixel group within the macroblock
  logic [4:0] cand;            // 0..8 half-pel, 9..16 quarter-pel
  logic [17:0] acc;
  logic signed [9:0] cen_x, cen_y;    // centre of the current refinement step
  logic signed [9:0] cx, cy;          // candidate vector (quarter-pel)
  int samp [8];
  logic [17:0] beat_sad;

  // neighbour offsets: candidate 0 is the centre, 1..8 its neighbours in raster order
  always_comb begin
    int k, r, ox, oy, step;
    k = (cand >= 9) ? int'(cand) - 8 : int'(cand);
    step = (cand >= 9) ? 1 : 2;
    r = (k <= 4) ? k - 1 : k;          // raster index in the 3x3 neighbourhood, centre skipped
    ox = (k == 0) ? 0 : (r % 3 - 1) * step;
    oy = (k == 0) ? 0 : (r / 3 - 1) * step;
    cx = (state == COMP) ? qmv_x : cen_x + 10'(ox);
    cy = (state == COMP) ? qmv_y : cen_y + 10'(oy);
  end

  always_comb begin
    int y, x0;
    y  = int'(beat) / 2;
    x0 = (int'(beat) % 2) * 8;
    beat_sad = '0;
    for (int k = 0; k < 8; k++) begin
      samp[k] = qpel(4*(x0 + k + SR) + int'(cx), 4*(y + SR) + int'(cy));
      beat_sad += 18'(iabs(samp[k] - int'(cur[y*16 + x0 + k])));
    end
  end

  // cost of the current candidate once its last beat is in
  logic [17:0] c;
  logic better;
  assign c = acc + beat_sad;
  assign better = (c < cost) || (cand == 0);

  // the prediction is written in the compensation pass
  always_ff @(posedge clk)
    if (state == COMP) for (int k = 0; k < 8; k++) pred[int'(beat)*8 + k] <= pix_t'(samp[k]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; beat <= '0; cand <= '0; acc <= '0; busy <= 1'b0; done <= 1'b0;
      cen_x <= '0; cen_y <= '0; qmv_x <= '0; qmv_y <= '0; cost <= '1;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state <= EVAL; busy <= 1'b1; beat <= '0; cand <= '0; acc <= '0;
          cen_x <= 10'(mv_x) * 10'sd4; cen_y <= 10'(mv_y) * 10'sd4; cost <= '1;
        end
        EVAL: begin
          beat <= beat + 1'b1;
          if (beat != 5'd31) acc <= acc + beat_sad;
          else begin
            acc <= '0;
            if (better) begin cost <= c; qmv_x <= cx; qmv_y <= cy; end
            if (cand == 5'd8) begin           // half-pel step finished: recentre
              cen_x <= better ? cx : qmv_x; cen_y <= better ? cy : qmv_y;
            end
            if (cand == 5'd16) state <= COMP;
            cand <= cand + 1'b1;
          end
        end
        COMP: begin
          beat <= beat + 1'b1;
          if (beat == 5'd31) begin state <= IDLE; busy <= 1'b0; done <= 1'b1; end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
