// upsample: dyadic (2x) spatial upsampling of a base-layer 8x8 luma block to the 16x16
// enhancement-layer macroblock, for inter-layer intra prediction.
// Output sample 2i lies a quarter base sample before base sample i and 2i+1 a quarter
// after it, so each output uses four base samples with the 4-tap phase filters
//   3/4 phase (-1, 8, 28, -3) on base[i-2..i+1],  1/4 phase (-3, 28, 8, -1) on base[i-1..i+2].
// The filter is applied horizontally (kept unrounded, x32) and then vertically, and the
// result is (v + 512) >> 10 clipped to 0..255. The base block comes with a border of two
// pixels on every side (12x12, already padded by the caller at picture edges).
// One output row is produced per cycle: `done` rises 16 cycles after the edge that
// samples `start`, and `up` holds the block until the next start.
// The document names the upsampling block only; these filters are those of SVC dyadic
// intra resampling and are this design's choice.
module upsample (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  svc_pkg::pix_t base [144],      // 12x12, base pixel (x,y) of the block at [(y+2)*12 + x+2]
  output logic          busy,
  output logic          done,
  output svc_pkg::pix_t up [256]
);
  import svc_pkg::*;
  logic [3:0] row;

  function automatic int tapw(int phase, int t);   // phase 0: 3/4, 1: 1/4
    case (t)
      0: return (phase != 0) ? -3 : -1;
      1: return (phase != 0) ? 28 : 8;
      2: return (phase != 0) ? 8 : 28;
      default: return (phase != 0) ? -1 : -3;
    endcase
  endfunction

  // horizontally filtered value at output column ox, base row by (relative to the block)
  function automatic int hfilt(int ox, int by);
    int i, ph, s, x0;
    i = ox / 2; ph = ox % 2;
    x0 = (ph != 0) ? i - 1 : i - 2;
    s = 0;
    for (int t = 0; t < 4; t++) s += tapw(ph, t) * int'(base[(by + 2)*12 + x0 + t + 2]);
    return s;
  endfunction

  pix_t row_px [16];
  always_comb begin
    int oy, j, ph, y0, v;
    oy = int'(row); j = oy / 2; ph = oy % 2;
    y0 = (ph != 0) ? j - 1 : j - 2;
    for (int ox = 0; ox < 16; ox++) begin
      v = 0;
      for (int t = 0; t < 4; t++) v += tapw(ph, t) * hfilt(ox, y0 + t);
      row_px[ox] = clip1((v + 512) >>> 10);
    end
  end

  always_ff @(posedge clk)
    if (busy) for (int x = 0; x < 16; x++) up[int'(row)*16 + x] <= row_px[x];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; row <= '0;
      end else if (busy) begin
        row <= row + 1'b1;
        if (row == 4'd15) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
