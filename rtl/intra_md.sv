// intra_md: intra mode decision for one luma macroblock.
// Phase 1 scores the four Intra_16x16 modes (vertical, horizontal, DC, plane) by SAD
// against the current macroblock, eight pixels per cycle (32 cycles per mode). Phase 2
// scores the nine Intra_4x4 modes of each of the sixteen 4x4 blocks, one (block, mode)
// pair of sixteen pixels per cycle (144 cycles), keeping the best mode of every block and
// the sum of their costs. Unavailable modes are skipped; the first mode wins ties.
// The 4x4 neighbours are taken from the original pixels of the macroblock and from the
// neighbour rows given at the ports (decision on original pixels), so the decision can
// run ahead of reconstruction. Top-right neighbours of a 4x4 block are used where they
// precede it in coding order and lie in this or the top macroblock, otherwise pixel D
// is repeated.
// Following the design: intra prediction with mode decision, luma modes as listed. This
// design's own: SAD as the cost, decision on original pixels, the cycle schedule.
// `done` rises 272 cycles after the edge that samples `start`.
module intra_md (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  svc_pkg::pix_t cur [256],
  input  svc_pkg::pix_t top [20],     // row above: 16 pixels plus 4 of the top-right MB
  input  svc_pkg::pix_t left [16],
  input  svc_pkg::pix_t corner,
  input  logic          top_ok,
  input  logic          left_ok,
  output logic          busy,
  output logic          done,
  output logic [1:0]    i16_mode,
  output logic [17:0]   i16_cost,
  output logic [3:0]    i4_mode [16],
  output logic [17:0]   i4_cost
);
  import svc_pkg::*;
  typedef enum logic [1:0] {IDLE, P16, P4} state_t;
  state_t state;
  logic [4:0] beat;
  logic [1:0] m16;
  logic [3:0] blk, m4;
  logic [17:0] acc;
  logic [11:0] best4;

  pix_t pred16 [256];
  logic ok16;
  intra16_pred #(.N(16)) u_i16 (
    .top(top[0:15]), .left, .corner, .top_ok, .left_ok, .mode(m16), .pred(pred16), .mode_ok(ok16)
  );

  // neighbours of the 4x4 block under test, from original pixels
  pix_t n_top [8], n_left [4], n_corner, pred4 [16];
  logic n_top_ok, n_left_ok, ok4;
  always_comb begin
    int bx, by, px0, py0;
    logic tr_ok;
    bx = int'(blk) % 4; by = int'(blk) / 4;
    px0 = 4*bx; py0 = 4*by;
    n_top_ok  = (by > 0) || top_ok;
    n_left_ok = (bx > 0) || left_ok;
    tr_ok = (by == 0) ? (top_ok && bx < 3) : !(bx == 3 || (bx == 1 && (by == 1 || by == 3)));
    for (int i = 0; i < 8; i++) begin
      int xi;
      xi = (i < 4 || tr_ok) ? px0 + i : px0 + 3;
      n_top[i] = (by == 0) ? top[xi] : cur[(py0-1)*16 + xi];
    end
    for (int i = 0; i < 4; i++) n_left[i] = (bx == 0) ? left[py0 + i] : cur[(py0+i)*16 + px0 - 1];
    if (bx == 0 && by == 0)  n_corner = corner;
    else if (by == 0)        n_corner = top[px0 - 1];
    else if (bx == 0)        n_corner = left[py0 - 1];
    else                     n_corner = cur[(py0-1)*16 + px0 - 1];
  end
  intra4x4_pred u_i4 (
    .top(n_top), .left(n_left), .corner(n_corner), .top_ok(n_top_ok), .left_ok(n_left_ok),
    .mode(m4), .pred(pred4), .mode_ok(ok4)
  );

  logic [17:0] sad16, sad4;
  always_comb begin
    int bx, by;
    bx = int'(blk) % 4; by = int'(blk) / 4;
    sad16 = '0;
    for (int k = 0; k < 8; k++)
      sad16 += 18'(iabs(int'(pred16[int'(beat)*8 + k]) - int'(cur[int'(beat)*8 + k])));
    sad4 = '0;
    for (int k = 0; k < 16; k++)
      sad4 += 18'(iabs(int'(pred4[k]) - int'(cur[(4*by + k/4)*16 + 4*bx + k%4])));
  end

  logic [11:0] b4;            // best cost of the current 4x4 block including this mode
  assign b4 = (ok4 && (12'(sad4) < best4)) ? 12'(sad4) : best4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; beat <= '0; m16 <= '0; blk <= '0; m4 <= '0; acc <= '0; best4 <= '0;
      busy <= 1'b0; done <= 1'b0; i16_mode <= '0; i16_cost <= '1; i4_cost <= '0;
      for (int b = 0; b < 16; b++) i4_mode[b] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state <= P16; busy <= 1'b1; beat <= '0; m16 <= '0; acc <= '0;
          i16_cost <= '1; i16_mode <= 2'd2; i4_cost <= '0;
        end
        P16: begin
          beat <= beat + 1'b1;
          acc <= (beat == 5'd31) ? '0 : acc + sad16;
          if (beat == 5'd31) begin
            if (ok16 && (acc + sad16 < i16_cost)) begin i16_cost <= acc + sad16; i16_mode <= m16; end
            m16 <= m16 + 1'b1;
            if (m16 == 2'd3) begin state <= P4; blk <= '0; m4 <= '0; best4 <= '1; end
          end
        end
        P4: begin
          if (ok4 && (12'(sad4) < best4)) begin best4 <= 12'(sad4); i4_mode[blk] <= m4; end
          if (m4 == 4'd8) begin
            i4_cost <= i4_cost + 18'(b4);
            m4 <= '0; best4 <= '1;
            blk <= blk + 1'b1;
            if (blk == 4'd15) begin state <= IDLE; busy <= 1'b0; done <= 1'b1; end
          end else m4 <= m4 + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
