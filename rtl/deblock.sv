// deblock: deblocking filter of one luma macroblock.
// The macroblock is held in a 20x20 working buffer together with the four reconstructed
// columns of the left neighbour and the four rows of the top neighbour, because
// filtering the macroblock's left and top edges also changes those pixels. Following the
// design's edge order, the four vertical edges (x = 0, 4, 8, 12) are filtered first, left
// to right, sixteen lines each, then the four horizontal edges (y = 0, 4, 8, 12) top to
// bottom. One line of eight samples passes through dbf_line per cycle, so the macroblock
// takes 128 cycles: `done` rises 128 cycles after the edge that samples `start`.
// The boundary strength is given per edge (bs_v for vertical, bs_h for horizontal
// edges); an edge with bS 0, or a picture-boundary edge (left_ok/top_ok low), is left
// alone. alpha and beta come from qp (no offsets) and tc0 from qp and bS, by the H.264
// tables written out below.
// From the document: macroblock-based filtering in raster order, vertical edges left to
// right, then horizontal edges top to bottom, and the update of the neighbours' pixels.
// This design's own: per-edge rather than per-segment bS, the buffer layout, one line per
// cycle. Chroma edges are not filtered here.
module deblock (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  svc_pkg::pix_t mb_in [256],
  input  svc_pkg::pix_t left_in [64],     // 16 rows x 4 columns (x = -4..-1)
  input  svc_pkg::pix_t top_in [64],      // 4 rows (y = -4..-1) x 16 columns
  input  logic          left_ok,
  input  logic          top_ok,
  input  logic [5:0]    qp,
  input  logic [2:0]    bs_v [4],
  input  logic [2:0]    bs_h [4],
  output logic          busy,
  output logic          done,
  output svc_pkg::pix_t mb_out [256],
  output svc_pkg::pix_t left_out [64],
  output svc_pkg::pix_t top_out [64]
);
  import svc_pkg::*;
  localparam int B = 20;

  function automatic int alpha_tab(int i);
    int t [36] = '{4, 4, 5, 6, 7, 8, 9, 10, 12, 13, 15, 17, 20, 22, 25, 28, 32, 36, 40, 45,
                   50, 56, 63, 71, 80, 90, 101, 113, 127, 144, 162, 182, 203, 226, 255, 255};
    return (i < 16) ? 0 : t[i-16];
  endfunction
  function automatic int beta_tab(int i);
    int t [36] = '{2, 2, 2, 3, 3, 3, 3, 4, 4, 4, 6, 6, 7, 7, 8, 8, 9, 9, 10, 10,
                   11, 11, 12, 12, 13, 13, 14, 14, 15, 15, 16, 16, 17, 17, 18, 18};
    return (i < 16) ? 0 : t[i-16];
  endfunction
  function automatic int tc0_tab(int i, int bs);
    int t1 [35] = '{0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 4, 4, 4, 5, 6, 6, 7, 8, 9, 10, 11, 13};
    int t2 [35] = '{0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 4, 4, 5, 5, 6, 7, 8, 8, 10, 11, 12, 13, 15, 17};
    int t3 [35] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 4, 4, 4, 5, 6, 6, 7, 8, 9, 10, 11, 13, 14, 16, 18, 20, 23, 25};
    if (i < 17) return 0;
    return (bs == 1) ? t1[i-17] : (bs == 2) ? t2[i-17] : t3[i-17];
  endfunction

  pix_t buf_q [B*B];
  logic dir;                 // 0: vertical edges, 1: horizontal edges
  logic [1:0] edge_i;
  logic [3:0] line;

  pix_t lp [4], lq [4], lpo [4], lqo [4];
  logic [2:0] ebs;
  always_comb begin
    int e;
    e = 4 + 4*int'(edge_i);        // edge position in buffer coordinates
    for (int k = 0; k < 4; k++) begin
      if (!dir) begin
        lp[k] = buf_q[(4 + int'(line))*B + e - 1 - k];
        lq[k] = buf_q[(4 + int'(line))*B + e + k];
      end else begin
        lp[k] = buf_q[(e - 1 - k)*B + 4 + int'(line)];
        lq[k] = buf_q[(e + k)*B + 4 + int'(line)];
      end
    end
    ebs = dir ? bs_h[edge_i] : bs_v[edge_i];
    if (edge_i == 2'd0 && ((!dir && !left_ok) || (dir && !top_ok))) ebs = 3'd0;
  end

  dbf_line u_line (
    .p(lp), .q(lq), .bs(ebs),
    .alpha(8'(alpha_tab(int'(qp)))), .beta(5'(beta_tab(int'(qp)))),
    .tc0(5'(tc0_tab(int'(qp), int'(ebs)))),
    .po(lpo), .qo(lqo)
  );

  int e;                      // position of the edge being filtered in the buffer
  assign e = 4 + 4*int'(edge_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; dir <= 1'b0; edge_i <= '0; line <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; dir <= 1'b0; edge_i <= '0; line <= '0;
        for (int i = 0; i < B*B; i++) buf_q[i] <= 8'd0;
        for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) buf_q[(y+4)*B + x + 4] <= mb_in[y*16 + x];
        for (int y = 0; y < 16; y++) for (int x = 0; x < 4; x++) buf_q[(y+4)*B + x] <= left_in[y*4 + x];
        for (int y = 0; y < 4; y++) for (int x = 0; x < 16; x++) buf_q[y*B + x + 4] <= top_in[y*16 + x];
      end else if (busy) begin
        for (int k = 0; k < 4; k++) begin
          if (!dir) begin
            buf_q[(4 + int'(line))*B + e - 1 - k] <= lpo[k];
            buf_q[(4 + int'(line))*B + e + k] <= lqo[k];
          end else begin
            buf_q[(e - 1 - k)*B + 4 + int'(line)] <= lpo[k];
            buf_q[(e + k)*B + 4 + int'(line)] <= lqo[k];
          end
        end
        line <= line + 1'b1;
        if (line == 4'd15) begin
          edge_i <= edge_i + 1'b1;
          if (edge_i == 2'd3) begin
            dir <= 1'b1;
            if (dir) begin busy <= 1'b0; done <= 1'b1; end
          end
        end
      end
    end
  end

  always_comb begin
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) mb_out[y*16 + x] = buf_q[(y+4)*B + x + 4];
    for (int y = 0; y < 16; y++) for (int x = 0; x < 4; x++) left_out[y*4 + x] = buf_q[(y+4)*B + x];
    for (int y = 0; y < 4; y++) for (int x = 0; x < 16; x++) top_out[y*16 + x] = buf_q[y*B + x + 4];
  end
endmodule
