// ime: integer-pel motion estimation with variable block size.
// Full search of the candidate displacements dx,dy in [-SR, SR-1] around the co-located
// position, inside a reference window of W x W pixels (W = 16 + 2*SR) whose pixel (0,0)
// lies SR pixels above and left of the current macroblock. Four sad_pe elements work in
// parallel, one per 8x8 quadrant of the macroblock, each taking one 8-pixel row segment
// per cycle. With SUB=1 only the even rows are compared (row subsampling), so one
// candidate takes 4 cycles and `done` rises (2*SR)^2*4 + 3 cycles after the edge that samples `start` (579 at
// SR=6, inside the 600-cycle stage budget).
// From the four quadrant SADs of every candidate the engine forms the costs of all nine
// partitions it supports and keeps the best of each:
//   0: 16x16, 1..2: 16x8 top/bottom, 3..4: 8x16 left/right, 5..8: 8x8 in raster order.
// The first candidate in raster scan wins ties.
// Following the design: block sizes 16x16/16x8/8x16/8x8, subsampled integer search, the
// 8-lane SAD element. This design's own choices: the search range, row subsampling as the
// subsampling pattern, the raster scan order and tie rule.
// Interface: pulse `start` with `cur` and `win` stable; `done` pulses when the results
// are valid, and they hold until the next start.
module ime #(
  parameter int SR  = 6,
  parameter bit SUB = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  svc_pkg::pix_t cur [256],
  input  svc_pkg::pix_t win [(16+2*SR)*(16+2*SR)],
  output logic        busy,
  output logic        done,
  output logic signed [7:0] mv_x [9],
  output logic signed [7:0] mv_y [9],
  output logic [17:0] cost [9]
);
  import svc_pkg::*;
  localparam int W      = 16 + 2*SR;
  localparam int NC     = (2*SR)*(2*SR);       // candidates
  localparam int ROWS   = SUB ? 4 : 8;         // rows compared per 8x8 quadrant
  localparam int RSTEP  = SUB ? 2 : 1;

  // issue side
  logic        issuing;
  int unsigned cand_i, row_i;                  // candidate and row being issued
  // result side
  int unsigned res_i;

  logic [63:0] pe_w [4], ci_w [4];
  logic [15:0] qsad [4];
  logic        qdone [4];
  logic        pe_first, pe_last;

  assign pe_first = (row_i == 0);
  assign pe_last  = (row_i == ROWS-1);

  always_comb begin
    int dx, dy, ry, cy;
    dx = int'(cand_i % (2*SR));
    dy = int'(cand_i / (2*SR));
    for (int q = 0; q < 4; q++) begin
      cy = (q / 2) * 8 + int'(row_i) * RSTEP;
      ry = cy + dy;                            // window row (window origin is -SR)
      for (int k = 0; k < 8; k++) begin
        ci_w[q][8*k +: 8] = cur[cy*16 + (q % 2)*8 + k];
        pe_w[q][8*k +: 8] = win[ry*W + dx + (q % 2)*8 + k];
      end
    end
  end

  for (genvar q = 0; q < 4; q++) begin : g_pe
    sad_pe u_pe (
      .clk, .rst_n, .valid(issuing), .first(pe_first), .last(pe_last),
      .pe(pe_w[q]), .ci(ci_w[q]), .sad(qsad[q]), .done(qdone[q])
    );
  end

  // costs of the nine partitions for the candidate whose quadrant SADs are ready
  logic [17:0] pc [9];
  logic signed [7:0] cx, cyv;
  always_comb begin
    cx  = 8'(int'(res_i % (2*SR)) - SR);
    cyv = 8'(int'(res_i / (2*SR)) - SR);
    pc[5] = 18'(qsad[0]); pc[6] = 18'(qsad[1]);
    pc[7] = 18'(qsad[2]); pc[8] = 18'(qsad[3]);
    pc[1] = pc[5] + pc[6]; pc[2] = pc[7] + pc[8];
    pc[3] = pc[5] + pc[7]; pc[4] = pc[6] + pc[8];
    pc[0] = pc[1] + pc[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0; cand_i <= 0; row_i <= 0; res_i <= 0; busy <= 1'b0; done <= 1'b0;
      for (int p = 0; p < 9; p++) begin cost[p] <= '1; mv_x[p] <= '0; mv_y[p] <= '0; end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        issuing <= 1'b1; busy <= 1'b1; cand_i <= 0; row_i <= 0; res_i <= 0;
        for (int p = 0; p < 9; p++) cost[p] <= '1;
      end else begin
        if (issuing) begin
          if (row_i == ROWS-1) begin
            row_i <= 0;
            if (cand_i == NC-1) issuing <= 1'b0;
            else cand_i <= cand_i + 1;
          end else row_i <= row_i + 1;
        end
        if (qdone[0]) begin
          for (int p = 0; p < 9; p++)
            if (pc[p] < cost[p]) begin cost[p] <= pc[p]; mv_x[p] <= cx; mv_y[p] <= cyv; end
          res_i <= res_i + 1;
          if (res_i == NC-1) begin busy <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end
endmodule
