// svc_encoder: macroblock-pipelined scalable video encoder core (luma path).
// A top controller (mb_pipe_ctrl) moves each 16x16 macroblock through nine stages, one
// slot per stage, with up to nine macroblocks in flight:
//   0 parameter loading  qp and macroblock position
//   1 data loading       current macroblock from the image buffer, 32x32 reference area
//                        from external memory by DMA into the local memory
//   2 resampling         12x12 base-layer block (8x8 plus a 2-pixel border) by DMA
//   3 IME / upsampling   integer motion search (ime) and 2x upsampling of the base block
//   4 FME / MC           half/quarter-pel refinement and motion compensation (fme_mc)
//   5 intra prediction   intra mode decision on original pixels (intra_md) and the
//                        choice among inter, intra and inter-layer prediction by SAD
//   6 transform / REC    prediction, 4x4 transform and quantisation, entropy coding,
//                        dequantisation, inverse transform and reconstruction
//   7 deblocking         deblock, then DMA write-back of the four rows of the macroblock
//                        above that this filtering changed
//   8 restore            DMA write-back of the macroblock to the reconstructed picture
// Each stage's data lives in a per-stage context register (the local memories between
// engines); at every slot boundary the contexts shift one stage on with their macroblock.
// A single DMA channel on the 64-bit AHB master port serves stages 1, 2, 7 and 8 in that
// priority. The host programs the encoder through a 32-bit AHB slave (host_if).
// Picture layout in external memory: the reference picture and the base-layer picture
// are stored with a 16-pixel border on every side (pitches width*16+32 and width*8+32,
// base addresses pointing at pixel (0,0)); the reconstructed picture has no border.
// The slot advances when all active stages are done; with an input that keeps up, the
// longest stage is the 579-cycle motion search, inside the 600-cycle budget.
// From the document: the engine set and their order, the nine-stage macroblock pipeline
// and its budget, the DMA-served modules, the AHB 64-bit master and 32-bit slave ports.
// This design's own: all the choices listed in the engines, the picture layout, the
// decision rule and the boundary strengths (intra or inter-layer macroblock: 4 on
// macroblock edges, 3 inside; inter: 2 where a neighbouring 4x4 block has coefficients,
// 1 on macroblock edges, else 0; one value per edge). Not built: chroma, the 8x8
// transform, the Intra_16x16 DC path (every 4x4 block uses the plain 4x4 transform),
// B slices and multiple reference pictures.
// Signals left unread on purpose: the engines' busy flags (the stages use done), the
// costs and vectors of the smaller motion partitions and the intra 4x4 decision (the
// macroblock is coded with the 16x16 partition or Intra_16x16 only), the unquantised
// coefficients of tq4x4, the upper local-memory address bits (the local memory holds 128
// words) and the completion flags of stages that finish in one step. The reset input
// also reaches an assertion, which samples it synchronously.
module svc_encoder #(
  parameter int MAX_W_MB = 120,   // widest picture in macroblocks (1920 pixels)
  parameter int SR       = 6      // motion search range, at most 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // host AHB 32-bit slave
  input  logic        s_hsel,
  input  logic [31:0] s_haddr,
  input  ahb_pkg::htrans_t s_htrans,
  input  logic        s_hwrite,
  input  logic [31:0] s_hwdata,
  input  logic        s_hready,
  output logic [31:0] s_hrdata,
  output logic        s_hreadyout,
  output logic        s_hresp,
  // AHB 64-bit master to external frame memory
  output logic [31:0] m_haddr,
  output ahb_pkg::htrans_t m_htrans,
  output logic        m_hwrite,
  output logic [2:0]  m_hsize,
  output logic [2:0]  m_hburst,
  output logic [63:0] m_hwdata,
  input  logic [63:0] m_hrdata,
  input  logic        m_hready,
  input  logic        m_hresp,
  // input picture, eight luma pixels per word in macroblock order
  input  logic        pix_valid,
  input  logic [63:0] pix_data,
  output logic        pix_ready,
  // encoded stream
  output logic        strm_valid,
  output logic [31:0] strm_word,
  // per-macroblock decision trace (valid for one cycle when stage 5 finishes)
  output logic        mbinfo_valid,
  output logic [15:0] mbinfo_idx,
  output logic [1:0]  mbinfo_sel,
  output logic signed [9:0] mbinfo_mv_x,
  output logic signed [9:0] mbinfo_mv_y,
  // slot statistics: length of the last slot in cycles, slots longer than the budget
  output logic [15:0] slot_cycles,
  output logic [15:0] slot_overruns,
  output logic        enc_done
);
  import svc_pkg::*;
  import ahb_pkg::*;
  localparam int W   = 16 + 2*SR;      // search window
  localparam int OFF = 8 - SR;         // window offset inside the 32x32 loaded area
  localparam int NS  = N_STAGES;
  localparam int LW  = MAX_W_MB * 16;  // line buffer length

  // per-stage macroblock context (the local memories between the engines), indexed by stage
  logic [15:0]        c_idx [NS];
  logic [7:0]         c_mbx [NS];
  logic [7:0]         c_mby [NS];
  logic [5:0]         c_qp [NS];
  pix_t               c_cur [NS][256];
  pix_t               c_win [NS][W*W];
  pix_t               c_base [NS][144];
  pix_t               c_up [NS][256];
  logic signed [7:0]  c_imv_x [NS];
  logic signed [7:0]  c_imv_y [NS];
  logic signed [9:0]  c_qmv_x [NS];
  logic signed [9:0]  c_qmv_y [NS];
  logic [17:0]        c_inter_cost [NS];
  pix_t               c_inter_pred [NS][256];
  logic [1:0]         c_i16_mode [NS];
  logic [1:0]         c_sel [NS];
  logic [15:0]        c_nzf [NS];
  pix_t               c_rec [NS][256];

  // ---------------------------------------------------------------- host registers
  logic        reg_start, il_enable;
  logic [5:0]  reg_qp;
  logic [15:0] num_mb, mb_finished;
  logic [7:0]  width_mb;
  logic [31:0] ref_base, base_base, rec_base, bits;
  logic        ctl_busy, ctl_done;

  host_if u_host (
    .clk, .rst_n, .hsel(s_hsel), .haddr(s_haddr), .htrans(s_htrans), .hwrite(s_hwrite),
    .hwdata(s_hwdata), .hready(s_hready), .hrdata(s_hrdata), .hreadyout(s_hreadyout),
    .hresp(s_hresp), .start(reg_start), .qp(reg_qp), .num_mb, .width_mb, .ref_base,
    .base_base, .rec_base, .il_enable, .busy(ctl_busy), .enc_done(ctl_done),
    .mb_finished, .bits
  );
  assign enc_done = ctl_done;

  // ---------------------------------------------------------------- pipeline control
  logic          slot_start;
  logic [NS-1:0] st_active, st_done;
  logic [15:0]   st_mb [NS];

  mb_pipe_ctrl #(.N_ST(NS), .SLOT(SLOT_CYCLES)) u_ctrl (
    .clk, .rst_n, .start(reg_start), .num_mb, .stage_done(st_done), .busy(ctl_busy),
    .done(ctl_done), .slot_start, .stage_active(st_active), .stage_mb(st_mb), .mb_finished,
    .last_slot_cycles(slot_cycles), .overruns(slot_overruns)
  );

  // ---------------------------------------------------------------- image buffer
  logic ib_valid, ib_take;
  pix_t ib_mb [256];
  image_buffer u_ib (
    .clk, .rst_n, .in_valid(pix_valid), .in_data(pix_data), .in_ready(pix_ready),
    .mb_valid(ib_valid), .mb(ib_mb), .mb_take(ib_take)
  );

  // ---------------------------------------------------------------- DMA and local memory
  logic        dma_start, dma_dir, dma_busy, dma_done;
  logic [31:0] dma_ext, dma_ystride;
  logic [15:0] dma_x, dma_y;
  logic [15:0] lm_addr;
  logic        lm_we;
  logic [63:0] lm_wdata, lm_rdata;
  logic [63:0] lm_words [128];

  dma u_dma (
    .clk, .rst_n, .start(dma_start), .dir(dma_dir), .ext_addr(dma_ext), .size(2'd3),
    .x_cnt(dma_x), .y_cnt(dma_y), .z_cnt(16'd1), .y_stride(dma_ystride), .z_stride(32'd0),
    .lm_base(16'd0), .busy(dma_busy), .done(dma_done),
    .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite), .hsize(m_hsize), .hburst(m_hburst),
    .hwdata(m_hwdata), .hrdata(m_hrdata), .hready(m_hready), .hresp(m_hresp),
    .lm_addr, .lm_we, .lm_wdata, .lm_rdata
  );

  local_mem #(.DEPTH(128)) u_lm (
    .clk, .we(lm_we), .waddr(lm_addr[6:0]), .wdata(lm_wdata), .words(lm_words)
  );

  // DMA jobs: 1 reference area, 2 base block, 3 rows above after deblocking, 4 restore
  typedef enum logic [2:0] {J_NONE, J_REF, J_BASE, J_TOPFIX, J_RESTORE} job_t;
  job_t job;
  logic need_ref, need_base, need_topfix;
  logic rs_req, rs_done_dma, rs_busy, rs_done;
  logic [31:0] rs_ext, rs_pitch;
  logic [63:0] rs_rdata;
  pix_t topfix [64];          // rows 12..15 of the macroblock above, after filtering
  logic [63:0] topfix_word;

  always_comb
    for (int k = 0; k < 8; k++) topfix_word[8*k +: 8] = topfix[int'(lm_addr[2:0])*8 + k];
  assign lm_rdata = (job == J_TOPFIX) ? topfix_word : rs_rdata;
  assign rs_done_dma = (job == J_RESTORE) && dma_done;

  logic [31:0] ref_pitch, base_pitch, rec_pitch;
  assign ref_pitch  = 32'(width_mb) * 32'd16 + 32'd32;
  assign base_pitch = 32'(width_mb) * 32'd8 + 32'd32;
  assign rec_pitch  = 32'(width_mb) * 32'd16;

  // ---------------------------------------------------------------- engines
  logic ime_start, ime_busy, ime_done;
  logic signed [7:0] ime_mvx [9], ime_mvy [9];
  logic [17:0] ime_cost [9];
  ime #(.SR(SR), .SUB(1'b1)) u_ime (
    .clk, .rst_n, .start(ime_start), .cur(c_cur[3]), .win(c_win[3]), .busy(ime_busy),
    .done(ime_done), .mv_x(ime_mvx), .mv_y(ime_mvy), .cost(ime_cost)
  );

  logic up_start, up_busy, up_done;
  pix_t up_out [256];
  upsample u_up (
    .clk, .rst_n, .start(up_start), .base(c_base[3]), .busy(up_busy), .done(up_done), .up(up_out)
  );

  logic fme_start, fme_busy, fme_done;
  logic signed [9:0] fme_qx, fme_qy;
  logic [17:0] fme_cost;
  pix_t fme_pred [256];
  fme_mc #(.SR(SR)) u_fme (
    .clk, .rst_n, .start(fme_start), .cur(c_cur[4]), .win(c_win[4]),
    .mv_x(c_imv_x[4]), .mv_y(c_imv_y[4]), .busy(fme_busy), .done(fme_done),
    .qmv_x(fme_qx), .qmv_y(fme_qy), .cost(fme_cost), .pred(fme_pred)
  );

  // original-pixel neighbours for the intra decision
  pix_t orig_line [LW];
  pix_t orig_left [16];
  pix_t orig_corner;
  pix_t md_top [20];
  logic md_start, md_busy, md_done;
  logic [1:0] md_mode;
  logic [17:0] md_cost, md_i4_cost;
  logic [3:0] md_i4_mode [16];
  logic md_top_ok, md_left_ok;
  assign md_top_ok  = c_mby[5] != 0;
  assign md_left_ok = c_mbx[5] != 0;
  always_comb begin
    int x0;
    x0 = int'(c_mbx[5]) * 16;
    for (int i = 0; i < 20; i++) begin
      int xi;
      xi = x0 + i;
      if (xi > int'(width_mb) * 16 - 1) xi = int'(width_mb) * 16 - 1;
      if (xi > LW - 1) xi = LW - 1;
      md_top[i] = orig_line[xi];
    end
  end
  intra_md u_md (
    .clk, .rst_n, .start(md_start), .cur(c_cur[5]), .top(md_top), .left(orig_left),
    .corner(orig_corner), .top_ok(md_top_ok), .left_ok(md_left_ok), .busy(md_busy),
    .done(md_done), .i16_mode(md_mode), .i16_cost(md_cost), .i4_mode(md_i4_mode),
    .i4_cost(md_i4_cost)
  );

  // inter-layer cost: SAD between the upsampled base block and the macroblock
  logic [17:0] il_cost;
  always_comb begin
    il_cost = '0;
    for (int i = 0; i < 256; i++) il_cost += 18'(iabs(int'(c_up[5][i]) - int'(c_cur[5][i])));
  end

  // stage 6: prediction, transform, coding, reconstruction
  pix_t rec_line [LW];
  pix_t rec_left [16];
  pix_t rec_corner;
  pix_t pr_top [16];
  pix_t pr_out [256];
  logic pr_ok;
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      int xi;
      xi = int'(c_mbx[6]) * 16 + i;
      if (xi > LW - 1) xi = LW - 1;
      pr_top[i] = rec_line[xi];
    end
  end
  prediction u_pred (
    .sel(c_sel[6]), .inter_pred(c_inter_pred[6]), .base_up(c_up[6]),
    .intra_mode(c_i16_mode[6]), .rec_top(pr_top), .rec_left(rec_left), .rec_corner,
    .top_ok(c_mby[6] != 0), .left_ok(c_mbx[6] != 0), .pred(pr_out), .pred_ok(pr_ok)
  );

  logic       tr_run;
  logic [4:0] tr_blk;
  coef_t tr_res [16], tr_w [16], tr_z [16], tr_r [16];
  pix_t  tr_pred4 [16], tr_rec4 [16];
  always_comb begin
    int bx, by;
    bx = int'(tr_blk[1:0]); by = int'(tr_blk[3:2]);
    for (int k = 0; k < 16; k++) begin
      int p;
      p = (4*by + k/4)*16 + 4*bx + k%4;
      tr_pred4[k] = pr_out[p];
      tr_res[k] = coef_t'(int'(c_cur[6][p]) - int'(pr_out[p]));
    end
  end
  tq4x4 u_tq (.x(tr_res), .qp(c_qp[6]), .dc_mode(2'd0), .intra(c_sel[6] != 2'd0), .w(tr_w), .z(tr_z));
  itiq4x4 u_itq (.z(tr_z), .qp(c_qp[6]), .dc_mode(2'd0), .use_dc(1'b0), .dc(16'sd0), .r(tr_r));
  recon u_rec (.pred(tr_pred4), .res(tr_r), .rec(tr_rec4));

  logic vlc_valid, vlc_ready, vlc_flush;
  logic [31:0] vlc_bits;
  vlc u_vlc (
    .clk, .rst_n, .blk_valid(vlc_valid), .levels(tr_z), .flush(vlc_flush), .ready(vlc_ready),
    .word_valid(strm_valid), .word(strm_word), .bit_count(vlc_bits)
  );
  assign bits = vlc_bits;
  assign vlc_valid = tr_run && vlc_ready && (tr_blk != 5'd16);

  // stage 7: deblocking
  pix_t db_line [4*LW];
  pix_t db_left [64], db_top [64], db_mb_out [256], db_left_out [64], db_top_out [64];
  logic db_start, db_busy, db_done;
  logic [2:0] bs_v [4], bs_h [4];
  logic [1:0] left_sel, top_sel [MAX_W_MB];
  always_comb begin
    for (int y = 0; y < 16; y++) for (int x = 0; x < 4; x++) db_left[y*4 + x] = c_rec[8][y*16 + 12 + x];
    for (int y = 0; y < 4; y++) for (int x = 0; x < 16; x++) begin
      int xi;
      xi = int'(c_mbx[7]) * 16 + x;
      if (xi > LW - 1) xi = LW - 1;
      db_top[y*16 + x] = db_line[y*LW + xi];
    end
  end
  always_comb begin
    logic cur_intra, l_intra, t_intra;
    int tmx;
    tmx = int'(c_mbx[7]);
    if (tmx > MAX_W_MB - 1) tmx = MAX_W_MB - 1;
    cur_intra = c_sel[7] != 2'd0;
    l_intra = left_sel != 2'd0;
    t_intra = top_sel[tmx] != 2'd0;
    for (int e = 0; e < 4; e++) begin
      logic nzv, nzh;
      nzv = 1'b0; nzh = 1'b0;
      for (int r = 0; r < 4; r++) begin
        nzv |= c_nzf[7][r*4 + e] || (e > 0 && c_nzf[7][r*4 + e - 1]);
        nzh |= c_nzf[7][e*4 + r] || (e > 0 && c_nzf[7][(e-1)*4 + r]);
      end
      if (e == 0) begin
        bs_v[e] = (cur_intra || l_intra) ? 3'd4 : nzv ? 3'd2 : 3'd1;
        bs_h[e] = (cur_intra || t_intra) ? 3'd4 : nzh ? 3'd2 : 3'd1;
      end else begin
        bs_v[e] = cur_intra ? 3'd3 : nzv ? 3'd2 : 3'd0;
        bs_h[e] = cur_intra ? 3'd3 : nzh ? 3'd2 : 3'd0;
      end
    end
  end
  deblock u_db (
    .clk, .rst_n, .start(db_start), .mb_in(c_rec[7]), .left_in(db_left), .top_in(db_top),
    .left_ok(c_mbx[7] != 0), .top_ok(c_mby[7] != 0), .qp(c_qp[7]), .bs_v, .bs_h,
    .busy(db_busy), .done(db_done), .mb_out(db_mb_out), .left_out(db_left_out), .top_out(db_top_out)
  );

  // stage 8: restore
  logic rs_start;
  restore u_rs (
    .clk, .rst_n, .start(rs_start), .mb(c_rec[8]), .mb_x(c_mbx[8]), .mb_y(c_mby[8]),
    .width_mb, .rec_base, .busy(rs_busy), .done(rs_done), .dma_req(rs_req),
    .dma_ext_addr(rs_ext), .dma_pitch(rs_pitch), .dma_done(rs_done_dma),
    .rd_addr(lm_addr[4:0]), .rd_data(rs_rdata)
  );

  // ---------------------------------------------------------------- stage sequencing
  logic [NS-1:0] st_fin;        // stage finished in this slot
  logic ime_fin, up_fin, s7_fin;

  // events of this cycle
  logic ev_take, ev_tr_end, ev_ref, ev_base;
  assign ev_take   = !slot_start && st_active[1] && !st_fin[1] && !need_ref && job != J_REF && ib_valid;
  assign ev_tr_end = tr_run && tr_blk == 5'd16 && vlc_ready;
  assign ev_ref    = dma_done && job == J_REF;
  assign ev_base   = dma_done && job == J_BASE;
  assign ib_take   = ev_take;

  // stage 5 decision: inter unless intra 16x16 or (when enabled) inter-layer is cheaper
  logic [1:0] dec_sel;
  always_comb begin
    dec_sel = 2'd0;
    if (md_cost < c_inter_cost[5]) dec_sel = 2'd1;
    if (il_enable && il_cost < ((dec_sel == 2'd1) ? md_cost : c_inter_cost[5])) dec_sel = 2'd2;
  end

  // line-buffer positions of the macroblocks in stages 5, 6 and 7
  int x5, x6, x7, m7;
  logic x5_ok, x6_ok;
  always_comb begin
    x5 = int'(c_mbx[5]) * 16; x6 = int'(c_mbx[6]) * 16; x7 = int'(c_mbx[7]) * 16;
    x5_ok = x5 + 15 < LW; x6_ok = x6 + 15 < LW;
    m7 = int'(c_mbx[7]);
    if (m7 > MAX_W_MB - 1) m7 = MAX_W_MB - 1;
  end

  logic tr_nz;                  // current 4x4 block has a non-zero level
  always_comb begin
    tr_nz = 1'b0;
    for (int k = 0; k < 16; k++) tr_nz |= (tr_z[k] != 0);
  end

  // next contents of context entries that are updated piecewise (whole entries are
  // written in the data block below)
  pix_t ref_win [W*W], base_blk [144], rec6_next [256], rec8_next [256];
  logic [15:0] nzf6_next;
  always_comb begin
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++)
      ref_win[y*W + x] = lm_words[(y + OFF)*4 + (x + OFF)/8][8*((x + OFF)%8) +: 8];
    for (int y = 0; y < 12; y++) for (int x = 0; x < 12; x++)
      base_blk[y*12 + x] = lm_words[y*3 + (x + 6)/8][8*((x + 6)%8) +: 8];
    rec6_next = c_rec[6];
    for (int k = 0; k < 16; k++)
      rec6_next[(4*int'(tr_blk[3:2]) + k/4)*16 + 4*int'(tr_blk[1:0]) + k%4] = tr_rec4[k];
    nzf6_next = c_nzf[6];
    nzf6_next[tr_blk[3:0]] = tr_nz;
    // the left neighbour (in stage 8) takes its filtered right columns
    rec8_next = c_rec[8];
    for (int y = 0; y < 16; y++) for (int x = 0; x < 4; x++)
      rec8_next[y*16 + 12 + x] = db_left_out[y*4 + x];
  end

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_done <= '0; st_fin <= '0;
      ime_start <= 1'b0; up_start <= 1'b0; fme_start <= 1'b0; md_start <= 1'b0;
      db_start <= 1'b0; rs_start <= 1'b0; dma_start <= 1'b0; vlc_flush <= 1'b0;
      ime_fin <= 1'b0; up_fin <= 1'b0; s7_fin <= 1'b0;
      need_ref <= 1'b0; need_base <= 1'b0; need_topfix <= 1'b0; job <= J_NONE;
      dma_dir <= 1'b0; dma_ext <= '0; dma_ystride <= '0; dma_x <= '0; dma_y <= '0;
      tr_run <= 1'b0; tr_blk <= '0; mbinfo_valid <= 1'b0; mbinfo_idx <= '0; mbinfo_sel <= '0;
      mbinfo_mv_x <= '0; mbinfo_mv_y <= '0; left_sel <= '0;
      for (int i = 0; i < MAX_W_MB; i++) top_sel[i] <= '0;
    end else begin
      st_done <= '0; ime_start <= 1'b0; up_start <= 1'b0; fme_start <= 1'b0;
      md_start <= 1'b0; db_start <= 1'b0; rs_start <= 1'b0; dma_start <= 1'b0;
      mbinfo_valid <= 1'b0;
      vlc_flush <= ctl_done;

      if (slot_start) begin
        st_fin <= 9'b1; ime_fin <= 1'b0; up_fin <= 1'b0; s7_fin <= !st_active[7];
        st_done[0] <= st_active[0];
        need_ref  <= st_active[1];
        need_base <= st_active[2];
        need_topfix <= 1'b0;
        ime_start <= st_active[3]; up_start <= st_active[3];
        fme_start <= st_active[4];
        md_start  <= st_active[5];
        tr_run <= st_active[6]; tr_blk <= '0;
        db_start <= st_active[7];
      end else begin
        // stage 1: current macroblock from the image buffer, once the reference is in
        if (ev_take) begin st_fin[1] <= 1'b1; st_done[1] <= 1'b1; end
        // stage 3: IME and upsampling
        if (ime_done) ime_fin <= 1'b1;
        if (up_done) up_fin <= 1'b1;
        if (st_active[3] && !st_fin[3] && (ime_fin || ime_done) && (up_fin || up_done)) begin
          st_fin[3] <= 1'b1; st_done[3] <= 1'b1;
        end
        // stage 4: FME / MC
        if (fme_done) st_done[4] <= 1'b1;
        // stage 5: choice of prediction
        if (md_done) begin
          mbinfo_valid <= 1'b1; mbinfo_idx <= c_idx[5]; mbinfo_sel <= dec_sel;
          mbinfo_mv_x <= c_qmv_x[5]; mbinfo_mv_y <= c_qmv_y[5];
          st_done[5] <= 1'b1;
        end
        // stage 6: one 4x4 block per VLC acceptance
        if (vlc_valid) tr_blk <= tr_blk + 1'b1;
        if (ev_tr_end) begin tr_run <= 1'b0; st_done[6] <= 1'b1; end
        // stage 7: deblocking, then the rows above go back to memory
        if (db_done) begin
          top_sel[m7] <= c_sel[7];
          left_sel <= c_sel[7];
          if (c_mby[7] != 0) need_topfix <= 1'b1;
          else begin st_done[7] <= 1'b1; st_fin[7] <= 1'b1; end
          s7_fin <= 1'b1;
        end
        // stage 8: restore after stage 7 has updated the left neighbour
        if (st_active[8] && !st_fin[8] && !rs_busy && s7_fin && !rs_start) begin
          rs_start <= 1'b1; st_fin[8] <= 1'b1;
        end
        if (rs_done) st_done[8] <= 1'b1;

        // DMA jobs
        if (job == J_NONE && !dma_busy && !dma_start) begin
          if (need_ref) begin
            job <= J_REF; dma_start <= 1'b1; dma_dir <= 1'b0; dma_x <= 16'd4; dma_y <= 16'd32;
            dma_ystride <= ref_pitch;
            dma_ext <= ref_base + (32'(c_mby[1]) * 32'd16 - 32'd8) * ref_pitch + 32'(c_mbx[1]) * 32'd16 - 32'd8;
          end else if (need_base) begin
            job <= J_BASE; dma_start <= 1'b1; dma_dir <= 1'b0; dma_x <= 16'd3; dma_y <= 16'd12;
            dma_ystride <= base_pitch;
            dma_ext <= base_base + (32'(c_mby[2]) * 32'd8 - 32'd2) * base_pitch + 32'(c_mbx[2]) * 32'd8 - 32'd8;
          end else if (need_topfix) begin
            job <= J_TOPFIX; dma_start <= 1'b1; dma_dir <= 1'b1; dma_x <= 16'd2; dma_y <= 16'd4;
            dma_ystride <= rec_pitch;
            dma_ext <= rec_base + (32'(c_mby[7]) * 32'd16 - 32'd4) * rec_pitch + 32'(c_mbx[7]) * 32'd16;
          end else if (rs_req && !rs_done) begin
            job <= J_RESTORE; dma_start <= 1'b1; dma_dir <= 1'b1; dma_x <= 16'd2; dma_y <= 16'd16;
            dma_ystride <= rs_pitch; dma_ext <= rs_ext;
          end
        end
        if (dma_done) begin
          job <= J_NONE;
          case (job)
            J_REF:    need_ref <= 1'b0;
            J_BASE:   begin need_base <= 1'b0; st_done[2] <= 1'b1; end
            J_TOPFIX: begin need_topfix <= 1'b0; st_done[7] <= 1'b1; st_fin[7] <= 1'b1; end
            default: ;
          endcase
        end
      end
    end
  end

  // data: macroblock contexts, line buffers and neighbour registers
  always_ff @(posedge clk) begin
    if (slot_start) begin
      // contexts move one stage on with their macroblocks
      for (int s = NS-1; s > 0; s--) begin
        c_idx[s] <= c_idx[s-1];
        c_mbx[s] <= c_mbx[s-1];
        c_mby[s] <= c_mby[s-1];
        c_qp[s] <= c_qp[s-1];
        c_cur[s] <= c_cur[s-1];
        c_win[s] <= c_win[s-1];
        c_base[s] <= c_base[s-1];
        c_up[s] <= c_up[s-1];
        c_imv_x[s] <= c_imv_x[s-1];
        c_imv_y[s] <= c_imv_y[s-1];
        c_qmv_x[s] <= c_qmv_x[s-1];
        c_qmv_y[s] <= c_qmv_y[s-1];
        c_inter_cost[s] <= c_inter_cost[s-1];
        c_inter_pred[s] <= c_inter_pred[s-1];
        c_i16_mode[s] <= c_i16_mode[s-1];
        c_sel[s] <= c_sel[s-1];
        c_nzf[s] <= c_nzf[s-1];
        c_rec[s] <= c_rec[s-1];
      end
      // stage 0: parameters
      c_idx[0] <= st_mb[0];
      c_mbx[0] <= 8'(st_mb[0] % 16'(width_mb));
      c_mby[0] <= 8'(st_mb[0] / 16'(width_mb));
      c_qp[0]  <= reg_qp;
    end else begin
      if (ev_take) c_cur[1] <= ib_mb;
      if (ev_ref) c_win[1] <= ref_win;
      if (ev_base) c_base[2] <= base_blk;
      if (ime_done) begin c_imv_x[3] <= ime_mvx[0]; c_imv_y[3] <= ime_mvy[0]; end
      if (up_done) c_up[3] <= up_out;
      if (fme_done) begin
        c_qmv_x[4] <= fme_qx; c_qmv_y[4] <= fme_qy; c_inter_cost[4] <= fme_cost;
        c_inter_pred[4] <= fme_pred;
      end
      if (md_done) begin
        c_sel[5] <= dec_sel; c_i16_mode[5] <= md_mode;
        // original pixels become the neighbours of the next macroblocks
        if (x5_ok) begin
          orig_corner <= orig_line[x5 + 15];
          for (int i = 0; i < 16; i++) orig_line[x5 + i] <= c_cur[5][15*16 + i];
        end
        for (int i = 0; i < 16; i++) orig_left[i] <= c_cur[5][i*16 + 15];
      end
      if (vlc_valid) begin c_rec[6] <= rec6_next; c_nzf[6] <= nzf6_next; end
      if (ev_tr_end) begin
        // unfiltered reconstruction for the intra prediction of the next macroblocks
        if (x6_ok) begin
          rec_corner <= rec_line[x6 + 15];
          for (int i = 0; i < 16; i++) rec_line[x6 + i] <= c_rec[6][15*16 + i];
        end
        for (int i = 0; i < 16; i++) rec_left[i] <= c_rec[6][i*16 + 15];
      end
      if (db_done) begin
        c_rec[7] <= db_mb_out;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 16; x++)
          if (x7 + x < LW) db_line[y*LW + x7 + x] <= db_mb_out[(12 + y)*16 + x];
        if (c_mbx[7] != 0) begin
          c_rec[8] <= rec8_next;
          for (int y = 12; y < 16; y++) for (int x = 0; x < 4; x++)
            if (x7 - 4 + x >= 0 && x7 - 4 + x < LW) db_line[(y - 12)*LW + x7 - 4 + x] <= db_left_out[y*4 + x];
        end
        if (c_mby[7] != 0) topfix <= db_top_out;
      end
    end
  end

  // stage 6 only runs once the intra mode chosen in stage 5 is usable here
  a_pred_ok: assert property (@(posedge clk) disable iff (!rst_n) tr_run |-> pr_ok);
endmodule
