// tb_svc_encoder: end-to-end test of the encoder top at its default parameters (the
// full-size configuration: 120-macroblock line buffers, search range 6).
// The testbench holds the external memory (ahb_mem_model) with a bordered reference
// picture and a bordered base-layer picture, programs the encoder through the host AHB
// slave, streams the input picture in and encodes a 3x2-macroblock picture twice.
// The picture is built so that each column has one right answer:
//   column 0  the reference moved by (2,1) pixels  -> inter, quarter-pel vector (8,4)
//   column 1  each row repeats the last pixel of column 0's row -> intra 16x16 (cost 0)
//   column 2  the 2x upsampled base-layer block -> inter-layer prediction
// Run 1 (qp 12, inter-layer on, random wait states on the memory bus): the decisions and
// vector are checked; every residual is zero, so the reconstructed picture written back
// must equal the input exactly (at qp 12 the deblocking filter cannot act), and the
// stream must be exactly one bit per 4x4 block. Run 2 (qp 40, inter-layer off, noise in
// column 0): decisions for columns 0 and 1, no inter-layer choice, and a bound on the
// mean reconstruction error; the deblocking filter must change pixels.
// Timing (the document's 600-cycle macroblock budget): every slot must end within 600
// cycles, the controller must count no overrun, and a whole encode of N macroblocks must
// take at most (N + 9) x 600 cycles.
// Counted mechanisms: the three predictions chosen, DMA beats / SEQ (burst) beats / wait
// cycles, input stalls, jobs of each DMA kind, pixels changed by deblocking.
module tb_svc_encoder;
  import svc_pkg::*;
  import ahb_pkg::*;
  localparam int WMB = 3, HMB = 2, NMB = WMB * HMB;
  localparam int PW = WMB * 16, PH = HMB * 16;
  localparam int RP = PW + 32, BP = PW / 2 + 32;              // pitches with borders
  localparam int REF_AREA = 0, BASE_AREA = 32'h2000, REC_BASE = 32'h4000;
  localparam int REF_BASE = REF_AREA + 16 * RP + 16;
  localparam int BASE_BASE = BASE_AREA + 16 * BP + 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        s_hsel = 0, s_hwrite = 0, s_hready = 1;
  logic [31:0] s_haddr = 0, s_hwdata = 0, s_hrdata;
  htrans_t     s_htrans = HTRANS_IDLE;
  logic        s_hreadyout, s_hresp;
  logic [31:0] m_haddr;
  htrans_t     m_htrans;
  logic        m_hwrite, m_hready, m_hresp;
  logic [2:0]  m_hsize, m_hburst;
  logic [63:0] m_hwdata, m_hrdata;
  logic        pix_valid = 0, pix_ready;
  logic [63:0] pix_data = 0;
  logic        strm_valid;
  logic [31:0] strm_word;
  logic        mbinfo_valid;
  logic [15:0] mbinfo_idx;
  logic [1:0]  mbinfo_sel;
  logic signed [9:0] mbinfo_mv_x, mbinfo_mv_y;
  logic [15:0] slot_cycles, slot_overruns;
  logic        enc_done;
  logic        waits = 0;

  svc_encoder dut (.*);
  ahb_mem_model #(.AW(16)) u_mem (
    .clk, .rst_n, .waits, .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite), .hsize(m_hsize),
    .hwdata(m_hwdata), .hrdata(m_hrdata), .hready(m_hready), .hresp(m_hresp)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ pictures
  pix_t cur [PH][PW];
  function automatic int rref(int x, int y); return int'(u_mem.mem[16'(REF_BASE + y * RP + x)]); endfunction
  function automatic int bpix(int x, int y); return int'(u_mem.mem[16'(BASE_BASE + y * BP + x)]); endfunction
  int f [2][4] = '{'{-1, 8, 28, -3}, '{-3, 28, 8, -1}};

  task automatic build(bit noise);
    for (int i = 0; i < 32'h4000; i++) u_mem.mem[i] = 8'($urandom);
    for (int i = 32'h4000; i < 32'h10000; i++) u_mem.mem[i] = 8'd0;
    for (int y = 0; y < PH; y++) begin
      for (int x = 0; x < 16; x++) begin
        int v;
        v = rref(x + 2, y + 1);
        if (noise) v = clip3(0, 255, v + int'($urandom_range(0, 12)) - 6);
        cur[y][x] = pix_t'(v);
      end
      for (int x = 16; x < 32; x++) cur[y][x] = cur[y][15];
    end
    for (int my = 0; my < HMB; my++)
      for (int oy = 0; oy < 16; oy++) for (int ox = 0; ox < 16; ox++) begin
        int s, x0, y0, e;
        x0 = (ox % 2) ? ox / 2 - 1 : ox / 2 - 2;
        y0 = (oy % 2) ? oy / 2 - 1 : oy / 2 - 2;
        s = 0;
        for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++)
          s += f[oy % 2][j] * f[ox % 2][i] * bpix(16 + x0 + i, my * 8 + y0 + j);
        e = (s + 512) >>> 10;
        cur[my * 16 + oy][32 + ox] = pix_t'(clip3(0, 255, e));
      end
  endtask

  // ------------------------------------------------------------------ host bus
  task automatic xfer(bit wr, logic [7:0] a, logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    s_hsel = 1; s_htrans = HTRANS_NONSEQ; s_hwrite = wr; s_haddr = {24'h0, a};
    @(negedge clk);
    s_htrans = HTRANS_IDLE; s_hsel = 0; s_hwdata = d;
    @(posedge clk); #1;
    rd = s_hrdata;
  endtask
  task automatic wr(logic [7:0] a, logic [31:0] d);
    logic [31:0] rd;
    xfer(1'b1, a, d, rd);
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    xfer(1'b0, a, 32'd0, d);
  endtask

  // ------------------------------------------------------------------ input stream
  bit feeding = 0;
  int stalls = 0;
  task automatic feed();
    for (int m = 0; m < NMB; m++)
      for (int w = 0; w < 32; w++) begin
        logic [63:0] d;
        for (int k = 0; k < 8; k++) d[8*k +: 8] = cur[(m / WMB) * 16 + w / 2][(m % WMB) * 16 + (w % 2) * 8 + k];
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        pix_valid = 1; pix_data = d;
        @(posedge clk);
        while (!pix_ready) begin stalls++; @(posedge clk); end
        @(negedge clk);
        pix_valid = 0;
      end
  endtask

  // ------------------------------------------------------------------ monitors
  int sel_seen [NMB];
  int mvx_seen [NMB], mvy_seen [NMB];
  int n_sel [3] = '{0, 0, 0};
  int words = 0, slots = 0, max_slot = 0;
  int db_changed = 0, n_topfix = 0, n_restore = 0, n_ref = 0, n_base = 0;
  always @(posedge clk) if (rst_n) begin
    if (mbinfo_valid) begin
      sel_seen[mbinfo_idx] = int'(mbinfo_sel);
      mvx_seen[mbinfo_idx] = int'(mbinfo_mv_x); mvy_seen[mbinfo_idx] = int'(mbinfo_mv_y);
      n_sel[mbinfo_sel]++;
    end
    if (strm_valid) words++;
    if (dut.slot_start && dut.u_ctrl.mb_finished + dut.u_ctrl.stage_active != 0 && slots > 0) begin
      if (int'(slot_cycles) > max_slot) max_slot = int'(slot_cycles);
    end
    if (dut.slot_start) slots++;
    if (dut.db_done) for (int i = 0; i < 256; i++) if (dut.u_db.mb_out[i] != dut.u_db.mb_in[i]) db_changed++;
    if (dut.dma_start) case (dut.job)
      dut.J_REF: n_ref++;
      dut.J_BASE: n_base++;
      dut.J_TOPFIX: n_topfix++;
      dut.J_RESTORE: n_restore++;
      default: ;
    endcase
  end

  // ------------------------------------------------------------------ one encode
  task automatic encode(int qp, bit il, bit noise, output int cycles);
    logic [31:0] r;
    int t0;
    build(noise);
    for (int i = 0; i < NMB; i++) sel_seen[i] = -1;
    wr(8'h08, 32'(qp)); wr(8'h0C, NMB); wr(8'h10, WMB);
    wr(8'h14, REF_BASE); wr(8'h18, BASE_BASE); wr(8'h1C, REC_BASE); wr(8'h24, {31'd0, il});
    rd(8'h08, r); check(r == 32'(qp), "qp register");
    @(negedge clk);
    fork feed(); join_none
    wr(8'h00, 32'd1);
    t0 = $time;
    @(posedge enc_done);
    cycles = int'(($time - t0) / 10);
    repeat (20) @(posedge clk);
    rd(8'h04, r);
    check(r[1] == 1'b1 && r[0] == 1'b0, "status done, not busy");
    check(r[31:16] == 16'(NMB), "macroblocks finished");
    check(slot_overruns == 0, "no slot over 600 cycles");
    check(cycles <= (NMB + 9) * SLOT_CYCLES, $sformatf("encode time %0d", cycles));
    for (int i = 0; i < NMB; i++) check(sel_seen[i] >= 0, "decision reported");
  endtask

  initial begin
    int cyc1, cyc2, bits1, words1;
    logic [31:0] r;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // run 1
    waits = 1;
    encode(12, 1'b1, 1'b0, cyc1);
    for (int i = 0; i < NMB; i++) begin
      check(sel_seen[i] == i % WMB, $sformatf("mb %0d choice %0d", i, sel_seen[i]));
      if (i % WMB == 0) check(mvx_seen[i] == 8 && mvy_seen[i] == 4,
                              $sformatf("mb %0d vector (%0d,%0d)", i, mvx_seen[i], mvy_seen[i]));
    end
    begin
      int bad;
      bad = 0;
      for (int y = 0; y < PH; y++) for (int x = 0; x < PW; x++) begin
        checks++;
        if (u_mem.mem[16'(REC_BASE + y * PW + x)] != cur[y][x]) begin
          bad++; failures++;
          if (bad < 5) $display("rec (%0d,%0d) %0d exp %0d", x, y, u_mem.mem[16'(REC_BASE + y * PW + x)], cur[y][x]);
        end
      end
    end
    rd(8'h20, r); bits1 = int'(r); words1 = words;
    check(bits1 == NMB * 16, $sformatf("stream bits %0d", bits1));
    check(words1 == (bits1 + 31) / 32, $sformatf("stream words %0d", words1));
    check(max_slot <= SLOT_CYCLES && max_slot > 0, $sformatf("longest slot %0d", max_slot));

    // run 2
    waits = 0;
    encode(40, 1'b0, 1'b1, cyc2);
    begin
      int err;
      err = 0;
      for (int i = 0; i < NMB; i++) begin
        if (i % WMB != 2) check(sel_seen[i] == i % WMB, $sformatf("run 2 mb %0d choice %0d", i, sel_seen[i]));
        check(sel_seen[i] != 2, "no inter-layer choice when disabled");
      end
      for (int y = 0; y < PH; y++) for (int x = 0; x < PW; x++)
        err += iabs(int'(u_mem.mem[16'(REC_BASE + y * PW + x)]) - int'(cur[y][x]));
      check(err < 12 * PW * PH, $sformatf("run 2 mean error %0d/%0d", err, PW * PH));
    end
    rd(8'h20, r);
    check(int'(r) > bits1, "run 2 adds bits");
    check(words >= (int'(r) + 31) / 32 - 1, "run 2 stream words");
    check(db_changed > 0, "deblocking changed pixels");
    check(n_topfix == 2 * (NMB - WMB) && n_restore == 2 * NMB, "write-back jobs");

    $display("encode cycles run1=%0d run2=%0d longest slot=%0d", cyc1, cyc2, max_slot);
    $display("choices inter=%0d intra=%0d inter-layer=%0d", n_sel[0], n_sel[1], n_sel[2]);
    $display("dma jobs ref=%0d base=%0d topfix=%0d restore=%0d", n_ref, n_base, n_topfix, n_restore);
    $display("bus beats=%0d seq=%0d nonseq=%0d waits=%0d input stalls=%0d deblocked pixels=%0d",
             u_mem.beats, u_mem.seq, u_mem.nonseq, u_mem.wait_cycles, stalls, db_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
