// tb_dma: the testbench holds an AHB memory (byte array, optional random wait states)
// and a local memory. Random 1-, 2- and 3-D transfers of every element size are run in
// both directions and the destination is compared with addresses computed here; the
// run time without wait states must be elements + 1 cycles. Counts SEQ beats and wait
// states so that bursts and stalls are known to have happened, and checks that no SEQ
// beat starts a new 1 KB page (a burst must restart with NONSEQ there).
module tb_dma;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, dir, busy, done;
  logic [31:0] ext_addr, y_stride, z_stride;
  logic [1:0] size;
  logic [15:0] x_cnt, y_cnt, z_cnt, lm_base;
  logic [31:0] haddr;
  htrans_t htrans;
  logic hwrite, hresp;
  logic [2:0] hsize, hburst;
  logic [63:0] hwdata, hrdata;
  logic hready;
  logic [15:0] lm_addr;
  logic lm_we;
  logic [63:0] lm_wdata, lm_rdata;
  int checks = 0, failures = 0;
  logic [7:0] mem [65536];
  logic [63:0] lmem [1024];
  int n_seq = 0, n_wait = 0;
  bit waits = 0;

  dma dut (.*);
  always #5 clk = ~clk;
  assign hresp = 1'b0;
  assign lm_rdata = lmem[lm_addr[9:0]];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AHB memory slave
  logic dph; logic [31:0] daddr; logic dwr; logic [2:0] dsz;
  always_comb begin
    hrdata = '0;
    for (int b = 0; b < 8; b++) hrdata[8*b +: 8] = mem[{daddr[15:3], 3'(b)}];
  end
  always @(posedge clk) begin
    if (!rst_n) begin dph <= 0; hready <= 1; end
    else begin
      if (hready) begin
        if (dph && dwr) for (int b = 0; b < (1 << dsz); b++) mem[16'(daddr + 32'(b))] <= hwdata[8*(daddr[2:0] + 3'(b)) +: 8];
        dph <= (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
        daddr <= haddr; dwr <= hwrite; dsz <= hsize;
        if (htrans == HTRANS_SEQ) n_seq++;
        // a burst may not cross a 1 KB boundary
        if (htrans == HTRANS_SEQ) begin checks++; if (haddr[9:0] == 10'd0) failures++; end
      end
      hready <= waits ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (waits && !hready) n_wait++;
    end
  end
  always @(posedge clk) if (lm_we) lmem[lm_addr[9:0]] <= lm_wdata;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int es, n, t0, cyc;
      waits = t[0];
      dir = t[1];
      size = 2'($urandom_range(0, 3));
      es = 1 << size;
      x_cnt = 16'($urandom_range(1, 12)); y_cnt = 16'($urandom_range(1, 4)); z_cnt = 16'($urandom_range(1, 3));
      if (t % 8 == 2) begin y_cnt = 1; z_cnt = 1; x_cnt = 16'(1024 / es + 4); end   // crosses 1 KB
      y_stride = 32'(x_cnt * es + es * $urandom_range(0, 8));
      z_stride = y_stride * 32'(y_cnt) + 32'(es * $urandom_range(0, 8) * 8);
      ext_addr = 32'(($urandom_range(0, 2000)) * es) + 32'h1000;
      lm_base = 16'($urandom_range(0, 100));
      n = x_cnt * y_cnt * z_cnt;
      for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);
      for (int i = 0; i < 1024; i++) lmem[i] = {$urandom, $urandom};
      @(negedge clk); start = 1; t0 = $time;
      @(negedge clk); start = 0;
      @(posedge done); cyc = ($time - t0) / 10;
      @(negedge clk); @(negedge clk);
      if (!waits) begin checks++; if (cyc != n + 1) begin failures++; $display("cycles %0d for %0d", cyc, n); end end
      for (int z = 0; z < z_cnt; z++) for (int y = 0; y < y_cnt; y++) for (int x = 0; x < x_cnt; x++) begin
        int a, li;
        logic [63:0] ev, got;
        a = int'(ext_addr) + z*int'(z_stride) + y*int'(y_stride) + x*es;
        li = int'(lm_base) + (z*int'(y_cnt) + y)*int'(x_cnt) + x;
        ev = '0;
        for (int b = 0; b < es; b++) ev[8*b +: 8] = mem[16'(a + b)];
        got = lmem[li];
        if (dir) begin
          for (int b = es; b < 8; b++) got[8*b +: 8] = 8'h0;
        end
        checks++;
        if (ev !== got) begin failures++; if (failures < 8) $display("t%0d dir%0d size%0d (%0d,%0d,%0d) ext %h lm %h", t, dir, size, x, y, z, ev, got); end
      end
    end
    checks += 2;
    if (n_seq == 0) failures++;
    if (n_wait == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
