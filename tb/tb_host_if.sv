// tb_host_if: AHB writes and read-backs of every RW register (back-to-back transfers,
// so address and data phases overlap), the start pulse from CTRL and the STATUS/BITS
// read-only values.
module tb_host_if;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hsel, hwrite, hready, hreadyout, hresp;
  logic [31:0] haddr, hwdata, hrdata;
  htrans_t htrans;
  logic start, il_enable, busy, enc_done;
  logic [5:0] qp;
  logic [15:0] num_mb, mb_finished;
  logic [7:0] width_mb;
  logic [31:0] ref_base, base_base, rec_base, bits;
  int checks = 0, failures = 0, starts = 0;
  host_if dut (.*);
  always #5 clk = ~clk;
  assign hready = hreadyout;
  always @(posedge clk) if (start) starts++;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // one transfer; data phase driven in the following cycle
  task automatic xfer(bit wr, logic [7:0] a, logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = wr; haddr = {24'h0, a};
    @(negedge clk);
    htrans = HTRANS_IDLE; hsel = 0; hwdata = d;
    @(posedge clk); #1;
    rd = hrdata;
  endtask
  initial begin
    logic [31:0] rd, vals [10];
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0; haddr = 0; hwdata = 0;
    busy = 1; enc_done = 0; mb_finished = 16'd42; bits = 32'h1234_5678;
    repeat (3) @(posedge clk);
    rst_n = 1;
    vals[2] = 32'd33; vals[3] = 32'd120; vals[4] = 32'd80; vals[5] = 32'h1000_0000;
    vals[6] = 32'h2000_0000; vals[7] = 32'h3000_0000; vals[9] = 32'd1;
    foreach (vals[r]) if (r >= 2 && r != 8) xfer(1, 8'(4*r), vals[r], rd);
    checks += 7;
    if (qp != 33) failures++;
    if (num_mb != 120) failures++;
    if (width_mb != 80) failures++;
    if (ref_base != 32'h1000_0000) failures++;
    if (base_base != 32'h2000_0000) failures++;
    if (rec_base != 32'h3000_0000) failures++;
    if (il_enable != 1) failures++;
    foreach (vals[r]) if (r >= 2 && r != 8) begin
      xfer(0, 8'(4*r), 0, rd);
      checks++; if (rd != vals[r]) begin failures++; $display("reg %0d read %h", r, rd); end
    end
    xfer(1, 8'h00, 32'd1, rd);
    repeat (2) @(posedge clk);
    checks++; if (starts != 1) failures++;
    enc_done = 1; @(negedge clk); enc_done = 0;
    xfer(0, 8'h04, 0, rd);
    checks++; if (rd != {16'd42, 14'd0, 1'b1, 1'b1}) begin failures++; $display("status %h", rd); end
    xfer(0, 8'h20, 0, rd);
    checks++; if (rd != 32'h1234_5678) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
