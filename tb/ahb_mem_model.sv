// ahb_mem_model: behavioural external frame memory for the testbenches, an AHB-Lite
// slave of 64-bit data width holding a byte array of 2^AW bytes.
// Address phase on a cycle with hready high and htrans NONSEQ/SEQ; the data phase is the
// next cycle that ends with hready high. Byte lanes follow the low address bits. When
// `waits` is set, hready is low on about one cycle in four (random wait states).
// Counters: beats (transfers completed), seq (SEQ beats, i.e. inside bursts), nonseq,
// wait_cycles. The memory contents are accessed hierarchically by the testbench (mem).
// hresp is always OKAY. Not synthesisable; the external memory itself is outside the
// design.
module ahb_mem_model #(
  parameter int AW = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             waits,
  input  logic [31:0]      haddr,
  input  ahb_pkg::htrans_t htrans,
  input  logic             hwrite,
  input  logic [2:0]       hsize,
  input  logic [63:0]      hwdata,
  output logic [63:0]      hrdata,
  output logic             hready,
  output logic             hresp
);
  import ahb_pkg::*;
  logic [7:0] mem [1 << AW];
  int beats = 0, seq = 0, nonseq = 0, wait_cycles = 0;
  logic dph = 0, dwr = 0;
  logic [31:0] daddr = 0;
  logic [2:0] dsz = 0;

  assign hresp = 1'b0;
  always_comb begin
    hrdata = '0;
    for (int b = 0; b < 8; b++) hrdata[8*b +: 8] = mem[AW'({daddr[AW-1:3], 3'(b)})];
  end
  always @(posedge clk) begin
    if (!rst_n) begin dph <= 0; hready <= 1; end
    else begin
      if (hready) begin
        if (dph) begin
          beats++;
          if (dwr) for (int b = 0; b < (1 << dsz); b++)
            mem[AW'(daddr + 32'(b))] <= hwdata[8*(daddr[2:0] + 3'(b)) +: 8];
        end
        dph <= (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
        daddr <= haddr; dwr <= hwrite; dsz <= hsize;
        if (htrans == HTRANS_SEQ) seq++;
        if (htrans == HTRANS_NONSEQ) nonseq++;
      end else wait_cycles++;
      hready <= waits ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end
endmodule
