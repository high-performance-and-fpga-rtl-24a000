// restore: write-back of a finished (deblocked) macroblock to the reconstructed picture
// in external memory. On `start` it stores the macroblock and its position and programs
// the DMA channel for a 2-D transfer of 16 rows of two 64-bit words, row pitch equal to
// the picture width: ext address = rec_base + (mb_y*16)*pitch + mb_x*16. While the DMA
// runs, restore serves the DMA's local-memory reads (word n = row n/2, half n%2). `done`
// follows the DMA's completion.
// The document names the ReStore block and its path to external memory through the DMA;
// the transfer shape is this design's own.
module restore (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  svc_pkg::pix_t mb [256],
  input  logic [7:0]    mb_x,
  input  logic [7:0]    mb_y,
  input  logic [7:0]    width_mb,
  input  logic [31:0]   rec_base,
  output logic          busy,
  output logic          done,
  // DMA request
  output logic          dma_req,
  output logic [31:0]   dma_ext_addr,
  output logic [31:0]   dma_pitch,
  input  logic          dma_done,
  // DMA local read port
  input  logic [4:0]    rd_addr,
  output logic [63:0]   rd_data
);
  import svc_pkg::*;
  pix_t store [256];
  always_comb
    for (int k = 0; k < 8; k++) rd_data[8*k +: 8] = store[int'(rd_addr)*8 + k];

  always_ff @(posedge clk) if (start && !busy) store <= mb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; dma_req <= 1'b0; dma_ext_addr <= '0; dma_pitch <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; dma_req <= 1'b1;
        dma_pitch <= 32'(width_mb) * 32'd16;
        dma_ext_addr <= rec_base + 32'(mb_y) * 32'd16 * (32'(width_mb) * 32'd16) + 32'(mb_x) * 32'd16;
      end else if (busy && dma_done) begin
        busy <= 1'b0; dma_req <= 1'b0; done <= 1'b1;
      end
    end
  end
endmodule
