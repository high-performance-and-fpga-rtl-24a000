// image_buffer: input picture buffer. Incoming luma pixels arrive eight per 64-bit word,
// in macroblock order (32 words per macroblock, two words per row, pixel k of a word in
// bits [8k+7:8k]). Two macroblock banks work as a ping-pong buffer: one fills from the
// input while the other is held for the encoder. `mb_valid` says the read bank holds a
// complete macroblock; `mb_take` releases it. The input is stalled (`in_ready` low)
// while both banks are full.
// The document names the image buffer block and its local memory between the YUV input
// and the bus; its organisation here is this design's own.
module image_buffer (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [63:0]   in_data,
  output logic          in_ready,
  output logic          mb_valid,
  output svc_pkg::pix_t mb [256],
  input  logic          mb_take
);
  import svc_pkg::*;
  pix_t bank [2][256];
  logic [1:0] full;
  logic wsel, rsel;
  logic [4:0] widx;

  assign in_ready = !full[wsel];
  assign mb_valid = full[rsel];
  always_comb for (int i = 0; i < 256; i++) mb[i] = bank[rsel][i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wsel <= 1'b0; rsel <= 1'b0; widx <= '0;
    end else begin
      if (in_valid && in_ready) begin
        for (int k = 0; k < 8; k++) bank[wsel][int'(widx)*8 + k] <= in_data[8*k +: 8];
        widx <= widx + 1'b1;
        if (widx == 5'd31) begin full[wsel] <= 1'b1; wsel <= !wsel; end
      end
      if (mb_take && full[rsel]) begin
        full[rsel] <= 1'b0; rsel <= !rsel;
      end
    end
  end
endmodule
