// vlc: entropy coder for quantised 4x4 blocks with a bitstream packer.
// Each block is coded as ue(number of non-zero levels) followed, for every non-zero level
// in zig-zag order, by ue(zeros since the previous non-zero level) and se(level), with
// Exp-Golomb codes: ue(k) is k+1 written in 2*floor(log2(k+1))+1 bits with leading
// zeros; se(v) is ue(2v-1) for v > 0 and ue(-2v) otherwise. Levels are limited to
// +-2047, so one run/level pair is at most 32 bits and the packer emits at most one
// 32-bit word per cycle, MSB first. A block takes 18 cycles: the cycle that accepts it,
// one header cycle and one per coefficient. `ready` is high when a new block can be
// accepted. `flush` pads the last partial word with zeros and emits it.
// The document names the entropy coding (VLC) block only. The run/level Exp-Golomb code
// is this design's simplification: it is not the CAVLC or CABAC syntax of H.264.
module vlc (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           blk_valid,
  input  svc_pkg::coef_t levels [16],   // raster order
  input  logic           flush,
  output logic           ready,
  output logic           word_valid,
  output logic [31:0]    word,
  output logic [31:0]    bit_count
);
  import svc_pkg::*;
  localparam int ZZ [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  function automatic int bitlen(int v);     // number of bits of v > 0
    int n;
    n = 0;
    for (int i = 0; i < 31; i++) if ((v >> i) != 0) n = i + 1;
    return n;
  endfunction

  typedef enum logic [1:0] {IDLE, HDR, COEF} state_t;
  state_t state;
  coef_t lv [16];
  logic [4:0] idx;
  logic [3:0] run;
  logic [63:0] acc;
  logic [6:0] cnt;

  int nz;
  always_comb begin
    nz = 0;
    for (int k = 0; k < 16; k++) if (lv[k] != 0) nz++;
  end

  // code to append this cycle
  logic [31:0] code;
  logic [6:0] clen;
  always_comb begin
    int k, l1, l2, v, s;
    code = '0; clen = '0; k = 0; l1 = 0; l2 = 0; v = 0; s = 0;
    if (state == HDR) begin
      l1 = bitlen(nz + 1);
      code = 32'(nz + 1); clen = 7'(2*l1 - 1);
    end else if (state == COEF && lv[ZZ[idx[3:0]]] != 0) begin
      v = clip3(-2047, 2047, int'(lv[ZZ[idx[3:0]]]));
      s = (v > 0) ? 2*v - 1 : -2*v;
      k = int'(run);
      l1 = 2*bitlen(k + 1) - 1;
      l2 = 2*bitlen(s + 1) - 1;
      code = (32'(k + 1) << l2) | 32'(s + 1);
      clen = 7'(l1 + l2);
    end
  end

  assign ready = (state == IDLE);

  // accumulator after appending this cycle's code
  logic [63:0] nacc;
  logic [6:0] ncnt;
  assign nacc = acc | ((clen == 0) ? 64'd0 : (64'(code) << (7'd64 - cnt - clen)));
  assign ncnt = cnt + clen;

  // the block being coded
  always_ff @(posedge clk) if (state == IDLE && blk_valid) lv <= levels;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; idx <= '0; run <= '0; acc <= '0; cnt <= '0;
      word_valid <= 1'b0; word <= '0; bit_count <= '0;
    end else begin
      word_valid <= 1'b0;
      bit_count <= bit_count + 32'(clen);
      if (ncnt >= 7'd32) begin
        word_valid <= 1'b1; word <= nacc[63:32];
        acc <= nacc << 32; cnt <= ncnt - 7'd32;
      end else if (state == IDLE && flush && ncnt != 0) begin
        word_valid <= 1'b1; word <= nacc[63:32];
        acc <= '0; cnt <= '0;
      end else begin
        acc <= nacc; cnt <= ncnt;
      end
      case (state)
        IDLE: if (blk_valid) state <= HDR;
        HDR:  begin state <= COEF; idx <= '0; run <= '0; end
        COEF: begin
          if (lv[ZZ[idx[3:0]]] != 0) run <= '0; else run <= run + 1'b1;
          idx <= idx + 1'b1;
          if (idx == 5'd15) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
