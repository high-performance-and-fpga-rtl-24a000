// host_if: host register interface, an AHB 32-bit slave (zero wait states, OKAY only).
// The host processor programs the encoder and polls it through these registers
// (byte offsets):
//   0x00 CTRL      W   bit 0: write 1 to start encoding (one-cycle `start` pulse)
//   0x04 STATUS    R   bit 0 busy, bit 1 done since the last start, [31:16] MBs finished
//   0x08 QP        RW  [5:0] quantisation parameter
//   0x0C NUM_MB    RW  [15:0] macroblocks to encode
//   0x10 WIDTH_MB  RW  [7:0] picture width in macroblocks
//   0x14 REF_BASE  RW  reference picture address in external memory
//   0x18 BASE_BASE RW  base-layer picture address (spatial layer below)
//   0x1C REC_BASE  RW  reconstructed picture address
//   0x20 BITS      R   bits produced by the entropy coder
//   0x24 MODE      RW  bit 0: allow inter-layer prediction
// The address phase is registered and the write data taken in the data phase, as AHB
// requires; reads return the register selected in the address phase.
// Following the design: a host interface on a 32-bit AHB slave port. The register map is
// this design's own.
module host_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  ahb_pkg::htrans_t htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output logic        hresp,
  // to and from the encoder
  output logic        start,
  output logic [5:0]  qp,
  output logic [15:0] num_mb,
  output logic [7:0]  width_mb,
  output logic [31:0] ref_base,
  output logic [31:0] base_base,
  output logic [31:0] rec_base,
  output logic        il_enable,
  input  logic        busy,
  input  logic        enc_done,
  input  logic [15:0] mb_finished,
  input  logic [31:0] bits
);
  import ahb_pkg::*;
  logic       wr_pend;
  logic [5:0] wr_reg;
  logic       done_flag;

  assign hreadyout = 1'b1;
  assign hresp = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0; wr_reg <= '0; start <= 1'b0; done_flag <= 1'b0;
      qp <= 6'd28; num_mb <= '0; width_mb <= 8'd1; ref_base <= '0; base_base <= '0; rec_base <= '0;
      il_enable <= 1'b0; hrdata <= '0;
    end else begin
      start <= 1'b0;
      if (enc_done) done_flag <= 1'b1;
      if (wr_pend) begin
        case (wr_reg)
          6'h00: if (hwdata[0]) begin start <= 1'b1; done_flag <= 1'b0; end
          6'h02: qp <= hwdata[5:0];
          6'h03: num_mb <= hwdata[15:0];
          6'h04: width_mb <= hwdata[7:0];
          6'h05: ref_base <= hwdata;
          6'h06: base_base <= hwdata;
          6'h07: rec_base <= hwdata;
          6'h09: il_enable <= hwdata[0];
          default: ;
        endcase
      end
      wr_pend <= 1'b0;
      if (hready && hsel && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ)) begin
        if (hwrite) begin
          wr_pend <= 1'b1; wr_reg <= haddr[7:2];
        end else begin
          case (haddr[7:2])
            6'h01: hrdata <= {mb_finished, 14'd0, done_flag, busy};
            6'h02: hrdata <= {26'd0, qp};
            6'h03: hrdata <= {16'd0, num_mb};
            6'h04: hrdata <= {24'd0, width_mb};
            6'h05: hrdata <= ref_base;
            6'h06: hrdata <= base_base;
            6'h07: hrdata <= rec_base;
            6'h08: hrdata <= bits;
            6'h09: hrdata <= {31'd0, il_enable};
            default: hrdata <= '0;
          endcase
        end
      end
    end
  end
endmodule
