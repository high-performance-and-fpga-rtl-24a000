// dma: single-channel DMA controller with a 64-bit AHB master port.
// It moves a 1-, 2- or 3-dimensional block between external memory (on AHB) and a local
// memory port, in either direction: ext -> local (dir 0, AHB reads) or local -> ext
// (dir 1, AHB writes). The external address of element (x, y, z) is
//   ext_addr + z*z_stride + y*y_stride + x*2^size,
// with size 0/1/2/3 for byte/halfword/word/doubleword elements; local element n goes to
// or comes from local word lm_base + n, right-aligned (one element per local word).
// A 1-D transfer sets y_cnt = z_cnt = 1, a 2-D one z_cnt = 1.
// The AHB side is pipelined: the address phase of one beat overlaps the data phase of
// the previous one, and each row goes out as an undefined-length incrementing burst
// (NONSEQ then SEQ beats), restarted with NONSEQ at every 1 KB boundary. Wait states
// (HREADY low) stall both phases. With no wait states a transfer of N elements takes
// N + 1 cycles from `start` to `done`. The data is not buffered: each beat goes directly
// between the bus and the local port, and the local memory read is combinational.
// Following the design: AHB master, one channel for all modules, byte/halfword/word
// sizes, incrementing addresses, 1-/2-/3-D transfers, burst block transfers, no buffer
// memory, explicit source and destination addresses. This design's own: the register
// set, the 64-bit doubleword size, the 1 KB rule. Not built: multibank interleaving,
// packet mode and error responses (HRESP is ignored).
module dma (
  input  logic        clk,
  input  logic        rst_n,
  // channel programming
  input  logic        start,
  input  logic        dir,
  input  logic [31:0] ext_addr,
  input  logic [1:0]  size,
  input  logic [15:0] x_cnt,
  input  logic [15:0] y_cnt,
  input  logic [15:0] z_cnt,
  input  logic [31:0] y_stride,
  input  logic [31:0] z_stride,
  input  logic [15:0] lm_base,
  output logic        busy,
  output logic        done,
  // AHB master
  output logic [31:0] haddr,
  output ahb_pkg::htrans_t htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [63:0] hwdata,
  input  logic [63:0] hrdata,
  input  logic        hready,
  input  logic        hresp,
  // local memory port
  output logic [15:0] lm_addr,
  output logic        lm_we,
  output logic [63:0] lm_wdata,
  input  logic [63:0] lm_rdata
);
  import ahb_pkg::*;
  // address phase
  logic        ap_valid, ap_seq;
  logic [31:0] ap_addr, row_addr, plane_addr;
  logic [15:0] ap_idx, cx, cy, cz;
  // data phase
  logic        dp_valid;
  logic [15:0] dp_idx;
  logic [2:0]  dp_lane;
  logic        r_dir;
  logic [1:0]  r_size;
  logic [31:0] r_ys, r_zs;
  logic [15:0] r_xc, r_yc, r_zc, r_base;

  logic [63:0] emask;
  always_comb begin
    case (r_size)
      2'd0:    emask = 64'h0000_0000_0000_00ff;
      2'd1:    emask = 64'h0000_0000_0000_ffff;
      2'd2:    emask = 64'h0000_0000_ffff_ffff;
      default: emask = '1;
    endcase
  end

  assign haddr  = ap_addr;
  assign htrans = !ap_valid ? HTRANS_IDLE : (ap_seq ? HTRANS_SEQ : HTRANS_NONSEQ);
  assign hwrite = r_dir;
  assign hsize  = {1'b0, r_size};
  assign hburst = HBURST_INCR;
  assign lm_addr  = r_base + dp_idx;
  assign hwdata   = (lm_rdata & emask) << (8 * dp_lane);
  assign lm_wdata = (hrdata >> (8 * dp_lane)) & emask;
  assign lm_we    = dp_valid && !r_dir && hready;

  logic [31:0] na;            // next address inside a row
  assign na = ap_addr + (32'd1 << r_size);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_valid <= 1'b0; ap_seq <= 1'b0; ap_addr <= '0; row_addr <= '0; plane_addr <= '0;
      ap_idx <= '0; cx <= '0; cy <= '0; cz <= '0;
      dp_valid <= 1'b0; dp_idx <= '0; dp_lane <= '0;
      r_dir <= 1'b0; r_size <= '0; r_ys <= '0; r_zs <= '0; r_xc <= '0; r_yc <= '0; r_zc <= '0; r_base <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        r_dir <= dir; r_size <= size; r_ys <= y_stride; r_zs <= z_stride;
        r_xc <= x_cnt; r_yc <= y_cnt; r_zc <= z_cnt; r_base <= lm_base;
        ap_valid <= (x_cnt != 0) && (y_cnt != 0) && (z_cnt != 0);
        ap_seq <= 1'b0; ap_addr <= ext_addr; row_addr <= ext_addr; plane_addr <= ext_addr;
        ap_idx <= '0; cx <= '0; cy <= '0; cz <= '0;
        if (x_cnt == 0 || y_cnt == 0 || z_cnt == 0) begin busy <= 1'b0; done <= 1'b1; end
      end else if (busy && hready) begin
        // data phase completes, address phase moves on
        dp_valid <= ap_valid; dp_idx <= ap_idx; dp_lane <= ap_addr[2:0];
        if (dp_valid && !ap_valid) begin busy <= 1'b0; done <= 1'b1; end
        if (ap_valid) begin
          ap_idx <= ap_idx + 1'b1;
          if (cx != r_xc - 1) begin
            cx <= cx + 1'b1;
            ap_addr <= na;
            ap_seq <= (na[9:0] != 10'd0);
          end else begin
            cx <= '0; ap_seq <= 1'b0;
            if (cy != r_yc - 1) begin
              cy <= cy + 1'b1;
              ap_addr <= row_addr + r_ys; row_addr <= row_addr + r_ys;
            end else begin
              cy <= '0;
              if (cz != r_zc - 1) begin
                cz <= cz + 1'b1;
                ap_addr <= plane_addr + r_zs; row_addr <= plane_addr + r_zs; plane_addr <= plane_addr + r_zs;
              end else ap_valid <= 1'b0;
            end
          end
        end
      end
    end
  end

  // AHB rules: the address of a SEQ beat follows the previous one by the element size
  property p_seq_incr;
    @(posedge clk) disable iff (!rst_n)
      (htrans == HTRANS_SEQ && $past(htrans != HTRANS_IDLE && hready)) |-> haddr == $past(haddr) + (32'd1 << hsize);
  endproperty
  a_seq_incr: assert property (p_seq_incr);
  // address and control hold while the slave inserts wait states
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      ($past(htrans != HTRANS_IDLE && !hready) && busy) |-> (haddr == $past(haddr) && htrans == $past(htrans)));
endmodule
