// sad_pe: SAD processing element of the motion estimator.
// Each cycle it takes eight pixels of the current block (ci) and eight of the reference
// (pe), packed as 64-bit words with pixel k in bits [8k+7:8k]. Three register stages:
//   1. eight absolute differences diff0..diff7 (8 bits each);
//   2. two 10-bit partial sums, sum0 = diff0+..+diff3 and sum1 = diff4+..+diff7;
//   3. the 16-bit accumulator acc += sum0 + sum1.
// The lane split, the register names and widths and the three-stage pipeline follow the
// processing-element figure of the design; the control signals are this design's own.
// Interface: assert `valid` with each word pair, `first` with the first word of a block
// (restarts the accumulator) and `last` with its final word. `done` pulses three cycles
// after the `last` word, with the block's SAD on `sad`. Words may arrive every cycle and
// blocks back to back.
module sad_pe (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        first,
  input  logic        last,
  input  logic [63:0] pe,     // reference pixels
  input  logic [63:0] ci,     // current pixels
  output logic [15:0] sad,
  output logic        done
);
  logic [7:0] diff [8];
  logic [9:0] sum0, sum1;
  logic [15:0] acc;
  logic v1, f1, l1, v2, f2, l2;

  // stage 1: absolute differences
  always_ff @(posedge clk) begin
    for (int k = 0; k < 8; k++) begin
      if (pe[8*k +: 8] > ci[8*k +: 8]) diff[k] <= pe[8*k +: 8] - ci[8*k +: 8];
      else                             diff[k] <= ci[8*k +: 8] - pe[8*k +: 8];
    end
  end

  // stage 2: two adder trees of four
  always_ff @(posedge clk) begin
    sum0 <= 10'(diff[0]) + 10'(diff[1]) + 10'(diff[2]) + 10'(diff[3]);
    sum1 <= 10'(diff[4]) + 10'(diff[5]) + 10'(diff[6]) + 10'(diff[7]);
  end

  // stage 3: accumulate
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (v2) acc <= (f2 ? 16'd0 : acc) + 16'(sum0) + 16'(sum1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, f1, l1, v2, f2, l2, done} <= '0;
    end else begin
      v1 <= valid; f1 <= first; l1 <= last & valid;
      v2 <= v1;    f2 <= f1;    l2 <= l1;
      done <= l2;
    end
  end

  assign sad = acc;
endmodule
