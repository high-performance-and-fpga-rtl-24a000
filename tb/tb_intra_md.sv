// tb_intra_md: checks the Intra_16x16 decision against SADs of the four predictions
// computed here, on random macroblocks with every availability combination, and the
// Intra_4x4 decision on striped macroblocks whose best mode is known: vertical stripes
// give mode 0 and horizontal stripes mode 1 in every block at zero cost. Also checks
// the run time of 272 cycles.
module tb_intra_md;
  import svc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t cur [256], top [20], left [16], corner;
  logic top_ok, left_ok, busy, done;
  logic [1:0] i16_mode;
  logic [17:0] i16_cost, i4_cost;
  logic [3:0] i4_mode [16];
  int checks = 0, failures = 0;

  intra_md dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pred16(int m, int x, int y);
    int s, h, v, a, b, c;
    case (m)
      0: return top[x];
      1: return left[y];
      2: begin
        s = 0;
        for (int i = 0; i < 16; i++) s += (top_ok ? top[i] : 0) + (left_ok ? left[i] : 0);
        if (top_ok && left_ok) return (s + 16) >> 5;
        if (top_ok || left_ok) return (s + 8) >> 4;
        return 128;
      end
      default: begin
        h = 0; v = 0;
        for (int i = 1; i <= 8; i++) begin
          h += i * (int'(top[7+i]) - (i == 8 ? int'(corner) : int'(top[7-i])));
          v += i * (int'(left[7+i]) - (i == 8 ? int'(corner) : int'(left[7-i])));
        end
        a = 16 * (left[15] + top[15]); b = (5*h + 32) >>> 6; c = (5*v + 32) >>> 6;
        return int'(clip1((a + b*(x-7) + c*(y-7) + 16) >>> 5));
      end
    endcase
  endfunction

  task automatic run(output int cyc);
    int t0;
    @(negedge clk); start = 1; t0 = $time;
    @(negedge clk); start = 0;
    @(posedge done);
    cyc = ($time - t0) / 10;
    @(negedge clk);
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int best, bm;
      for (int i = 0; i < 256; i++) cur[i] = pix_t'($urandom_range(60, 120) + (i % 16) * 3);
      for (int i = 0; i < 20; i++) top[i] = pix_t'($urandom_range(60, 140));
      for (int i = 0; i < 16; i++) left[i] = pix_t'($urandom_range(60, 140));
      corner = pix_t'($urandom);
      top_ok = t[0]; left_ok = t[1];
      run(cyc);
      checks++;
      if (cyc != 272) begin failures++; $display("cycles %0d", cyc); end
      best = 1 << 30; bm = 0;
      for (int m = 0; m < 4; m++) begin
        int s;
        if ((m == 0 && !top_ok) || (m == 1 && !left_ok) || (m == 3 && !(top_ok && left_ok))) continue;
        s = 0;
        for (int i = 0; i < 256; i++) s += iabs(pred16(m, i % 16, i / 16) - int'(cur[i]));
        if (s < best) begin best = s; bm = m; end
      end
      checks++;
      if (int'(i16_cost) != best || int'(i16_mode) != bm) begin
        failures++; $display("t%0d i16 got m%0d %0d exp m%0d %0d", t, i16_mode, i16_cost, bm, best);
      end
    end
    // striped macroblocks for the 4x4 decision
    for (int t = 0; t < 2; t++) begin
      top_ok = 1; left_ok = 1;
      for (int i = 0; i < 16; i++) begin
        int cv;
        cv = $urandom_range(0, 255);
        for (int j = 0; j < 16; j++) if (t == 0) cur[j*16 + i] = pix_t'(cv); else cur[i*16 + j] = pix_t'(cv);
        if (t == 0) begin top[i] = pix_t'(cv); left[i] = pix_t'($urandom); end
        else begin left[i] = pix_t'(cv); top[i] = pix_t'($urandom); end
      end
      for (int i = 16; i < 20; i++) top[i] = pix_t'($urandom);
      run(cyc);
      checks++;
      if (i4_cost != 0) begin failures++; $display("stripes %0d cost %0d", t, i4_cost); end
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (int'(i4_mode[b]) != t) begin failures++; $display("stripes %0d blk %0d mode %0d", t, b, i4_mode[b]); end
      end
      checks++;
      if (i16_cost != 0 || int'(i16_mode) != t) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
