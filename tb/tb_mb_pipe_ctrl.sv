// tb_mb_pipe_ctrl: simulated stage engines take a random number of cycles per slot
// (some beyond the 600-cycle budget). Checks that each slot starts every macroblock in
// the right stage, that macroblocks advance one stage per slot, the number of slots
// (N + 8), the overrun count and the finished count. Slots of exactly 600 and 601
// cycles are forced: only the second is an overrun. Every slot length reported by the
// controller is compared with the length measured here (cycles between slot starts
// minus the one advance cycle). The controller's outputs are ignored while reset is held.
module tb_mb_pipe_ctrl;
  localparam int N = 9;
  logic clk = 0, rst_n = 0, start = 0, busy, done, slot_start;
  logic [15:0] num_mb, mb_finished, last_slot_cycles, overruns;
  logic [N-1:0] stage_done, stage_active;
  logic [15:0] stage_mb [N];
  int checks = 0, failures = 0, slots = 0, exp_over = 0;
  int lat [N];
  mb_pipe_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // stage engines
  always @(posedge clk) begin
    stage_done <= '0;
    if (slot_start && rst_n) begin
      int mx;
      slots++;
      mx = 0;
      for (int s = 0; s < N; s++) begin
        lat[s] <= stage_active[s] ? $urandom_range(5, (slots % 4 == 0) ? 700 : 300) : -1;
      end
      // a stage latency of v cycles gives a slot of v + 3 cycles
      if (slots % 4 == 2 && stage_active[0]) lat[0] <= 597;
      if (slots % 4 == 3 && stage_active[0]) lat[0] <= 598;
      // expected stage contents: stage s holds MB (slots-1-s)
      for (int s = 0; s < N; s++) begin
        int m;
        m = slots - 1 - s;
        checks++;
        if (stage_active[s] != (m >= 0 && m < num_mb)) failures++;
        else if (stage_active[s] && int'(stage_mb[s]) != m) failures++;
      end
    end else begin
      for (int s = 0; s < N; s++) begin
        if (lat[s] == 0) stage_done[s] <= 1'b1;
        if (lat[s] >= 0) lat[s] <= lat[s] - 1;
      end
    end
  end
  // expected overruns from the slowest active stage
  int slot_len = 0, n600 = 0;
  bit seen = 0;
  always @(posedge clk) begin
    if (!rst_n) slot_len <= 0;
    else if (slot_start) begin
      if (seen) begin
        checks++;
        if (int'(last_slot_cycles) != slot_len - 1) begin
          failures++; $display("slot length %0d measured %0d", last_slot_cycles, slot_len - 1);
        end
        if (slot_len - 1 > 600) exp_over++;
        if (slot_len - 1 == 600) n600++;
      end
      slot_len <= 1; seen <= 1;
    end else slot_len <= slot_len + 1;
  end
  initial begin
    for (int s = 0; s < N; s++) lat[s] = -1;
    stage_done = '0;
    num_mb = 16'd12;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(posedge done);
    checks += 3;
    if (slots != 12 + N - 1) begin failures++; $display("slots %0d", slots); end
    if (mb_finished != 12) begin failures++; $display("finished %0d", mb_finished); end
    if (overruns == 0) begin failures++; $display("no overrun"); end
    checks += 2;
    if (int'(overruns) != exp_over) begin failures++; $display("overruns %0d expected %0d", overruns, exp_over); end
    if (n600 == 0) begin failures++; $display("no slot of exactly 600 cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
