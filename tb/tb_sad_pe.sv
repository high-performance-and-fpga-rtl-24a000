// tb_sad_pe: drives random blocks of 1..16 word pairs into sad_pe, back to back and with
// gaps, and checks every SAD against a sum computed here, and that `done` comes exactly
// three cycles after the last word.
module tb_sad_pe;
  logic clk = 0, rst_n = 0;
  logic valid, first, last;
  logic [63:0] pe, ci;
  logic [15:0] sad;
  logic done;
  int checks = 0, failures = 0;
  int exp_q[$];
  int last_t[$];
  int cyc = 0;

  sad_pe dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && done) begin
    checks += 2;
    if (exp_q.size() == 0) begin failures += 2; $display("unexpected done"); end
    else begin
      int e, t;
      e = exp_q.pop_front(); t = last_t.pop_front();
      if (sad !== 16'(e)) begin failures++; $display("SAD %0d expected %0d", sad, e); end
      if (cyc - t != 3) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  initial begin
    valid = 0; first = 0; last = 0; pe = 0; ci = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 200; b++) begin
      int n, s;
      n = $urandom_range(1, 16); s = 0;
      for (int w = 0; w < n; w++) begin
        @(negedge clk);
        valid = 1; first = (w == 0); last = (w == n-1);
        pe = {$urandom, $urandom}; ci = {$urandom, $urandom};
        if (b % 3 == 0) begin pe = '1; ci = '0; end      // saturated lanes
        for (int k = 0; k < 8; k++) s += (pe[8*k+:8] > ci[8*k+:8]) ? pe[8*k+:8] - ci[8*k+:8] : ci[8*k+:8] - pe[8*k+:8];
        if (w == n-1) begin exp_q.push_back(s); last_t.push_back(cyc); end
      end
      if (b % 4 == 1) begin @(negedge clk); valid = 0; first = 0; last = 0; end
    end
    @(negedge clk); valid = 0; last = 0;
    repeat (6) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing results"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
