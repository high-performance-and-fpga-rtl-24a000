// mb_pipe_ctrl: top controller of the macroblock-level pipeline.
// The encoder works on up to N_ST macroblocks at once, one per pipeline stage
// (parameter loading, data loading, resampling, IME/upsampling, FME/MC, intra
// prediction, transform/reconstruction, deblocking, restore). Time is divided into slots;
// at the start of a slot every macroblock moves one stage on, a new macroblock enters
// stage 0 while any remain, and `slot_start` pulses with `stage_active` and `stage_mb`
// telling each stage engine whether it has work and for which macroblock. Each active
// stage reports `stage_done` once; the slot ends when all active stages have reported,
// so a slot is as long as its slowest stage. The controller counts slots that exceed the
// SLOT cycle budget (`overruns`) and reports the length of the last slot. After the last
// macroblock leaves the last stage, `done` pulses. N macroblocks take N + N_ST - 1 slots.
// Following the design: nine stages, macroblock-level pipelining, a 600-cycle budget per
// stage. This design's own: the handshake and the data-driven slot length.
module mb_pipe_ctrl #(
  parameter int N_ST = 9,
  parameter int SLOT = 600
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   num_mb,
  input  logic [N_ST-1:0] stage_done,
  output logic          busy,
  output logic          done,
  output logic          slot_start,
  output logic [N_ST-1:0] stage_active,
  output logic [15:0]   stage_mb [N_ST],
  output logic [15:0]   mb_finished,
  output logic [15:0]   last_slot_cycles,
  output logic [15:0]   overruns
);
  typedef enum logic [1:0] {IDLE, ADVANCE, RUN} state_t;
  state_t state;
  logic [15:0] next_mb, total, cyc;
  logic [N_ST-1:0] got;

  logic [N_ST-1:0] na, g;     // stages active in the next slot; stages done so far
  assign na = {stage_active[N_ST-2:0], (next_mb < total)};
  assign g  = got | (stage_done & stage_active);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; busy <= 1'b0; done <= 1'b0; slot_start <= 1'b0; stage_active <= '0;
      next_mb <= '0; total <= '0; cyc <= '0; got <= '0; mb_finished <= '0;
      last_slot_cycles <= '0; overruns <= '0;
      for (int s = 0; s < N_ST; s++) stage_mb[s] <= '0;
    end else begin
      done <= 1'b0; slot_start <= 1'b0;
      case (state)
        IDLE: if (start) begin
          busy <= 1'b1; next_mb <= '0; total <= num_mb; stage_active <= '0;
          mb_finished <= '0; overruns <= '0; state <= ADVANCE;
        end
        ADVANCE: begin
          if (stage_active[N_ST-1]) mb_finished <= mb_finished + 1'b1;
          stage_active <= na;
          for (int s = N_ST-1; s > 0; s--) stage_mb[s] <= stage_mb[s-1];
          stage_mb[0] <= next_mb;
          if (next_mb < total) next_mb <= next_mb + 1'b1;
          if (na == '0) begin
            state <= IDLE; busy <= 1'b0; done <= 1'b1;
          end else begin
            state <= RUN; slot_start <= 1'b1; got <= '0; cyc <= 16'd1;
          end
        end
        RUN: begin
          got <= g;
          cyc <= cyc + 1'b1;
          if (g == stage_active) begin
            state <= ADVANCE;
            last_slot_cycles <= cyc;
            if (int'(cyc) > SLOT) overruns <= overruns + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a stage reports completion only while it holds a macroblock
  a_done_active: assert property (@(posedge clk) disable iff (!rst_n)
      (state == RUN) |-> ((stage_done & ~stage_active) == '0));
endmodule
