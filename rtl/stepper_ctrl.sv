// stepper_ctrl - step/direction pulse generator and homing sequence for the
// cube-turning stepper motor (DRV8825 driver, 1/16 microstepping).
//
// Move: `cmd_move` with a signed step count `cmd_steps` (800 = 90 degrees,
// 3200 per revolution). `dir` is 1 for positive counts. Every step is a
// pulse on `step`, high for one pulse delay and low for one pulse delay.
// The fast delay (FAST_US) is used for the bulk of the move and the slow
// delay (SLOW_US) for the last SLOW_TAIL steps, so the motor approaches the
// target slowly. A move of N steps therefore takes
//   2*FAST*max(N-SLOW_TAIL,0) + 2*SLOW*min(N,SLOW_TAIL) cycles from the first
// rising edge of `step` to the cycle `done` is high, with FAST/SLOW the
// delays in clock cycles.
//
// Homing: `cmd_align` steps forward at the slow rate, checking the
// active-low slot sensor `sensor_n` after each step. When the flag is seen
// it continues EDGE_COMP more steps (edge compensation), sets `position` to
// 0 and `homed` to 1. If ALIGN_TIMEOUT steps (half a revolution) pass
// without the flag it stops and sets `align_err` (cleared by the next
// command). `position` is kept modulo STEPS_PER_REV relative to home.
// Commands are ignored while `busy`.
//
// Step counts, the two pulse delays, the fast-then-slow profile, homing on
// the slot sensor with edge compensation and the 1600-step timeout follow
// the published design, where this runs in the robot controller's firmware.
// Reading each delay as one half of the pulse period, the 100-step slow
// tail and the 20-step edge compensation are this design's own.
module stepper_ctrl #(
  parameter int unsigned CLK_HZ        = 50_000_000,
  parameter int unsigned FAST_US       = 100,
  parameter int unsigned SLOW_US       = 700,
  parameter int unsigned STEPS_PER_REV = 3200,
  parameter int unsigned ALIGN_TIMEOUT = 1600,
  parameter int unsigned EDGE_COMP     = 20,
  parameter int unsigned SLOW_TAIL     = 100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_move,
  input  logic signed [13:0] cmd_steps,
  input  logic               cmd_align,
  input  logic               sensor_n,
  output logic               step,
  output logic               dir,
  output logic               busy,
  output logic               done,
  output logic               align_err,
  output logic               homed,
  output logic [11:0]        position
);
  localparam int unsigned FAST = (CLK_HZ / 1000) * FAST_US / 1000;
  localparam int unsigned SLOW = (CLK_HZ / 1000) * SLOW_US / 1000;
  localparam int TW = $clog2(SLOW + 2);

  typedef enum logic [1:0] {M_IDLE, M_MOVE, M_SEEK, M_COMP} mode_e;
  mode_e          mode;
  logic           phase_high;
  logic [TW-1:0]  tcnt;
  logic [13:0]    remaining;
  logic [11:0]    seek_cnt;
  logic [TW-1:0]  half, half_next;
  logic           fresh;

  assign busy = (mode != M_IDLE);

  // Delay for the step now in progress.
  always_comb begin
    if (mode == M_MOVE && 32'(remaining) > SLOW_TAIL) half = TW'(FAST);
    else                                              half = TW'(SLOW);
  end

  // Delay of the step after the current one (moves only).
  always_comb begin
    if (32'(remaining) > SLOW_TAIL + 1) half_next = TW'(FAST);
    else                                half_next = TW'(SLOW);
  end

  function automatic logic [11:0] pos_step(input logic [11:0] p, input logic fwd);
    if (fwd) return (32'(p) == STEPS_PER_REV - 1) ? 12'd0 : p + 1'b1;
    else     return (p == 12'd0) ? 12'(STEPS_PER_REV - 1) : p - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= M_IDLE;
      phase_high <= 1'b0;
      tcnt       <= '0;
      fresh      <= 1'b0;
      remaining  <= '0;
      seek_cnt   <= '0;
      step       <= 1'b0;
      dir        <= 1'b1;
      done       <= 1'b0;
      align_err  <= 1'b0;
      homed      <= 1'b0;
      position   <= '0;
    end else begin
      done <= 1'b0;
      if (mode == M_IDLE) begin
        step       <= 1'b0;
        phase_high <= 1'b0;
        if (cmd_align) begin
          mode      <= M_SEEK;
          dir       <= 1'b1;
          seek_cnt  <= '0;
          align_err <= 1'b0;
          homed     <= 1'b0;
          tcnt      <= '0;
          fresh     <= 1'b1;
        end else if (cmd_move) begin
          align_err <= 1'b0;
          dir       <= !cmd_steps[13];
          remaining <= cmd_steps[13] ? 14'(-cmd_steps) : 14'(cmd_steps);
          tcnt      <= '0;
          fresh     <= 1'b1;
          if (cmd_steps == '0) done <= 1'b1;
          else                 mode <= M_MOVE;
        end
      end else begin
        // Pulse engine: high for `half` cycles, low for `half` cycles; the
        // last low cycle completes the step and starts the next one.
        if (phase_high) begin
          if (tcnt == '0) begin
            step       <= 1'b0;
            phase_high <= 1'b0;
            tcnt       <= half - 1'b1;
          end else tcnt <= tcnt - 1'b1;
        end else if (fresh) begin
          fresh      <= 1'b0;
          step       <= 1'b1;
          phase_high <= 1'b1;
          tcnt       <= half - 1'b1;
        end else if (tcnt != '0) begin
          tcnt <= tcnt - 1'b1;
        end else begin
          position <= pos_step(position, dir);
          unique case (mode)
            M_MOVE: begin
              remaining <= remaining - 1'b1;
              if (remaining == 14'd1) begin
                mode <= M_IDLE;
                done <= 1'b1;
              end else begin
                step       <= 1'b1;
                phase_high <= 1'b1;
                tcnt       <= half_next - 1'b1;
              end
            end
            M_SEEK: begin
              if (!sensor_n && EDGE_COMP == 0) begin
                position <= '0;
                homed    <= 1'b1;
                mode     <= M_IDLE;
                done     <= 1'b1;
              end else if (!sensor_n) begin
                remaining  <= 14'(EDGE_COMP);
                mode       <= M_COMP;
                step       <= 1'b1;
                phase_high <= 1'b1;
                tcnt       <= TW'(SLOW) - 1'b1;
              end else if (32'(seek_cnt) == ALIGN_TIMEOUT - 1) begin
                align_err <= 1'b1;
                mode      <= M_IDLE;
                done      <= 1'b1;
              end else begin
                seek_cnt   <= seek_cnt + 1'b1;
                step       <= 1'b1;
                phase_high <= 1'b1;
                tcnt       <= TW'(SLOW) - 1'b1;
              end
            end
            M_COMP: begin
              remaining <= remaining - 1'b1;
              if (remaining == 14'd1) begin
                position <= '0;
                homed    <= 1'b1;
                mode     <= M_IDLE;
                done     <= 1'b1;
              end else begin
                step       <= 1'b1;
                phase_high <= 1'b1;
                tcnt       <= TW'(SLOW) - 1'b1;
              end
            end
            default: mode <= M_IDLE;
          endcase
        end
      end
    end
  end

endmodule
