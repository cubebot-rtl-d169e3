// move_sequencer - executes a received robot move list on the gripper
// servos and the cube-turning stepper.
//
// While idle it collects the data bytes of each move-list packet (type 0x03)
// from the packet parser and starts when the parser reports the packet
// complete (`pkt_valid`). An aborted packet is discarded. A list that
// arrives while one is running is dropped and counted in `dropped`.
//
// Run: first the stepper is homed on the slot sensor; if homing times out
// the list stops and `error` is set. Then each byte is decoded as
// [SSSDDFFF] (spin -3..+3 quarter turns, flips 0..3, rotations 0..7 eighth
// turns) until the end marker 0xFF or the packet length, and executed as
//   flips    : per flip, servos to partial grip, settle, back to released,
//              settle
//   spin     : servos released, settle, stepper spin*STEPS_90 steps
//   rotation : servos gripped, settle, stepper rot*STEPS_45 steps, release
// Parts with a zero count are skipped. `moves_done` counts executed moves,
// `list_done` pulses at the end of a list. `servo_state` is the requested
// grip (released / partial / gripped) for the servo driver.
//
// Homing before each list, the byte format and end marker, 800 steps per
// quarter turn, 400 per eighth turn and the three servo states follow the
// published design, where this runs in the robot controller's firmware.
// The order inside one move, which servo state each action uses, the
// eighth-turn meaning of the rotation field and the settle time are this
// design's own.
module move_sequencer
  import cubebot_pkg::*;
#(
  parameter int unsigned STEPS_90   = 800,
  parameter int unsigned STEPS_45   = 400,
  parameter int unsigned SETTLE_CYC = 15_000_000,
  parameter int unsigned MAX_MOVES  = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the packet parser
  input  logic               data_valid,
  input  logic [7:0]         data_idx,
  input  logic [7:0]         data_byte,
  input  logic               pkt_valid,
  input  logic [7:0]         pkt_type,
  input  logic [7:0]         pkt_len,
  // stepper
  output logic               stp_cmd_move,
  output logic signed [13:0] stp_steps,
  output logic               stp_cmd_align,
  input  logic               stp_done,
  input  logic               stp_align_err,
  // servos and status
  output servo_e             servo_state,
  output logic [7:0]         flip_count,
  output logic               busy,
  output logic               error,
  output logic               list_done,
  output logic [7:0]         moves_done,
  output logic [7:0]         dropped
);
  typedef enum logic [3:0] {
    Q_IDLE, Q_ALIGN, Q_ALIGN_WAIT, Q_FETCH, Q_FLIP, Q_FLIP_HOLD, Q_FLIP_REL,
    Q_SPIN, Q_SPIN_SET, Q_SPIN_RUN, Q_ROT, Q_ROT_SET, Q_ROT_RUN, Q_NEXT
  } qstate_e;

  localparam int TW = $clog2(SETTLE_CYC + 1);

  qstate_e        st;
  logic [7:0]     moves [MAX_MOVES];
  logic [8:0]     idx, n;
  robot_move_t    cur;
  logic [1:0]     flips_left;
  logic [TW-1:0]  timer;
  logic [7:0]     cur_byte;

  assign busy     = (st != Q_IDLE);
  assign cur_byte = moves[idx[$clog2(MAX_MOVES)-1:0]];

  always_ff @(posedge clk) begin
    if (!busy && data_valid && pkt_type == PKT_MOVES)
      moves[data_idx[$clog2(MAX_MOVES)-1:0]] <= data_byte;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= Q_IDLE;
      idx           <= '0;
      n             <= '0;
      cur           <= '0;
      flips_left    <= '0;
      timer         <= '0;
      stp_cmd_move  <= 1'b0;
      stp_steps     <= '0;
      stp_cmd_align <= 1'b0;
      servo_state   <= SERVO_RELEASED;
      flip_count    <= '0;
      error         <= 1'b0;
      list_done     <= 1'b0;
      moves_done    <= '0;
      dropped       <= '0;
    end else begin
      stp_cmd_move  <= 1'b0;
      stp_cmd_align <= 1'b0;
      list_done     <= 1'b0;
      if (busy && pkt_valid && pkt_type == PKT_MOVES) dropped <= dropped + 1'b1;

      unique case (st)
        Q_IDLE: if (pkt_valid && pkt_type == PKT_MOVES) begin
          n     <= 9'(pkt_len);
          idx   <= '0;
          error <= 1'b0;
          st    <= Q_ALIGN;
        end
        Q_ALIGN: begin
          stp_cmd_align <= 1'b1;
          st            <= Q_ALIGN_WAIT;
        end
        Q_ALIGN_WAIT: if (stp_done) begin
          if (stp_align_err) begin
            error     <= 1'b1;
            list_done <= 1'b1;
            st        <= Q_IDLE;
          end else begin
            st <= Q_FETCH;
          end
        end
        Q_FETCH: begin
          if (idx == n || cur_byte == MOVE_END) begin
            list_done <= 1'b1;
            st        <= Q_IDLE;
          end else begin
            cur        <= cur_byte;
            flips_left <= cur_byte[4:3];
            st         <= Q_FLIP;
          end
        end
        Q_FLIP: begin
          if (flips_left == '0) st <= Q_SPIN;
          else begin
            servo_state <= SERVO_PARTIAL;
            timer       <= TW'(SETTLE_CYC);
            st          <= Q_FLIP_HOLD;
          end
        end
        Q_FLIP_HOLD: begin
          if (timer == '0) begin
            servo_state <= SERVO_RELEASED;
            timer       <= TW'(SETTLE_CYC);
            st          <= Q_FLIP_REL;
          end else timer <= timer - 1'b1;
        end
        Q_FLIP_REL: begin
          if (timer == '0) begin
            flips_left <= flips_left - 1'b1;
            flip_count <= flip_count + 1'b1;
            st         <= Q_FLIP;
          end else timer <= timer - 1'b1;
        end
        Q_SPIN: begin
          if (cur.spin == '0) st <= Q_ROT;
          else begin
            servo_state <= SERVO_RELEASED;
            timer       <= TW'(SETTLE_CYC);
            st          <= Q_SPIN_SET;
          end
        end
        Q_SPIN_SET: begin
          if (timer == '0) begin
            stp_cmd_move <= 1'b1;
            stp_steps    <= 14'(cur.spin) * 14'(STEPS_90);
            st           <= Q_SPIN_RUN;
          end else timer <= timer - 1'b1;
        end
        Q_SPIN_RUN: if (stp_done) st <= Q_ROT;
        Q_ROT: begin
          if (cur.rot == '0) st <= Q_NEXT;
          else begin
            servo_state <= SERVO_GRIPPED;
            timer       <= TW'(SETTLE_CYC);
            st          <= Q_ROT_SET;
          end
        end
        Q_ROT_SET: begin
          if (timer == '0) begin
            stp_cmd_move <= 1'b1;
            stp_steps    <= 14'(cur.rot) * 14'(STEPS_45);
            st           <= Q_ROT_RUN;
          end else timer <= timer - 1'b1;
        end
        Q_ROT_RUN: if (stp_done) begin
          servo_state <= SERVO_RELEASED;
          st          <= Q_NEXT;
        end
        Q_NEXT: begin
          idx        <= idx + 1'b1;
          moves_done <= moves_done + 1'b1;
          st         <= Q_FETCH;
        end
        default: st <= Q_IDLE;
      endcase
    end
  end

endmodule
