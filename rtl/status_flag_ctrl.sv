// status_flag_ctrl - system state, progress counters and interrupt for the
// HPS, between the PIO control word and the PIO status word.
//
// The HPS drives the control word `ctrl` (PIO1, see ctrl_word_t); its
// one-shot bits act on their rising edge:
//   scan_start  start the colour engine on face `face_idx`; accepted only
//               while `freeze` holds the frame buffer still and the engine
//               is idle; a refused request increments `refused_scans`
//   exec_start / exec_done / exec_error  robot execution reported by the HPS
//   irq_ack     clears the pending interrupt
//   clear       back to IDLE, empties the face buffer
// System state (status bits 2:0):
//   IDLE -> SCANNING (first accepted scan) -> READY (move list ready)
//   READY -> RUNNING (exec_start) -> DONE (exec_done); exec_error -> ERROR
//   from any state; clear -> IDLE.
// The interrupt `irq` is a level that rises when a face finishes, when the
// move list becomes ready or on error, and stays high until irq_ack.
// `status` (PIO0, status_word_t) carries state, faces scanned, engine busy,
// face-done flag, solution flag, moves ready, irq pending, frozen, move
// count, cells done of the current face and the valid-face mask.
// All outputs are registered except `status`, which is assembled from
// registers.
//
// The six states, the freeze and solution control flags, interrupt
// generation and progress tracking follow the published design; bit
// positions and transition rules are this design's own.
module status_flag_ctrl
  import cubebot_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ctrl_word_t   ctrl,
  input  logic         engine_busy,
  input  logic         cell_valid,
  input  logic         face_done,
  input  logic [2:0]   faces_count,
  input  logic [5:0]   valid_faces,
  input  logic         moves_ready,
  input  logic [7:0]   move_count,
  output logic         engine_start,
  output logic [2:0]   face_sel,
  output logic         clear_all,
  output status_word_t status,
  output logic         irq,
  output sys_state_e   state,
  output logic [7:0]   refused_scans
);
  ctrl_word_t prev;
  logic       face_done_flag, moves_ready_d;
  logic [3:0] cells_done;

  logic rise_scan, rise_exec_start, rise_exec_done, rise_exec_err, rise_ack, rise_clear;
  assign rise_scan       = ctrl.scan_start & ~prev.scan_start;
  assign rise_exec_start = ctrl.exec_start & ~prev.exec_start;
  assign rise_exec_done  = ctrl.exec_done  & ~prev.exec_done;
  assign rise_exec_err   = ctrl.exec_error & ~prev.exec_error;
  assign rise_ack        = ctrl.irq_ack    & ~prev.irq_ack;
  assign rise_clear      = ctrl.clear      & ~prev.clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev           <= '0;
      state          <= ST_IDLE;
      engine_start   <= 1'b0;
      face_sel       <= '0;
      clear_all      <= 1'b0;
      irq            <= 1'b0;
      face_done_flag <= 1'b0;
      moves_ready_d  <= 1'b0;
      cells_done     <= '0;
      refused_scans  <= '0;
    end else begin
      prev          <= ctrl;
      engine_start  <= 1'b0;
      clear_all     <= 1'b0;
      moves_ready_d <= moves_ready;

      if (cell_valid) cells_done <= cells_done + 1'b1;

      if (rise_clear) begin
        state          <= ST_IDLE;
        clear_all      <= 1'b1;
        irq            <= 1'b0;
        face_done_flag <= 1'b0;
        cells_done     <= '0;
      end else begin
        if (rise_scan) begin
          if (ctrl.freeze && !engine_busy && !engine_start) begin
            engine_start   <= 1'b1;
            face_sel       <= ctrl.face_idx;
            face_done_flag <= 1'b0;
            cells_done     <= '0;
            if (state == ST_IDLE || state == ST_DONE) state <= ST_SCANNING;
          end else begin
            refused_scans <= refused_scans + 1'b1;
          end
        end
        if (face_done) begin
          face_done_flag <= 1'b1;
          irq            <= 1'b1;
        end
        if (moves_ready && !moves_ready_d) begin
          irq <= 1'b1;
          if (state == ST_SCANNING || state == ST_IDLE) state <= ST_READY;
        end
        if (rise_exec_start && state == ST_READY) state <= ST_RUNNING;
        if (rise_exec_done && state == ST_RUNNING) state <= ST_DONE;
        if (rise_exec_err) begin
          state <= ST_ERROR;
          irq   <= 1'b1;
        end
        if (rise_ack) irq <= 1'b0;
      end
    end
  end

  always_comb begin
    status             = '0;
    status.state       = state;
    status.faces       = faces_count;
    status.engine_busy = engine_busy;
    status.face_done   = face_done_flag;
    status.solution    = ctrl.solution;
    status.moves_ready = moves_ready;
    status.irq_pending = irq;
    status.frozen      = ctrl.freeze;
    status.move_count  = move_count;
    status.cells_done  = cells_done;
    status.valid_faces = valid_faces;
  end

endmodule
