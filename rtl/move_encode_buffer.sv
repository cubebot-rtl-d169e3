// move_encode_buffer - encodes robot moves and stores the move list in the
// on-chip move memory.
//
// The HPS translates the solver's symbolic moves into robot moves and writes
// each one to the MOVE register as separate fields. The block checks the
// ranges, packs the move into the 8-bit code [SSSDDFFF] (spin in quarter
// turns, -3..+3, two's complement in bits 7-5; flips 0..3 in bits 4-3;
// rotations 0..7 in bits 2-0), and queues it in a small FIFO. Whenever the
// FIFO holds a code it is written to the move memory at the next byte
// address, one byte per cycle. A write to COMMIT appends the end marker 0xFF
// once the FIFO has drained and raises `moves_ready`; `move_count` is the
// number of moves in the list (end marker not counted).
//
// Registers (word address csr_address, writes with csr_write, reads
// combinational on csr_rdata):
//   0 MOVE   (w) [3:0] spin (signed, -3..+3), [9:8] flips, [18:16] rotations
//   1 COMMIT (w) close the list
//   2 CLEAR  (w) empty the list, drop moves_ready, clear error flags
//   3 STATUS (r) [31] moves_ready [30] commit pending [29] overflow
//                [28] FIFO empty [27:20] rejected moves [19:16] FIFO level
//                [7:0] move count
// A move whose spin is outside -3..+3, whose code would equal the end
// marker (spin -1, three flips, seven rotations), that arrives after COMMIT,
// or that would leave no room for the end marker is rejected; the last case
// also sets the sticky overflow flag.
//
// The 8-bit format, the 0xFF end marker, storage of the list in on-chip
// memory, the FIFO interface and the ready flag for the robot side follow
// the published design; the register map is this design's own.
module move_encode_buffer
  import cubebot_pkg::*;
#(
  parameter int unsigned MEM_BYTES  = 256,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [1:0]                   csr_address,
  input  logic                         csr_write,
  input  logic [31:0]                  csr_writedata,
  output logic [31:0]                  csr_rdata,
  output logic                         mem_we,
  output logic [$clog2(MEM_BYTES)-1:0] mem_addr,
  output logic [7:0]                   mem_wdata,
  output logic                         moves_ready,
  output logic [7:0]                   move_count
);
  localparam int AW = $clog2(MEM_BYTES);
  localparam int LW = $clog2(FIFO_DEPTH) + 1;

  logic          wr_move, wr_commit, wr_clear;
  logic signed [3:0] in_spin;
  logic [1:0]    in_flips;
  logic [2:0]    in_rot;
  robot_move_t   code;
  logic          spin_ok, room_ok, accept;
  logic [AW:0]   wr_ptr;            // next byte address
  logic          commit_pend, overflow;
  logic [7:0]    rejected;

  logic          f_push, f_pop, f_empty, f_full, f_ovf;
  logic [7:0]    f_rdata;
  logic [LW-1:0] f_level;

  assign wr_move   = csr_write && csr_address == 2'd0;
  assign wr_commit = csr_write && csr_address == 2'd1;
  assign wr_clear  = csr_write && csr_address == 2'd2;

  assign in_spin  = csr_writedata[3:0];
  assign in_flips = csr_writedata[9:8];
  assign in_rot   = csr_writedata[18:16];
  assign spin_ok  = (in_spin >= -4'sd3) && (in_spin <= 4'sd3) && (code != MOVE_END);
  assign room_ok  = (wr_ptr + (AW+1)'(f_level)) < (AW+1)'(MEM_BYTES - 1);
  assign accept   = wr_move && spin_ok && room_ok && !commit_pend && !moves_ready && !f_full;

  always_comb begin
    code.spin  = in_spin[2:0];
    code.flips = in_flips;
    code.rot   = in_rot;
  end

  assign f_push = accept;
  assign f_pop  = !f_empty;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(wr_clear), .push(f_push), .wdata(code), .pop(f_pop),
    .rdata(f_rdata), .empty(f_empty), .full(f_full), .overflow(f_ovf), .level(f_level));

  // Memory write port: FIFO head, or the end marker when the commit is due.
  always_comb begin
    mem_we    = 1'b0;
    mem_addr  = wr_ptr[AW-1:0];
    mem_wdata = f_rdata;
    if (!wr_clear) begin
      if (!f_empty) begin
        mem_we = 1'b1;
      end else if (commit_pend) begin
        mem_we    = 1'b1;
        mem_wdata = MOVE_END;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '0;
      commit_pend <= 1'b0;
      moves_ready <= 1'b0;
      overflow    <= 1'b0;
      rejected    <= '0;
    end else if (wr_clear) begin
      wr_ptr      <= '0;
      commit_pend <= 1'b0;
      moves_ready <= 1'b0;
      overflow    <= 1'b0;
      rejected    <= '0;
    end else begin
      if (!f_empty) wr_ptr <= wr_ptr + 1'b1;
      else if (commit_pend) begin
        commit_pend <= 1'b0;
        moves_ready <= 1'b1;
      end
      if (wr_commit && !moves_ready) commit_pend <= 1'b1;
      if (wr_move && !accept) begin
        rejected <= rejected + 1'b1;
        if (!room_ok || f_full) overflow <= 1'b1;
      end
    end
  end

  assign move_count = 8'(wr_ptr);

  always_comb begin
    csr_rdata = '0;
    if (csr_address == 2'd3)
      csr_rdata = {moves_ready, commit_pend, overflow, f_empty, rejected, 4'(f_level), 8'd0, move_count};
    else
      csr_rdata = 32'(move_count);
  end

endmodule
