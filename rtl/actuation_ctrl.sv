// actuation_ctrl - robot-side controller: packet receiver, move sequencer
// and stepper pulse generator wired together.
//
// Bytes from the serial link enter on `rx_valid`/`rx_byte` (one byte per
// pulse, from a UART receiver). packet_parser frames them; every complete
// packet is reported on `pkt_valid`/`pkt_type`/`pkt_len` so that status and
// command packets can be handled elsewhere; move-list packets (type 0x03)
// are executed by move_sequencer, which homes the stepper on the slot
// sensor and then drives `step`/`dir` through stepper_ctrl and the gripper
// through `servo_state`.
//
// The split of receiver, sequencer and pulse generator follows the
// published robot controller; grouping them in one module is this design's
// own.
module actuation_ctrl
  import cubebot_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned TIMEOUT_CYC = 50_000,
  parameter int unsigned SETTLE_CYC  = 15_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic [7:0] rx_byte,
  input  logic       sensor_n,
  output logic       step,
  output logic       dir,
  output servo_e     servo_state,
  output logic       pkt_valid,
  output logic [7:0] pkt_type,
  output logic [7:0] pkt_len,
  output logic [7:0] pkt_errors,
  output logic       busy,
  output logic       error,
  output logic       list_done,
  output logic [7:0] moves_done,
  output logic [7:0] flip_count,
  output logic       homed,
  output logic [11:0] position
);
  logic              data_valid, pkt_abort;
  logic [7:0]        data_idx, data_byte, timeouts, dropped;
  logic [2:0]        pstate;
  logic              stp_cmd_move, stp_cmd_align, stp_busy, stp_done, stp_align_err;
  logic signed [13:0] stp_steps;

  packet_parser #(.TIMEOUT_CYC(TIMEOUT_CYC)) u_parser (
    .clk, .rst_n, .rx_valid, .rx_byte, .data_valid, .data_idx, .data_byte,
    .pkt_valid, .pkt_type, .pkt_len, .pkt_abort, .err_count(pkt_errors),
    .timeout_count(timeouts), .state(pstate));

  move_sequencer #(.SETTLE_CYC(SETTLE_CYC)) u_seq (
    .clk, .rst_n, .data_valid, .data_idx, .data_byte, .pkt_valid, .pkt_type, .pkt_len,
    .stp_cmd_move, .stp_steps, .stp_cmd_align, .stp_done, .stp_align_err,
    .servo_state, .flip_count, .busy, .error, .list_done, .moves_done, .dropped);

  stepper_ctrl #(.CLK_HZ(CLK_HZ)) u_stepper (
    .clk, .rst_n, .cmd_move(stp_cmd_move), .cmd_steps(stp_steps), .cmd_align(stp_cmd_align),
    .sensor_n, .step, .dir, .busy(stp_busy), .done(stp_done), .align_err(stp_align_err),
    .homed, .position);

endmodule
