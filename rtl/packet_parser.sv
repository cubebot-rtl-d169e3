// packet_parser - receiver state machine of the serial packet protocol
// between the main processor and the robot controller.
//
// Packet: [0xAA] [TYPE] [LEN] [LEN data bytes, 0..255] [0xFF]
// Types: 0x01 face colours, 0x03 robot move list, 0x04 status, 0x05 command.
//
// States, one received byte (`rx_valid`) per step:
//   WAIT_START  stay until 0xAA
//   READ_TYPE   accept a known type, otherwise abort
//   READ_LEN    take LEN; LEN = 0 skips the data
//   READ_DATA   pass each byte out on data_valid/data_idx/data_byte
//   WAIT_END    expect 0xFF, otherwise abort
//   PROCESS     one cycle: pkt_valid with pkt_type/pkt_len
// An abort (bad type, missing end byte, or no byte for TIMEOUT_CYC cycles
// while inside a packet) pulses `pkt_abort`, increments `err_count` and
// returns to WAIT_START, so the receiver resynchronises on the next 0xAA.
// A consumer should collect data bytes and act on them only at pkt_valid.
// A byte that arrives in the PROCESS cycle is handled as in WAIT_START.
//
// The framing, the type codes, the six states and the return to WAIT_START
// on an invalid field or timeout follow the published protocol, where this
// machine runs in the robot controller's firmware. The timeout length and
// the handling of LEN = 0 are this design's own.
module packet_parser
  import cubebot_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYC = 50000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic [7:0] rx_byte,
  output logic       data_valid,
  output logic [7:0] data_idx,
  output logic [7:0] data_byte,
  output logic       pkt_valid,
  output logic [7:0] pkt_type,
  output logic [7:0] pkt_len,
  output logic       pkt_abort,
  output logic [7:0] err_count,
  output logic [7:0] timeout_count,
  output logic [2:0] state
);
  typedef enum logic [2:0] {
    WAIT_START = 3'd0,
    READ_TYPE  = 3'd1,
    READ_LEN   = 3'd2,
    READ_DATA  = 3'd3,
    WAIT_END   = 3'd4,
    PROCESS    = 3'd5
  } pstate_e;

  pstate_e st;
  logic [7:0] idx;
  logic [$clog2(TIMEOUT_CYC+1)-1:0] idle_cnt;
  logic in_packet, timeout;

  assign state     = st;
  assign in_packet = (st != WAIT_START) && (st != PROCESS);
  assign timeout   = in_packet && !rx_valid && (idle_cnt == ($clog2(TIMEOUT_CYC+1))'(TIMEOUT_CYC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= WAIT_START;
      idx           <= '0;
      idle_cnt      <= '0;
      data_valid    <= 1'b0;
      data_idx      <= '0;
      data_byte     <= '0;
      pkt_valid     <= 1'b0;
      pkt_type      <= '0;
      pkt_len       <= '0;
      pkt_abort     <= 1'b0;
      err_count     <= '0;
      timeout_count <= '0;
    end else begin
      data_valid <= 1'b0;
      pkt_valid  <= 1'b0;
      pkt_abort  <= 1'b0;

      if (rx_valid || !in_packet) idle_cnt <= '0;
      else                        idle_cnt <= idle_cnt + 1'b1;

      if (timeout) begin
        st            <= WAIT_START;
        pkt_abort     <= 1'b1;
        err_count     <= err_count + 1'b1;
        timeout_count <= timeout_count + 1'b1;
      end else begin
        unique case (st)
          WAIT_START, PROCESS: begin
            if (st == PROCESS) st <= WAIT_START;
            if (rx_valid && rx_byte == PKT_START) st <= READ_TYPE;
          end
          READ_TYPE: if (rx_valid) begin
            if (pkt_type_ok(rx_byte)) begin
              pkt_type <= rx_byte;
              st       <= READ_LEN;
            end else begin
              st        <= WAIT_START;
              pkt_abort <= 1'b1;
              err_count <= err_count + 1'b1;
            end
          end
          READ_LEN: if (rx_valid) begin
            pkt_len <= rx_byte;
            idx     <= '0;
            st      <= (rx_byte == 8'd0) ? WAIT_END : READ_DATA;
          end
          READ_DATA: if (rx_valid) begin
            data_valid <= 1'b1;
            data_idx   <= idx;
            data_byte  <= rx_byte;
            idx        <= idx + 1'b1;
            if (idx == pkt_len - 1'b1) st <= WAIT_END;
          end
          WAIT_END: if (rx_valid) begin
            if (rx_byte == PKT_END) begin
              st        <= PROCESS;
              pkt_valid <= 1'b1;
            end else begin
              st        <= WAIT_START;
              pkt_abort <= 1'b1;
              err_count <= err_count + 1'b1;
            end
          end
          default: st <= WAIT_START;
        endcase
      end
    end
  end

  // One packet event at a time.
  a_single_event: assert property (@(posedge clk) disable iff (!rst_n)
    !(pkt_valid && pkt_abort));

endmodule
