// cubebot_top - cube-solver logic: the FPGA custom blocks beside the
// robot-side actuation controller.
//
// FPGA side. The main processor (HPS) reaches the custom blocks three ways:
//   * a 32-bit register window (csr_*, word addresses; readdata valid one
//     cycle after csr_read): words 0x00-0x0F configure the colour engine,
//     words 0x10-0x13 are the move encoding buffer;
//   * the three parallel-I/O conduits: pio1_ctrl (HPS -> FPGA control bits),
//     pio0_status (FPGA -> HPS status bits) and the colour word pio2_colors
//     for the face chosen by pio2_sel; plus the level interrupt irq;
//   * the move memory's 32-bit port (mem_*, word address, one-cycle read).
// A scan request on pio1_ctrl makes status_flag_ctrl start color_engine,
// which reads the frame buffer through the avm_* master, and whose nine
// cell colours land in cube_face_buffer under the requested face index.
// Robot moves written to move_encode_buffer are packed into bytes and
// stored in move_memory, closed by 0xFF; moves-ready is reported on the
// status word and the interrupt.
//
// Robot side. actuation_ctrl receives the packet byte stream (rx_*) sent
// by the HPS over its UART, homes the stepper on sensor_n, and executes the
// move list on step/dir and servo_state.
//
// Processor, bridges, parallel-I/O cores, UART, SDRAM controller, VGA and
// PLL are outside this module; their connection points are the ports.
// Single clock. The register window offsets are this design's own; the
// block set and their connections follow the published system.
module cubebot_top
  import cubebot_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned WIN         = 32,
  parameter int unsigned TIMEOUT_CYC = 50_000,
  parameter int unsigned SETTLE_CYC  = 15_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // register window
  input  logic [4:0]  csr_address,
  input  logic        csr_read,
  input  logic        csr_write,
  input  logic [31:0] csr_writedata,
  output logic [31:0] csr_readdata,
  output logic        csr_readdatavalid,
  // frame buffer read master
  output logic [31:0] avm_address,
  output logic        avm_read,
  input  logic        avm_waitrequest,
  input  logic [15:0] avm_readdata,
  input  logic        avm_readdatavalid,
  // parallel I/O conduits and interrupt
  input  logic [31:0] pio1_ctrl,
  output logic [31:0] pio0_status,
  input  logic [2:0]  pio2_sel,
  output logic [31:0] pio2_colors,
  output logic        irq,
  // move memory, processor port
  input  logic [5:0]  mem_address,
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [31:0] mem_writedata,
  input  logic [3:0]  mem_byteenable,
  output logic [31:0] mem_readdata,
  // robot side
  input  logic        rx_valid,
  input  logic [7:0]  rx_byte,
  input  logic        sensor_n,
  output logic        step,
  output logic        dir,
  output logic [1:0]  servo_state,
  output logic        act_pkt_valid,
  output logic [7:0]  act_pkt_type,
  output logic [7:0]  act_pkt_errors,
  output logic        act_busy,
  output logic        act_error,
  output logic        act_list_done,
  output logic [7:0]  act_moves_done,
  output logic [7:0]  act_flips,
  output logic        act_homed
);
  // ---------------- register window decode ----------------
  logic        ce_wr, mb_wr;
  logic [31:0] ce_rdata, mb_rdata;

  assign ce_wr = csr_write && !csr_address[4];
  assign mb_wr = csr_write &&  csr_address[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr_readdata      <= '0;
      csr_readdatavalid <= 1'b0;
    end else begin
      csr_readdatavalid <= csr_read;
      if (csr_read) csr_readdata <= csr_address[4] ? mb_rdata : ce_rdata;
    end
  end

  // ---------------- colour path ----------------
  logic        eng_start, eng_busy, cell_valid, face_done, clear_all;
  logic [3:0]  cell_idx;
  color_e      cell_color;
  rgb8_t       cell_avg;
  logic [31:0] face_cycles;
  logic [2:0]  face_sel, faces_count;
  logic [5:0]  valid_mask;
  logic        moves_ready;
  logic [7:0]  move_count, refused;
  sys_state_e  sys_state;
  status_word_t status;

  color_engine #(.WIN(WIN)) u_engine (
    .clk, .rst_n, .start(eng_start),
    .csr_address(csr_address[3:0]), .csr_write(ce_wr), .csr_writedata, .csr_rdata(ce_rdata),
    .avm_address, .avm_read, .avm_waitrequest, .avm_readdata, .avm_readdatavalid,
    .busy(eng_busy), .cell_valid, .cell_idx, .cell_color, .cell_avg, .face_done, .face_cycles);

  cube_face_buffer u_faces (
    .clk, .rst_n, .clear(clear_all), .wr_face(face_sel), .cell_valid, .cell_idx, .cell_color,
    .face_done, .rd_face(pio2_sel), .rd_word(pio2_colors), .valid_mask, .faces_count);

  status_flag_ctrl u_status (
    .clk, .rst_n, .ctrl(ctrl_word_t'(pio1_ctrl)), .engine_busy(eng_busy), .cell_valid, .face_done,
    .faces_count, .valid_faces(valid_mask), .moves_ready, .move_count,
    .engine_start(eng_start), .face_sel, .clear_all, .status, .irq, .state(sys_state),
    .refused_scans(refused));

  assign pio0_status = status;

  // ---------------- move path ----------------
  logic       mb_we;
  logic [7:0] mb_addr, mb_wdata, mem_b_rdata;

  move_encode_buffer u_movebuf (
    .clk, .rst_n, .csr_address(csr_address[1:0]), .csr_write(mb_wr), .csr_writedata,
    .csr_rdata(mb_rdata), .mem_we(mb_we), .mem_addr(mb_addr), .mem_wdata(mb_wdata),
    .moves_ready, .move_count);

  move_memory u_movemem (
    .clk, .a_addr(mem_address), .a_read(mem_read), .a_write(mem_write), .a_wdata(mem_writedata),
    .a_be(mem_byteenable), .a_rdata(mem_readdata),
    .b_addr(mb_addr), .b_read(1'b0), .b_we(mb_we), .b_wdata(mb_wdata), .b_rdata(mem_b_rdata));

  // ---------------- robot side ----------------
  servo_e      servo;
  logic [11:0] position;
  logic [7:0]  act_pkt_len;

  actuation_ctrl #(.CLK_HZ(CLK_HZ), .TIMEOUT_CYC(TIMEOUT_CYC), .SETTLE_CYC(SETTLE_CYC)) u_act (
    .clk, .rst_n, .rx_valid, .rx_byte, .sensor_n, .step, .dir, .servo_state(servo),
    .pkt_valid(act_pkt_valid), .pkt_type(act_pkt_type), .pkt_len(act_pkt_len), .pkt_errors(act_pkt_errors),
    .busy(act_busy), .error(act_error), .list_done(act_list_done), .moves_done(act_moves_done),
    .flip_count(act_flips), .homed(act_homed), .position);

  assign servo_state = servo;

endmodule
