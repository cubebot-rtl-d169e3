// cubebot_pkg - types and constants shared by the cube-solver FPGA logic and
// the robot-side actuation logic.
//
// Colour codes, threshold set, the 8-bit robot move code, the UART packet
// framing bytes, the system states and the gripper servo states live here.
// The move code layout (spin in bits 7-5, flips in 4-3, rotations in 2-0,
// 0xFF as end marker), the packet bytes (0xAA start, 0xFF end, types 0x01,
// 0x03, 0x04, 0x05), the six system states and the three servo states follow
// the published design; the numeric colour codes and the default thresholds
// are this design's own choice.
package cubebot_pkg;

  // Colour identifiers, three bits per facelet.
  typedef enum logic [2:0] {
    C_WHITE   = 3'd0,
    C_RED     = 3'd1,
    C_BLUE    = 3'd2,
    C_ORANGE  = 3'd3,
    C_GREEN   = 3'd4,
    C_YELLOW  = 3'd5,
    C_UNKNOWN = 3'd7
  } color_e;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb8_t;

  // Calibrated threshold set of the classifier (48 bits).
  typedef struct packed {
    logic [7:0] white_min;    // all three channels at least this -> white
    logic [7:0] dom_min;      // a dominant channel must reach this
    logic [7:0] margin;       // dominance margin over the other channels
    logic [7:0] orange_g_min; // red-dominant with G at least this -> orange
    logic [7:0] yellow_g_min; // R and G at least this ...
    logic [7:0] yellow_b_max; // ... and B at most this -> yellow
  } thr_t;

  localparam thr_t THR_DEFAULT = '{white_min: 8'd170, dom_min: 8'd100, margin: 8'd40,
                                   orange_g_min: 8'd70, yellow_g_min: 8'd150,
                                   yellow_b_max: 8'd110};

  // Robot move code [SSSDDFFF]: spin in quarter turns (-3..+3, two's
  // complement), flips (0..3), whole-cube rotations in eighth turns (0..7).
  typedef struct packed {
    logic signed [2:0] spin;
    logic [1:0]        flips;
    logic [2:0]        rot;
  } robot_move_t;

  localparam logic [7:0] MOVE_END = 8'hFF;

  // UART packet framing.
  localparam logic [7:0] PKT_START  = 8'hAA;
  localparam logic [7:0] PKT_END    = 8'hFF;
  localparam logic [7:0] PKT_FACE   = 8'h01;
  localparam logic [7:0] PKT_MOVES  = 8'h03;
  localparam logic [7:0] PKT_STATUS = 8'h04;
  localparam logic [7:0] PKT_CMD    = 8'h05;

  function automatic logic pkt_type_ok(input logic [7:0] t);
    return (t == PKT_FACE) || (t == PKT_MOVES) || (t == PKT_STATUS) || (t == PKT_CMD);
  endfunction

  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_SCANNING = 3'd1,
    ST_READY    = 3'd2,
    ST_RUNNING  = 3'd3,
    ST_DONE     = 3'd4,
    ST_ERROR    = 3'd5
  } sys_state_e;

  typedef enum logic [1:0] {
    SERVO_RELEASED = 2'd0,
    SERVO_PARTIAL  = 2'd1,
    SERVO_GRIPPED  = 2'd2
  } servo_e;

  // HPS -> FPGA control word (PIO1).
  typedef struct packed {
    logic [20:0] unused;
    logic        clear;       // [10]
    logic        irq_ack;     // [9]
    logic        exec_error;  // [8]
    logic        exec_done;   // [7]
    logic        exec_start;  // [6]
    logic        solution;    // [5]
    logic        freeze;      // [4]
    logic [2:0]  face_idx;    // [3:1]
    logic        scan_start;  // [0]
  } ctrl_word_t;

  // FPGA -> HPS status word (PIO0).
  typedef struct packed {
    logic [1:0]  zero;         // [31:30]
    logic [5:0]  valid_faces;  // [29:24]
    logic [3:0]  cells_done;   // [23:20]
    logic [7:0]  move_count;   // [19:12]
    logic        frozen;       // [11]
    logic        irq_pending;  // [10]
    logic        moves_ready;  // [9]
    logic        solution;     // [8]
    logic        face_done;    // [7]
    logic        engine_busy;  // [6]
    logic [2:0]  faces;        // [5:3]
    sys_state_e  state;        // [2:0]
  } status_word_t;

  // RGB565 -> RGB888 by bit replication.
  function automatic rgb8_t rgb565_to_888(input logic [15:0] p);
    rgb8_t c;
    c.r = {p[15:11], p[15:13]};
    c.g = {p[10:5], p[10:9]};
    c.b = {p[4:0], p[4:2]};
    return c;
  endfunction

  // Luma approximation (R + 2G + B) / 4.
  function automatic logic [7:0] luma(input rgb8_t c);
    logic [9:0] s;
    s = 10'(c.r) + {1'b0, c.g, 1'b0} + 10'(c.b);
    return s[9:2];
  endfunction

endpackage
