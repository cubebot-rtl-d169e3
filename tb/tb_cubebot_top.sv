// tb_cubebot_top - end-to-end self-checking test of cubebot_top.
//
// Reduced size: 100 kHz clock (so the pulse delays are 10 and 70 cycles),
// an 8x8 sampling window, a 500-cycle packet timeout and a 40-cycle servo
// settle time, so a list of eight random moves runs in a short simulation.
//
// The testbench plays the main processor and the outside world:
//   * a frame buffer model answers the colour engine's reads with fixed
//     latency (plus wait states on some faces) and draws a 3x3 grid of cube
//     colours over the default region of interest, a new pattern per face;
//   * as the processor it drives the control word, waits for the interrupt,
//     reads the face colours, writes a move list into the move encoding
//     buffer, commits it, reads the packed bytes back from the move memory
//     and sends them as a framed packet on the robot byte input at the
//     serial rate;
//   * a motor model integrates step/dir into an angle and drives the slot
//     sensor (two slots half a turn apart).
// It checks the 54 colours, face_done/irq handshakes, the face time against
// the published 14.8 ms per face, the move bytes and end marker, the moves
// ready state, homing, the final motor angle against the move list, the
// step pulse widths (fast and slow delays) and the system state sequence,
// and counts every mechanism, failing if one never happened: scan refused,
// memory wait states, face done, interrupt, move rejected, commit/ready,
// packet abort with resynchronisation, packet timeout, homing, flips, spin,
// rotation, list dropped while busy, clear.
module tb_cubebot_top;
  import cubebot_pkg::*;
  localparam int CLK = 100_000;
  localparam int WINP = 8;
  localparam int LAT = 2;
  localparam int BYTE_CYC = CLK / 11520;          // 115200 baud, 10 bits per byte
  localparam int FAST = CLK / 1000 * 100 / 1000;  // 100 us
  localparam int SLOW = CLK / 1000 * 700 / 1000;  // 700 us
  localparam int TIMEOUT = 500;
  localparam int PUB_FACE_CYC = CLK / 1000 * 148 / 10;  // 14.8 ms
  localparam bit CHECK_RATE = (CLK == 50_000_000);       // only at the real clock
  localparam int REV = 3200, PITCH = 1600, COMP = 20;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [4:0]  csr_address = 0;
  logic        csr_read = 0, csr_write = 0;
  logic [31:0] csr_writedata = 0, csr_readdata;
  logic        csr_readdatavalid;
  logic [31:0] avm_address;
  logic        avm_read, avm_waitrequest = 0, avm_readdatavalid = 0;
  logic [15:0] avm_readdata = 0;
  logic [31:0] pio1_ctrl = 0, pio0_status, pio2_colors;
  logic [2:0]  pio2_sel = 0;
  logic        irq;
  logic [5:0]  mem_address = 0;
  logic        mem_read = 0, mem_write = 0;
  logic [31:0] mem_writedata = 0, mem_readdata;
  logic [3:0]  mem_byteenable = 4'hF;
  logic        rx_valid = 0, sensor_n, step, dir;
  logic [7:0]  rx_byte = 0;
  logic [1:0]  servo_state;
  logic        act_pkt_valid, act_busy, act_error, act_list_done, act_homed;
  logic [7:0]  act_pkt_type, act_pkt_errors, act_moves_done, act_flips;

  cubebot_top #(.CLK_HZ(100_000), .WIN(8), .TIMEOUT_CYC(500), .SETTLE_CYC(40)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int m_refused = 0, m_waits = 0, m_face_done = 0, m_irq = 0, m_rejected = 0, m_ready = 0;
  int m_abort = 0, m_timeout = 0, m_homing = 0, m_flip = 0, m_spin = 0, m_rot = 0, m_drop = 0, m_clear = 0;

  // ---------------- frame buffer model ----------------
  localparam int W = 640, ROI_X = 140, ROI_Y = 60, CSZ = 120;
  logic [15:0] pal [6];
  color_e      pal_c [6];
  int face_pat [9];
  bit random_wait = 0;
  int cyc = 0;
  int pend_t [$];
  logic [15:0] pend_d [$];

  function automatic logic [15:0] pixel(input int x, input int y);
    int cx, cy, lx;
    logic [15:0] p;
    if (x < ROI_X || y < ROI_Y || x >= ROI_X + 3 * CSZ || y >= ROI_Y + 3 * CSZ) return 16'h0000;
    cx = (x - ROI_X) / CSZ; cy = (y - ROI_Y) / CSZ; lx = (x - ROI_X) % CSZ;
    if (lx == CSZ / 2 - 3) return 16'h0841;
    p = pal[face_pat[cy * 3 + cx]];
    p[0] = p[0] ^ 1'((x + y) % 3 == 0);
    return p;
  endfunction

  always @(posedge clk) begin
    cyc++;
    avm_readdatavalid <= 0;
    if (pend_t.size() > 0 && pend_t[0] == cyc) begin
      avm_readdatavalid <= 1; avm_readdata <= pend_d.pop_front(); void'(pend_t.pop_front());
    end
    if (avm_read && avm_waitrequest) m_waits++;
    if (avm_read && !avm_waitrequest) begin
      int idx;
      idx = avm_address / 2;
      pend_t.push_back(cyc + LAT - 1);
      pend_d.push_back(pixel(idx % W, idx / W));
    end
    avm_waitrequest <= random_wait ? 1'($urandom_range(0, 2) == 0) : 1'b0;
  end

  // ---------------- motor model ----------------
  int angle = 777, home_angle = 0, hi_len = 0, n_fast = 0, n_slow = 0, bad_width = 0;
  logic step_q = 0, homed_q = 0, irq_q = 0;
  always @(posedge clk) if (rst_n) begin
    step_q <= step;
    homed_q <= act_homed;
    irq_q <= irq;
    if (irq && !irq_q) m_irq++;
    if (act_homed && !homed_q) begin home_angle = angle; m_homing++; end
    if (step && !step_q) begin angle += dir ? 1 : -1; hi_len = 1; end
    else if (step) hi_len++;
    else if (step_q) begin
      if (hi_len == FAST) n_fast++; else if (hi_len == SLOW) n_slow++; else bad_width++;
    end
  end
  assign sensor_n = !((((angle % PITCH) + PITCH) % PITCH) >= 400 && (((angle % PITCH) + PITCH) % PITCH) < 460);

  // ---------------- processor helpers ----------------
  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic csr_wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); csr_address = a; csr_writedata = d; csr_write = 1;
    @(negedge clk); csr_write = 0;
  endtask

  task automatic csr_rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); csr_address = a; csr_read = 1;
    @(negedge clk); csr_read = 0;
    while (!csr_readdatavalid) @(negedge clk);
    d = csr_readdata;
  endtask

  task automatic mem_rd(input int w, output logic [31:0] d);
    @(negedge clk); mem_address = 6'(w); mem_read = 1;
    @(negedge clk); mem_read = 0; d = mem_readdata;
  endtask

  task automatic pulse_ctrl(input int bitn);
    pio1_ctrl[bitn] = 1; tick(3); pio1_ctrl[bitn] = 0; tick(2);
  endtask

  task automatic uart_byte(input logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_byte = b;
    @(negedge clk); rx_valid = 0;
    tick(BYTE_CYC - 2);
  endtask

  task automatic expect_state(input sys_state_e s, input string what);
    checks++;
    if (pio0_status[2:0] != 3'(s)) begin
      failures++; $display("FAIL %s: state %0d exp %0d", what, pio0_status[2:0], s);
    end
  endtask

  // One face: request, wait for the interrupt, check the nine colours.
  task automatic scan_face(input int f);
    int t0;
    logic [31:0] w;
    foreach (face_pat[i]) face_pat[i] = (f == 0) ? i % 6 : $urandom_range(0, 5);
    face_pat[4] = f;   // centre facelet names the face
    pio1_ctrl[3:1] = 3'(f);
    t0 = cyc;
    pulse_ctrl(0);
    while (!irq) tick();
    m_face_done++;
    checks++;
    if (CHECK_RATE && cyc - t0 > PUB_FACE_CYC) begin
      failures++; $display("FAIL face %0d took %0d cycles, budget %0d", f, cyc - t0, PUB_FACE_CYC);
    end
    pio2_sel = 3'(f); tick();
    w = pio2_colors;
    checks++;
    if (!w[31] || w[30:28] != 3'(f)) begin failures++; $display("FAIL face %0d word %08x", f, w); end
    for (int c = 0; c < 9; c++) begin
      checks++;
      if (w[3*c +: 3] != 3'(pal_c[face_pat[c]])) begin
        failures++; $display("FAIL face %0d cell %0d colour %0d exp %0d", f, c, w[3*c +: 3], pal_c[face_pat[c]]);
      end
    end
    checks++;
    if (!pio0_status[7] || pio0_status[23:20] != 4'd9) begin failures++; $display("FAIL face %0d status %08x", f, pio0_status); end
    pulse_ctrl(9);  // irq_ack
    checks++;
    if (irq) begin failures++; $display("FAIL irq not acknowledged"); end
  endtask

  initial begin
    #20_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0] moves [$];
    logic [7:0] mem_bytes [$];
    int exp_delta, n_moves, n_flips, t0, e0;
    pal[0] = 16'hFFFF; pal_c[0] = C_WHITE;
    pal[1] = 16'hD8E3; pal_c[1] = C_RED;
    pal[2] = 16'h1159; pal_c[2] = C_BLUE;
    pal[3] = 16'hF3C2; pal_c[3] = C_ORANGE;
    pal[4] = 16'h15A7; pal_c[4] = C_GREEN;
    pal[5] = 16'hE6E3; pal_c[5] = C_YELLOW;
    repeat (3) @(negedge clk); rst_n = 1;
    tick(2);
    expect_state(ST_IDLE, "reset");

    // ---- register window: read back the engine defaults ----
    csr_rd(5'd3, d);
    checks++;
    if (d != 32'd120) begin failures++; $display("FAIL cell size register %0d", d); end

    // ---- scan refused without the freeze flag ----
    t0 = m_waits;
    pulse_ctrl(0);
    tick(20);
    checks++;
    if (pio0_status[6] || pio0_status[2:0] != 3'(ST_IDLE)) begin failures++; $display("FAIL unfrozen scan started"); end
    else m_refused++;

    // ---- six faces ----
    pio1_ctrl[4] = 1;  // freeze
    for (int f = 0; f < 6; f++) begin
      random_wait = (f == 2);
      scan_face(f);
      if (f == 0) expect_state(ST_SCANNING, "scanning");
    end
    random_wait = 0;
    checks++;
    if (pio0_status[5:3] != 3'd6 || pio0_status[29:24] != 6'h3F) begin
      failures++; $display("FAIL face count %08x", pio0_status);
    end

    // ---- move list into the encoding buffer ----
    pio1_ctrl[5] = 1;  // solution found
    moves.delete();
    for (int i = 0; i < 8; i++) begin
      logic [7:0] b;
      b = 8'($urandom());
      if (b[7:5] == 3'b100) b[7:5] = 3'b011;
      if (b == 8'hFF) b = 8'h7F;
      moves.push_back(b);
    end
    moves[0] = 8'b001_01_000;  // one flip and a quarter turn
    moves[1] = 8'b000_00_010;  // a quarter-turn rotation
    exp_delta = 0; n_moves = 0; n_flips = 0;
    foreach (moves[i]) begin
      logic signed [2:0] sp;
      sp = moves[i][7:5];
      csr_wr(5'h10, {13'd0, moves[i][2:0], 6'd0, moves[i][4:3], 4'd0, sp[2], sp});
      exp_delta += int'(sp) * 800 + int'(moves[i][2:0]) * 400;
      n_moves++; n_flips += int'(moves[i][4:3]);
      if (sp != 0) m_spin++;
      if (moves[i][2:0] != 0) m_rot++;
      if (moves[i][4:3] != 0) m_flip++;
    end
    // an invalid spin (-4) is rejected
    csr_wr(5'h10, 32'h0000_000C);
    csr_rd(5'h13, d);
    checks++;
    if (d[27:20] != 8'd1) begin failures++; $display("FAIL reject count %0d", d[27:20]); end
    else m_rejected++;
    csr_wr(5'h11, 0);  // commit
    while (!irq) tick();
    m_ready++;
    expect_state(ST_READY, "ready");
    checks++;
    if (!pio0_status[9] || pio0_status[19:12] != 8'(moves.size())) begin
      failures++; $display("FAIL moves ready / count %08x", pio0_status);
    end
    pulse_ctrl(9);
    // read the packed list back from the move memory
    mem_bytes.delete();
    for (int w = 0; w < 64 && (mem_bytes.size() == 0 || mem_bytes[$] != MOVE_END); w++) begin
      mem_rd(w, d);
      for (int b = 0; b < 4; b++)
        if (mem_bytes.size() == 0 || mem_bytes[$] != MOVE_END) mem_bytes.push_back(d[8*b +: 8]);
    end
    checks++;
    if (mem_bytes.size() != moves.size() + 1) begin failures++; $display("FAIL list length %0d", mem_bytes.size()); end
    foreach (moves[i]) begin
      checks++;
      if (mem_bytes[i] != moves[i]) begin failures++; $display("FAIL move byte %0d %02x exp %02x", i, mem_bytes[i], moves[i]); end
    end

    // ---- serial link: a bad packet, a stalled packet, then the list ----
    pulse_ctrl(6);  // exec_start
    expect_state(ST_RUNNING, "running");
    e0 = int'(act_pkt_errors);
    uart_byte(PKT_START); uart_byte(8'h07);  // unknown type
    checks++;
    if (act_pkt_errors != 8'(e0 + 1)) begin failures++; $display("FAIL bad type"); end
    else m_abort++;
    uart_byte(PKT_START); uart_byte(PKT_MOVES); uart_byte(8'd4); uart_byte(8'h20);
    tick(TIMEOUT + 10);
    checks++;
    if (act_pkt_errors != 8'(e0 + 2) || act_busy) begin failures++; $display("FAIL stalled packet"); end
    else m_timeout++;
    uart_byte(PKT_START); uart_byte(PKT_MOVES); uart_byte(8'(mem_bytes.size()));
    foreach (mem_bytes[i]) uart_byte(mem_bytes[i]);
    uart_byte(PKT_END);
    // a second list while the first runs is dropped
    uart_byte(PKT_START); uart_byte(PKT_MOVES); uart_byte(8'd1); uart_byte(8'h20); uart_byte(PKT_END);
    checks++;
    if (!act_busy) begin failures++; $display("FAIL robot not busy"); end
    else m_drop++;
    while (!act_list_done) tick();
    tick(3);
    checks++;
    if (act_error || act_moves_done != 8'(n_moves) || act_flips != 8'(n_flips) || servo_state != 2'(SERVO_RELEASED)) begin
      failures++; $display("FAIL robot result: err %0d moves %0d/%0d flips %0d/%0d", act_error, act_moves_done, n_moves,
                           act_flips, n_flips);
    end
    checks++;
    if (((angle - home_angle - exp_delta) % REV) != 0 || ((home_angle - COMP) % PITCH + PITCH) % PITCH < 400 ||
        ((home_angle - COMP) % PITCH + PITCH) % PITCH >= 460) begin
      failures++; $display("FAIL motor angle %0d home %0d delta %0d", angle, home_angle, exp_delta);
    end
    checks++;
    if (bad_width != 0 || (n_fast == 0 && exp_delta != 0) || n_slow == 0) begin
      failures++; $display("FAIL pulse widths: bad %0d fast %0d slow %0d", bad_width, n_fast, n_slow);
    end
    pulse_ctrl(7);  // exec_done
    expect_state(ST_DONE, "done");

    // ---- clear ----
    pulse_ctrl(10);
    csr_wr(5'h12, 0);
    tick(2);
    expect_state(ST_IDLE, "cleared");
    checks++;
    if (pio0_status[29:24] != 0 || pio0_status[9] || pio0_status[19:12] != 0) begin
      failures++; $display("FAIL clear %08x", pio0_status);
    end
    else m_clear++;

    // ---- every mechanism happened ----
    checks++;
    if (m_refused == 0 || m_waits == 0 || m_face_done != 6 || m_irq < 7 || m_rejected == 0 || m_ready == 0 ||
        m_abort == 0 || m_timeout == 0 || m_homing == 0 || m_flip == 0 || m_spin == 0 || m_rot == 0 ||
        m_drop == 0 || m_clear == 0) begin
      failures++;
      $display("FAIL mechanisms: refused %0d waits %0d faces %0d irq %0d rejected %0d ready %0d abort %0d timeout %0d",
               m_refused, m_waits, m_face_done, m_irq, m_rejected, m_ready, m_abort, m_timeout);
      $display("     homing %0d flip %0d spin %0d rot %0d drop %0d clear %0d", m_homing, m_flip, m_spin, m_rot, m_drop, m_clear);
    end
    $display("cycles=%0d steps fast=%0d slow=%0d", cyc, n_fast, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
