// tb_actuation_ctrl - self-checking test of the robot-side controller from
// serial bytes to motor pins. At a reduced clock (100 kHz, so pulse delays
// of 10 and 70 cycles) and short settle and timeout values, it sends framed
// packets byte by byte: a corrupted packet (counted as an error), a status
// packet (reported, not executed) and move lists. A motor model integrates
// step/dir into an angle and drives the slot sensor (two slots half a turn
// apart). After each list the
// testbench checks that the motor homed onto the slot plus the edge
// compensation and then moved by the sum of spin*800 + rot*400 steps, the
// move and flip counters, and the servo state returning to released.
module tb_actuation_ctrl;
  import cubebot_pkg::*;
  localparam int REV = 3200, SLOT = 400, COMP = 20, PITCH = 1600;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx_valid = 0, sensor_n;
  logic [7:0] rx_byte = 0, pkt_type, pkt_len, pkt_errors, moves_done, flip_count;
  logic step, dir, pkt_valid, busy, error, list_done, homed;
  servo_e servo_state;
  logic [11:0] position;

  actuation_ctrl #(.CLK_HZ(100_000), .TIMEOUT_CYC(500), .SETTLE_CYC(30)) dut (.*);
  always #5 clk = ~clk;

  int angle = 700, home_angle = 0;
  logic step_q = 0, homed_q = 0;
  servo_e servo_q = SERVO_RELEASED;
  int servo_changes = 0, n_pkts = 0;
  always @(posedge clk) if (rst_n) begin
    step_q <= step;
    if (step && !step_q) angle += dir ? 1 : -1;
    servo_q <= servo_state;
    if (servo_state != servo_q) servo_changes++;
    if (pkt_valid) n_pkts++;
    homed_q <= homed;
    if (homed && !homed_q) home_angle = angle;
  end
  // two slots half a turn apart, so homing always finds one within 1600 steps
  assign sensor_n = !((((angle % PITCH) + PITCH) % PITCH) >= SLOT && (((angle % PITCH) + PITCH) % PITCH) < SLOT + 60);

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_byte = b;
    @(negedge clk); rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_pkt(input logic [7:0] t, input logic [7:0] d [$]);
    send_byte(PKT_START); send_byte(t); send_byte(8'(d.size()));
    foreach (d[i]) send_byte(d[i]);
    send_byte(PKT_END);
  endtask

  initial begin
    #2_000_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d [$];
    int e0;
    repeat (3) @(negedge clk); rst_n = 1;
    // corrupted packet (missing end byte)
    e0 = pkt_errors;
    send_byte(PKT_START); send_byte(PKT_MOVES); send_byte(8'd1); send_byte(8'h20); send_byte(8'h00);
    checks++;
    if (pkt_errors != 8'(e0 + 1) || busy) begin failures++; $display("FAIL corrupted packet"); end
    // status packet: reported, not executed
    d.delete(); d.push_back(8'h02);
    send_pkt(PKT_STATUS, d);
    repeat (3) @(negedge clk);
    checks++;
    if (n_pkts != 1 || pkt_type != PKT_STATUS || busy) begin failures++; $display("FAIL status packet"); end
    // move lists
    for (int k = 0; k < 3; k++) begin
      int exp_delta, m0, f0, nm, nf;
      d.delete();
      exp_delta = 0; nm = 0; nf = 0;
      for (int i = 0; i < 3; i++) begin
        logic [7:0] b;
        logic signed [2:0] sp;
        b = 8'($urandom());
        b[2] = 1'b0;              // keep rotations short: 0..3 eighth turns
        if (b[7:5] == 3'b100) b[7:5] = 3'b001;
        sp = b[7:5];
        exp_delta += int'(sp) * 800 + int'(b[2:0]) * 400;
        nm++; nf += b[4:3];
        d.push_back(b);
      end
      d.push_back(MOVE_END);
      m0 = moves_done; f0 = flip_count;
      send_pkt(PKT_MOVES, d);
      while (!list_done) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (!homed || error || position != 12'((exp_delta % REV + REV) % REV)) begin
        failures++; $display("FAIL list %0d: homed %0d pos %0d exp %0d", k, homed, position, (exp_delta % REV + REV) % REV);
      end
      checks++;
      // home lies EDGE_COMP steps past a sensed slot position
      if ((angle - home_angle - exp_delta) % REV != 0 ||
          ((home_angle - COMP) % PITCH + PITCH) % PITCH < SLOT ||
          ((home_angle - COMP) % PITCH + PITCH) % PITCH >= SLOT + 60) begin
        failures++; $display("FAIL list %0d motor angle %0d home %0d (delta %0d)", k, angle, home_angle, exp_delta);
      end
      checks++;
      if (moves_done != 8'(m0 + nm) || flip_count != 8'(f0 + nf) || servo_state != SERVO_RELEASED) begin
        failures++; $display("FAIL list %0d counters", k);
      end
    end
    checks++;
    if (servo_changes == 0) begin failures++; $display("FAIL servo never moved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
