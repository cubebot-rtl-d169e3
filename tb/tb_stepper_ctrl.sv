// tb_stepper_ctrl - self-checking test of the step/direction generator.
// Runs at a reduced clock (CLK_HZ = 100 kHz, so the fast and slow delays are
// 10 and 70 cycles) and checks for random signed moves: the number of step
// pulses, the direction, the high and low width of every pulse (fast in the
// body, slow in the tail), the total move time against the closed-form
// count, and the tracked position. Homing is checked with a slot sensor
// model that goes low over a window of motor positions: the stop point
// must be the first sensed step plus EDGE_COMP; a sensor that never goes
// low must raise align_err after exactly ALIGN_TIMEOUT steps.
module tb_stepper_ctrl;
  localparam int unsigned CLK_HZ = 100_000;
  localparam int FAST = 10, SLOW = 70, TAIL = 100, COMP = 20, REV = 3200, TOUT = 1600;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_move = 0, cmd_align = 0, sensor_n;
  logic signed [13:0] cmd_steps = 0;
  logic step, dir, busy, done, align_err, homed;
  logic [11:0] position;

  stepper_ctrl #(.CLK_HZ(CLK_HZ)) dut (.*);
  always #5 clk = ~clk;

  // motor model: absolute angle in steps
  int angle = 0, pulses = 0, slot_lo = 1000, slot_hi = 1100;
  bit slot_enable = 1;
  int hi_len = 0, lo_len = 0, n_fast = 0, n_slow = 0, bad_width = 0;
  logic step_q = 0;
  assign sensor_n = !(slot_enable && (((angle % REV) + REV) % REV) >= slot_lo &&
                      (((angle % REV) + REV) % REV) < slot_hi);

  always @(posedge clk) if (rst_n) begin
    step_q <= step;
    if (done) begin
      // last low half of a command, then the line idles
      if (lo_len != 0 && lo_len != hi_len && lo_len != hi_len + 1) bad_width++;
      lo_len = 0;
    end else if (step && !step_q) begin
      pulses++;
      angle += dir ? 1 : -1;
      if (lo_len != 0 && lo_len != hi_len) bad_width++;
      hi_len = 1; lo_len = 0;
    end else if (step) hi_len++;
    else if (step_q && !step) begin
      lo_len = 1;
      if (hi_len == FAST) n_fast++; else if (hi_len == SLOW) n_slow++; else bad_width++;
    end else if (lo_len != 0) lo_len++;
  end

  function automatic int move_time(input int n);
    int f = (n > TAIL) ? n - TAIL : 0;
    return 2 * FAST * f + 2 * SLOW * (n - f);
  endfunction

  task automatic do_move(input int n);
    int p0 = pulses, a0 = angle, t_first = -1, t = 0, f0 = n_fast, s0 = n_slow;
    int exp_pos;
    @(negedge clk); cmd_move = 1; cmd_steps = 14'(n);
    @(negedge clk); cmd_move = 0;
    while (!done) begin
      @(posedge clk); #1;
      t++;
      if (step && t_first < 0) t_first = t;
    end
    exp_pos = ((int'(position) - (angle - a0)) % REV + REV) % REV; // previous position
    checks++;
    if (pulses - p0 != (n < 0 ? -n : n) || (angle - a0) != n) begin
      failures++; $display("FAIL move %0d: pulses %0d angle %0d", n, pulses - p0, angle - a0);
    end
    checks++;
    if (n != 0 && (t - t_first) != move_time(n < 0 ? -n : n)) begin
      failures++;
      $display("FAIL move %0d took %0d cycles, exp %0d", n, t - t_first, move_time(n < 0 ? -n : n));
    end
    checks++;
    if (n != 0 && (n_slow - s0) != ((n < 0 ? -n : n) < TAIL ? (n < 0 ? -n : n) : TAIL)) begin
      failures++; $display("FAIL move %0d: %0d slow pulses", n, n_slow - s0);
    end
    checks++;
    if (n != 0 && dir != (n > 0)) begin failures++; $display("FAIL dir for %0d", n); end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #2_000_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int homes = 0, tos = 0, first_seen, exp_stop;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    // homing with the slot ahead of the motor
    angle = 300;
    @(negedge clk); cmd_align = 1; @(negedge clk); cmd_align = 0;
    while (!done) @(negedge clk);
    // sensor is checked after each step: first step that lands on slot_lo
    exp_stop = slot_lo + COMP;
    checks++;
    if (!homed || align_err || angle != exp_stop || position != 0 || n_fast != 0) begin
      failures++;
      $display("FAIL homing: homed %0d err %0d angle %0d exp %0d pos %0d", homed, align_err, angle,
               exp_stop, position);
    end else homes++;
    // moves, including the document's 90 and 45 degree step counts
    do_move(800); do_move(-400); do_move(0); do_move(1); do_move(-2400);
    for (int i = 0; i < 6; i++) do_move($signed($urandom_range(0, 3000)) - 1500);
    checks++;
    if (int'(position) != (((angle - exp_stop) % REV) + REV) % REV) begin
      failures++; $display("FAIL position %0d, model %0d", position, angle - exp_stop);
    end
    // homing without a slot: timeout
    slot_enable = 0;
    first_seen = pulses;
    @(negedge clk); cmd_align = 1; @(negedge clk); cmd_align = 0;
    while (!done) @(negedge clk);
    checks++;
    if (!align_err || homed || pulses - first_seen != TOUT) begin
      failures++; $display("FAIL timeout: err %0d steps %0d", align_err, pulses - first_seen);
    end else tos++;
    // a command while busy is ignored
    slot_enable = 1;
    first_seen = pulses;
    @(negedge clk); cmd_move = 1; cmd_steps = 14'sd5; @(negedge clk); cmd_move = 0;
    repeat (5) @(negedge clk);
    @(negedge clk); cmd_move = 1; cmd_steps = 14'sd50; @(negedge clk); cmd_move = 0;
    while (!done) @(negedge clk);
    repeat (2000) @(negedge clk);
    checks++;
    if (pulses - first_seen != 5) begin failures++; $display("FAIL busy command accepted"); end
    checks++;
    if (bad_width != 0 || homes == 0 || tos == 0 || n_fast == 0) begin
      failures++; $display("FAIL widths %0d homes %0d timeouts %0d fast %0d", bad_width, homes, tos, n_fast);
    end
    $display("fast=%0d slow=%0d", n_fast, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
