// tb_move_sequencer - self-checking test of the move list executor. The
// packet side is driven directly; a stepper model answers move and homing
// commands after a delay. For random move lists (random [SSSDDFFF] bytes,
// optional 0xFF end marker) the testbench records every servo change and
// stepper command and compares the trace with the expected sequence: homing
// first, then per move the flips (partial grip / release), the spin of
// spin*800 steps with servos released, and the rotation of rot*400 steps
// with servos gripped. It checks that each stepper command waits at least
// the settle time after a servo change, the move and flip counters, that a
// list arriving while busy is dropped, and that a homing failure stops the
// list with the error flag.
module tb_move_sequencer;
  import cubebot_pkg::*;
  localparam int SETTLE = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic data_valid = 0, pkt_valid = 0;
  logic [7:0] data_idx = 0, data_byte = 0, pkt_type = 0, pkt_len = 0;
  logic stp_cmd_move, stp_cmd_align, stp_done = 0, stp_align_err = 0;
  logic signed [13:0] stp_steps;
  servo_e servo_state;
  logic [7:0] flip_count, moves_done, dropped;
  logic busy, error, list_done;

  move_sequencer #(.SETTLE_CYC(SETTLE)) dut (.*);
  always #5 clk = ~clk;

  // stepper model
  bit fail_align = 0;
  initial forever begin
    @(posedge clk);
    if (stp_cmd_move || stp_cmd_align) begin
      bit al;
      al = stp_cmd_align;
      repeat ($urandom_range(3, 30)) @(posedge clk);
      stp_done <= 1; stp_align_err <= al && fail_align;
      @(posedge clk); stp_done <= 0;
    end
  end

  // trace
  int trace [$];
  int cyc = 0, last_servo_change = 0, settle_viol = 0;
  servo_e prev_servo = SERVO_RELEASED;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (servo_state != prev_servo) begin
      trace.push_back(100000 + int'(servo_state));
      last_servo_change = cyc;
    end
    prev_servo = servo_state;
    if (stp_cmd_align) trace.push_back(200000);
    if (stp_cmd_move) begin
      trace.push_back(int'(stp_steps));
      if (cyc - last_servo_change < SETTLE) settle_viol++;
    end
  end

  task automatic send_list(input logic [7:0] bytes [$], input logic [7:0] typ = PKT_MOVES);
    pkt_type = typ; pkt_len = 8'(bytes.size());
    foreach (bytes[i]) begin
      @(negedge clk); data_valid = 1; data_idx = 8'(i); data_byte = bytes[i];
    end
    @(negedge clk); data_valid = 0;
    @(negedge clk); pkt_valid = 1;
    @(negedge clk); pkt_valid = 0;
  endtask

  function automatic void expect_list(input logic [7:0] bytes [$], ref int exp [$], ref int n_moves, ref int n_flips);
    servo_e s;
    s = SERVO_RELEASED;
    exp.push_back(200000);
    foreach (bytes[i]) begin
      logic signed [2:0] sp;
      int fl, ro;
      if (bytes[i] == 8'hFF) break;
      sp = bytes[i][7:5]; fl = bytes[i][4:3]; ro = bytes[i][2:0];
      for (int f = 0; f < fl; f++) begin
        exp.push_back(100000 + int'(SERVO_PARTIAL)); exp.push_back(100000 + int'(SERVO_RELEASED));
        n_flips++;
      end
      if (sp != 0) exp.push_back(int'(sp) * 800);
      if (ro != 0) begin
        exp.push_back(100000 + int'(SERVO_GRIPPED)); exp.push_back(ro * 400);
        exp.push_back(100000 + int'(SERVO_RELEASED));
      end
      n_moves++;
    end
  endfunction

  initial begin
    #20_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_moves = 0, n_flips = 0, n_lists = 0, n_drop = 0, n_err = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      logic [7:0] bytes [$];
      int exp [$];
      int len;
      bytes.delete(); exp.delete();
      len = $urandom_range(1, 24);
      for (int i = 0; i < len; i++) begin
        logic [7:0] b;
        b = 8'($urandom());
        if (b[7:5] == 3'b100) b[7:5] = 3'b000;  // -4 is not a valid spin
        if (b == 8'hFF) b = 8'h00;
        bytes.push_back(b);
      end
      if (k % 3 == 1) begin bytes.push_back(8'hFF); bytes.push_back(8'h29); end
      trace.delete();
      expect_list(bytes, exp, n_moves, n_flips);
      send_list(bytes);
      // a second list while busy is dropped
      if (k == 2) begin
        logic [7:0] extra [$];
        extra.delete();
        extra.push_back(8'h20);
        send_list(extra);
        n_drop++;
      end
      while (!list_done) @(negedge clk);
      repeat (5) @(negedge clk);
      n_lists++;
      checks++;
      if (trace.size() != exp.size()) begin
        failures++; $display("FAIL list %0d: %0d events exp %0d", k, trace.size(), exp.size());
      end else foreach (exp[i]) if (trace[i] != exp[i]) begin
        failures++; $display("FAIL list %0d event %0d: %0d exp %0d", k, i, trace[i], exp[i]); break;
      end
      checks++;
      if (moves_done != 8'(n_moves) || flip_count != 8'(n_flips) || error || busy) begin
        failures++; $display("FAIL counters moves %0d/%0d flips %0d/%0d", moves_done, n_moves, flip_count, n_flips);
      end
    end
    checks++;
    if (dropped != 8'(n_drop) || settle_viol != 0) begin
      failures++; $display("FAIL dropped %0d settle violations %0d", dropped, settle_viol);
    end
    // a packet of another type is ignored
    begin
      logic [7:0] b [$];
      b.push_back(8'h21);
      send_list(b, PKT_FACE);
      repeat (5) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL face packet started a run"); end
    end
    // homing failure
    fail_align = 1;
    begin
      logic [7:0] b [$];
      int m0;
      b.push_back(8'h20); b.push_back(8'h01);
      m0 = moves_done;
      send_list(b);
      while (!list_done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (!error || moves_done != 8'(m0)) begin failures++; $display("FAIL align error not reported"); end
      else n_err++;
    end
    checks++;
    if (n_err == 0 || n_drop == 0 || n_flips == 0 || n_lists < 10) begin failures++; $display("FAIL coverage"); end
    $display("moves=%0d flips=%0d", n_moves, n_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
