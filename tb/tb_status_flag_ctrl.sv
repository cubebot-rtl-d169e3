// tb_status_flag_ctrl - self-checking test of the control/status flag
// logic between the processor's parallel I/O words and the colour engine.
// Drives the control word bit by bit and a simple engine model, and checks:
// a scan request starts the engine only on a rising edge with the freeze
// flag set and the engine idle (otherwise refused and counted), the face
// index is latched, face_done and moves_ready raise the interrupt and
// irq_ack clears it, the system state walks IDLE -> SCANNING -> READY ->
// RUNNING -> DONE, an execution error goes to ERROR, clear returns to IDLE,
// and every status word field mirrors its source.
module tb_status_flag_ctrl;
  import cubebot_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  ctrl_word_t ctrl = '0;
  logic engine_busy = 0, cell_valid = 0, face_done = 0, moves_ready = 0;
  logic [2:0] faces_count = 0, face_sel;
  logic [5:0] valid_faces = 0;
  logic [7:0] move_count = 0, refused_scans;
  logic engine_start, clear_all, irq;
  status_word_t status;
  sys_state_e state;

  status_flag_ctrl dut (.*);
  always #5 clk = ~clk;

  int n_start = 0, n_clear = 0;
  always @(posedge clk) if (rst_n) begin
    if (engine_start) n_start++;
    if (clear_all) n_clear++;
  end

  task automatic expect_state(input sys_state_e s, input string what);
    checks++;
    if (state != s || status.state != s) begin failures++; $display("FAIL %s: state %0d exp %0d", what, state, s); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // engine model: busy for 20 cycles after a start, 9 cells then face_done
  initial forever begin
    @(posedge clk);
    if (rst_n && engine_start) begin
      engine_busy <= 1;
      for (int c = 0; c < 9; c++) begin
        @(posedge clk); cell_valid <= 1; @(posedge clk); cell_valid <= 0;
      end
      face_done <= 1; engine_busy <= 0;
      @(posedge clk); face_done <= 0;
    end
  end

  initial begin
    #1_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0;
    repeat (3) @(negedge clk); rst_n = 1;
    tick(2);
    expect_state(ST_IDLE, "reset");
    // scan without freeze: refused
    ctrl.scan_start = 1; tick(2); ctrl.scan_start = 0; tick(2);
    checks++;
    if (n_start != 0 || refused_scans != 1) begin failures++; $display("FAIL unfrozen scan"); end
    // frozen scan of face 4
    ctrl.freeze = 1; ctrl.face_idx = 3'd4; tick();
    ctrl.scan_start = 1; tick(2);
    checks++;
    if (n_start != 1 || face_sel != 3'd4) begin
      failures++; $display("FAIL scan start %0d sel %0d", n_start, face_sel);
    end
    expect_state(ST_SCANNING, "scan");
    // holding the bit high does not start again; a new edge while busy is refused
    ctrl.scan_start = 0; tick(); ctrl.scan_start = 1; tick(2); ctrl.scan_start = 0;
    checks++;
    if (n_start != 1 || refused_scans != 2) begin failures++; $display("FAIL busy scan %0d %0d", n_start, refused_scans); end
    while (!face_done) tick();
    tick(2);
    checks++;
    if (!irq || !status.irq_pending || !status.face_done || status.cells_done != 4'd9) begin
      failures++; $display("FAIL face irq %0d done %0d cells %0d", irq, status.face_done, status.cells_done);
    end
    ctrl.irq_ack = 1; tick(2); ctrl.irq_ack = 0;
    checks++;
    if (irq) begin failures++; $display("FAIL irq ack"); end
    // status mirrors
    faces_count = 3'd5; valid_faces = 6'b101101; move_count = 8'd23; ctrl.solution = 1; tick();
    checks++;
    if (status.faces != 3'd5 || status.valid_faces != 6'b101101 || status.move_count != 8'd23 ||
        !status.solution || !status.frozen) begin
      failures++; $display("FAIL status mirror %08x", status);
    end
    // moves ready -> READY + irq
    moves_ready = 1; tick(2);
    expect_state(ST_READY, "ready");
    checks++;
    if (!irq || !status.moves_ready) begin failures++; $display("FAIL moves irq"); end
    ctrl.irq_ack = 1; tick(); ctrl.irq_ack = 0;
    ctrl.exec_start = 1; tick(2); ctrl.exec_start = 0;
    expect_state(ST_RUNNING, "running");
    ctrl.exec_done = 1; tick(2); ctrl.exec_done = 0;
    expect_state(ST_DONE, "done");
    // error from any state
    ctrl.exec_error = 1; tick(2); ctrl.exec_error = 0;
    expect_state(ST_ERROR, "error");
    checks++;
    if (!irq) begin failures++; $display("FAIL error irq"); end
    // clear
    ctrl.clear = 1; tick(2); ctrl.clear = 0; tick();
    expect_state(ST_IDLE, "clear");
    checks++;
    if (n_clear != 1 || irq || status.cells_done != 0) begin failures++; $display("FAIL clear"); end
    // random control traffic: status stays consistent with the inputs
    for (int k = 0; k < 300; k++) begin
      ctrl = ctrl_word_t'($urandom() & 32'h3F0);
      ctrl.scan_start = $urandom_range(0, 1);
      moves_ready = $urandom_range(0, 1);
      faces_count = 3'($urandom_range(0, 6));
      tick();
      checks++;
      if (status.frozen != ctrl.freeze || status.moves_ready != moves_ready || status.faces != faces_count ||
          status.irq_pending != irq || 32'(state) > 5) begin
        failures++; $display("FAIL random %0d", k);
      end
    end
    $display("starts=%0d refused=%0d", n_start, refused_scans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
