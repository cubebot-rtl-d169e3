// tb_move_encode_buffer - self-checking test of the move encoding buffer.
// Writes random move lists through the register interface (including
// invalid spins that must be rejected), commits, and checks the bytes that
// reach the memory write port against the [SSSDDFFF] encoding, the 0xFF end
// marker, the move count and moves_ready. Back-to-back writes exercise the
// queue; a list longer than the memory must set the overflow flag and stop
// at 255 moves plus the end marker. Clear is checked to empty everything.
module tb_move_encode_buffer;
  import cubebot_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] csr_address = 0;
  logic csr_write = 0;
  logic [31:0] csr_writedata = 0, csr_rdata;
  logic mem_we, moves_ready;
  logic [7:0] mem_addr, mem_wdata, move_count;

  move_encode_buffer dut (.*);
  always #5 clk = ~clk;

  logic [7:0] mem [256];
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  logic [7:0] exp_list [$];
  int n_reject = 0, n_overflow = 0, n_ready = 0, max_level = 0;

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); csr_address = a; csr_writedata = d; csr_write = 1;
    @(negedge clk); csr_write = 0; csr_address = 2'd3;
    #1 if (32'(csr_rdata[19:16]) > max_level) max_level = csr_rdata[19:16];
  endtask

  // back-to-back burst without idle cycles
  task automatic burst(input int n);
    for (int i = 0; i < n; i++) begin
      int s, f, r;
      s = $urandom_range(0, 6) - 3; f = $urandom_range(0, 3); r = $urandom_range(0, 7);
      if (s == -1 && f == 3 && r == 7) r = 6;  // 0xFF is the end marker, not a move
      @(negedge clk); csr_address = 0; csr_write = 1;
      csr_writedata = {13'd0, 3'(r), 6'd0, 2'(f), 4'd0, 4'(s)};
      exp_list.push_back({3'(s), 2'(f), 3'(r)});
      csr_address = 0;
      #1 if (32'(dut.f_level) > max_level) max_level = dut.f_level;
    end
    @(negedge clk); csr_write = 0;
  endtask

  task automatic check_list(input string what);
    repeat (20) @(negedge clk);
    checks++;
    if (!moves_ready || move_count != 8'(exp_list.size())) begin
      failures++; $display("FAIL %s: ready %0d count %0d exp %0d", what, moves_ready, move_count, exp_list.size());
    end
    for (int i = 0; i < exp_list.size(); i++) begin
      checks++;
      if (mem[i] != exp_list[i]) begin failures++; $display("FAIL %s byte %0d %02x exp %02x", what, i, mem[i], exp_list[i]); end
    end
    checks++;
    if (mem[exp_list.size()] != MOVE_END) begin failures++; $display("FAIL %s no end marker", what); end
    n_ready++;
  endtask

  initial begin
    #5_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // list 1: single writes with some invalid spins
    for (int i = 0; i < 20; i++) begin
      int s, f, r, rej0;
      logic signed [3:0] sv;
      s = $urandom_range(0, 15); f = $urandom_range(0, 3); r = $urandom_range(0, 7);
      sv = 4'(s);
      csr_address = 2'd3; #1 rej0 = csr_rdata[27:20];
      wr(2'd0, {13'd0, 3'(r), 6'd0, 2'(f), 4'd0, 4'(s)});
      checks++;
      if (sv >= -3 && sv <= 3 && {sv[2:0], 2'(f), 3'(r)} != MOVE_END) begin
        exp_list.push_back({sv[2:0], 2'(f), 3'(r)});
        if (csr_rdata[27:20] != 8'(rej0)) begin failures++; $display("FAIL valid move rejected"); end
      end else begin
        if (csr_rdata[27:20] != 8'(rej0 + 1)) begin failures++; $display("FAIL spin %0d accepted", sv); end
        else n_reject++;
      end
    end
    // the code 0xFF is reserved for the end marker
    wr(2'd0, {13'd0, 3'd7, 6'd0, 2'd3, 4'd0, 4'hF});
    checks++;
    if (move_count != 8'(exp_list.size())) begin failures++; $display("FAIL 0xFF accepted as a move"); end
    wr(2'd1, 0);
    check_list("list1");
    // writes after the commit are refused until clear
    wr(2'd0, 32'h1);
    checks++;
    if (move_count != 8'(exp_list.size())) begin failures++; $display("FAIL write after ready"); end
    // clear
    wr(2'd2, 0);
    checks++;
    if (moves_ready || move_count != 0 || csr_rdata[27:20] != 0) begin failures++; $display("FAIL clear"); end
    exp_list.delete();
    // list 2: back-to-back burst
    burst(40);
    wr(2'd1, 0);
    check_list("burst");
    wr(2'd2, 0); exp_list.delete();
    // list 3: longer than memory
    burst(300);
    wr(2'd3, 0);
    checks++;
    if (!csr_rdata[29]) begin failures++; $display("FAIL no overflow flag"); end
    else n_overflow++;
    while (exp_list.size() > 255) void'(exp_list.pop_back());
    wr(2'd1, 0);
    check_list("full");
    checks++;
    if (n_reject == 0 || n_overflow == 0 || n_ready < 3 || max_level < 1) begin
      failures++; $display("FAIL mechanisms rej %0d ovf %0d ready %0d level %0d", n_reject, n_overflow, n_ready, max_level);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
