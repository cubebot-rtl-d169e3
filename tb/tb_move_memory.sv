// tb_move_memory - self-checking test of the dual-port move memory.
// Random reads and writes on both ports (port A words with byte enables,
// port B bytes) against a byte-array model, including same-address
// collisions where the byte port wins. Reads are checked one cycle later.
module tb_move_memory;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0] a_addr = 0;
  logic a_read = 0, a_write = 0, b_read = 0, b_we = 0;
  logic [31:0] a_wdata = 0, a_rdata;
  logic [3:0] a_be = 0;
  logic [7:0] b_addr = 0, b_wdata = 0, b_rdata;
  int collisions = 0;

  move_memory dut (.*);
  always #5 clk = ~clk;
  logic [7:0] model [256];

  initial begin
    #10_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_a; logic [7:0] exp_b; bit chk_a, chk_b;
    // initialise through port B
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); b_we = 1; b_addr = 8'(i); b_wdata = 8'($urandom()); model[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      a_addr = 6'($urandom()); a_read = $urandom_range(0, 1); a_write = !a_read && $urandom_range(0, 1);
      a_be = 4'($urandom()); a_wdata = $urandom();
      b_addr = ($urandom_range(0, 3) == 0) ? {a_addr, 2'($urandom())} : 8'($urandom());
      b_read = $urandom_range(0, 1); b_we = !b_read && $urandom_range(0, 1); b_wdata = 8'($urandom());
      chk_a = a_read; chk_b = b_read;
      exp_a = {model[{a_addr, 2'd3}], model[{a_addr, 2'd2}], model[{a_addr, 2'd1}], model[{a_addr, 2'd0}]};
      exp_b = model[b_addr];
      if (a_write) for (int j = 0; j < 4; j++) if (a_be[j]) model[{a_addr, 2'(j)}] = a_wdata[8*j +: 8];
      if (b_we) begin
        if (a_write && b_addr[7:2] == a_addr && a_be[b_addr[1:0]]) collisions++;
        model[b_addr] = b_wdata;
      end
      @(posedge clk); #1;
      if (chk_a) begin
        checks++;
        if (a_rdata != exp_a) begin failures++; $display("FAIL A read %0d: %08x exp %08x", a_addr, a_rdata, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata != exp_b) begin failures++; $display("FAIL B read %0d: %02x exp %02x", b_addr, b_rdata, exp_b); end
      end
    end
    @(negedge clk); a_write = 0; b_we = 0; a_read = 0; b_read = 0;
    // final sweep through port A
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); a_read = 1; a_addr = 6'(i);
      @(posedge clk); #1;
      checks++;
      if (a_rdata != {model[{6'(i), 2'd3}], model[{6'(i), 2'd2}], model[{6'(i), 2'd1}], model[{6'(i), 2'd0}]}) begin
        failures++; $display("FAIL sweep %0d", i);
      end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
