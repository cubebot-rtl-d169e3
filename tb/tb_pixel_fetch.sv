// tb_pixel_fetch - self-checking test of the window read master. A memory
// model answers each read after a random latency (and random wait states in
// the second half) with data derived from the address; the test checks the
// address of every read (row-major WIN x WIN window at the requested origin,
// two bytes per pixel), the streamed pixel, column, row and last flag, and
// that one window costs WIN*WIN*(latency+1) cycles with a fixed latency.
module tb_pixel_fetch;
  localparam int W = 640, WIN = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] x0 = 0, y0 = 0;
  logic [31:0] frame_base = 0, avm_address;
  logic busy, avm_read, avm_waitrequest = 0, avm_readdatavalid = 0;
  logic [15:0] avm_readdata = 0, pix;
  logic pix_valid, pix_last;
  logic [2:0] pix_col, pix_row;

  pixel_fetch #(.IMG_W(W), .WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  int lat = 1, cyc = 0, n_waits = 0;
  bit rnd = 0;
  int pend_t [$];
  logic [15:0] pend_d [$];
  function automatic logic [15:0] dat(input logic [31:0] a);
    return 16'(a * 40503 >> 3);
  endfunction
  always @(posedge clk) begin
    cyc++;
    avm_readdatavalid <= 0;
    if (pend_t.size() > 0 && pend_t[0] <= cyc) begin
      avm_readdatavalid <= 1; avm_readdata <= pend_d.pop_front(); void'(pend_t.pop_front());
    end
    if (avm_read && avm_waitrequest) n_waits++;
    if (avm_read && !avm_waitrequest) begin
      pend_t.push_back(cyc + (rnd ? $urandom_range(0, 3) : lat - 1));
      pend_d.push_back(dat(avm_address));
    end
    avm_waitrequest <= rnd ? 1'($urandom_range(0, 3) == 0) : 1'b0;
  end

  task automatic window(input bit check_time);
    int n = 0, t0;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (1) begin
      @(posedge clk); #1;
      if (pix_valid) begin
        logic [31:0] a;
        a = frame_base + 2 * ((y0 + n / WIN) * W + x0 + n % WIN);
        checks++;
        if (pix != dat(a) || pix_col != 3'(n % WIN) || pix_row != 3'(n / WIN) || pix_last != (n == WIN * WIN - 1)) begin
          failures++; $display("FAIL pixel %0d: %04x exp %04x col %0d row %0d", n, pix, dat(a), pix_col, pix_row);
        end
        n++;
        if (pix_last) break;
      end
    end
    checks++;
    if (n != WIN * WIN) begin failures++; $display("FAIL %0d pixels", n); end
    if (check_time) begin
      checks++;
      if (cyc - t0 != WIN * WIN * (lat + 1) + 1) begin
        failures++; $display("FAIL window took %0d exp %0d", cyc - t0, WIN * WIN * (lat + 1) + 1);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    #10_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      x0 = 10'($urandom_range(0, W - WIN)); y0 = 10'($urandom_range(0, 480 - WIN));
      frame_base = {$urandom_range(0, 255), 12'd0};
      lat = 2 + k % 3;
      window(1);
    end
    rnd = 1;
    for (int k = 0; k < 4; k++) begin
      x0 = 10'($urandom_range(0, W - WIN)); y0 = 10'($urandom_range(0, 480 - WIN));
      window(0);
    end
    checks++;
    if (n_waits == 0) begin failures++; $display("FAIL no wait states"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
