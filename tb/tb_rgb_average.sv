// tb_rgb_average - self-checking test of the masked channel averager.
// Streams windows of random colours with random edge flags (including an
// all-edge window, whose average must be 0) and random gaps, and checks the
// three averages (integer quotient of sum over non-edge pixels by their
// count), the count, and that the result appears a fixed number of cycles
// (divider width + 2) after the last pixel.
module tb_rgb_average;
  import cubebot_pkg::*;
  localparam int WIN = 8;
  localparam int CNTW = 2 * $clog2(WIN) + 1, SW = 8 + CNTW;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_edge = 0, in_last = 0, avg_valid;
  rgb8_t in_rgb = '0, avg;
  logic [CNTW-1:0] avg_count;

  rgb_average #(.WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      int sr, sg, sb, n, lat, pe;
      sr = 0; sg = 0; sb = 0; n = 0; lat = 0;
      pe = (k == 3) ? 100 : $urandom_range(0, 60);
      for (int i = 0; i < WIN * WIN; i++) begin
        @(negedge clk);
        in_valid = 1; in_rgb = rgb8_t'($urandom()); in_edge = ($urandom_range(0, 99) < pe);
        in_last = (i == WIN * WIN - 1);
        if (!in_edge) begin sr += in_rgb.r; sg += in_rgb.g; sb += in_rgb.b; n++; end
        if (!in_last && $urandom_range(0, 1)) begin
          @(negedge clk); in_valid = 0;
        end
      end
      @(negedge clk); in_valid = 0; in_last = 0;
      while (!avg_valid) begin @(negedge clk); lat++; end
      checks++;
      if (avg.r != 8'(n ? sr / n : 0) || avg.g != 8'(n ? sg / n : 0) || avg.b != 8'(n ? sb / n : 0) ||
          32'(avg_count) != n) begin
        failures++; $display("FAIL window %0d: avg %0d,%0d,%0d n=%0d", k, avg.r, avg.g, avg.b, avg_count);
      end
      checks++;
      if (lat != SW + 2) begin failures++; $display("FAIL latency %0d exp %0d", lat, SW + 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
