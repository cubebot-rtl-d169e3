// tb_edge_detect - self-checking test of the gradient edge detector. Streams
// random WIN x WIN windows (smooth areas with random steps and spikes) with
// random gaps and checks each output one cycle after its input: the
// RGB565 -> RGB888 expansion, and the edge flag against a reference of
// |dY/dx| + |dY/dy| > threshold on the luma (R + 2G + B) / 4, where the
// first column and first row have no left or upper neighbour.
module tb_edge_detect;
  import cubebot_pkg::*;
  localparam int WIN = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] edge_thr = 24;
  logic in_valid = 0, in_last = 0, out_valid, out_edge, out_last;
  logic [15:0] in_pix = 0;
  logic [2:0] in_col = 0, in_row = 0;
  rgb8_t out_rgb;

  edge_detect #(.WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lum [WIN][WIN];
    int n_edges = 0, n_flat = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      logic [15:0] base;
      base = 16'($urandom());
      edge_thr = 8'($urandom_range(5, 60));
      for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) begin
        logic [15:0] p;
        int rr, gg, bb, g, e;
        p = ($urandom_range(0, 5) == 0) ? 16'($urandom()) : base;
        rr = (int'(p[15:11]) << 3) | (int'(p[15:11]) >> 2);
        gg = (int'(p[10:5]) << 2) | (int'(p[10:5]) >> 4);
        bb = (int'(p[4:0]) << 3) | (int'(p[4:0]) >> 2);
        lum[r][c] = (rr + 2 * gg + bb) / 4;
        g = 0;
        if (c > 0) g += (lum[r][c] > lum[r][c-1]) ? lum[r][c] - lum[r][c-1] : lum[r][c-1] - lum[r][c];
        if (r > 0) g += (lum[r][c] > lum[r-1][c]) ? lum[r][c] - lum[r-1][c] : lum[r-1][c] - lum[r][c];
        e = (g > int'(edge_thr)) ? 1 : 0;
        @(negedge clk);
        in_valid = 1; in_pix = p; in_col = 3'(c); in_row = 3'(r); in_last = (r == WIN - 1 && c == WIN - 1);
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || out_rgb != '{r: 8'(rr), g: 8'(gg), b: 8'(bb)} || out_edge != 1'(e) || out_last != in_last) begin
          failures++; $display("FAIL r%0d c%0d: edge %0d exp %0d rgb %06x", r, c, out_edge, e, out_rgb);
        end
        if (e != 0) n_edges++; else n_flat++;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    checks++;
    if (n_edges == 0 || n_flat == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
