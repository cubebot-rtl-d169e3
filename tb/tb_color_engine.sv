// tb_color_engine - self-checking test of the face colour engine against a
// frame buffer model. The model answers Avalon reads with a fixed latency
// and computes each RGB565 pixel from its address: a 3x3 grid of cube
// colours over the default region of interest, a one-pixel dark line through
// every cell, and low-bit noise. For each cell the testbench recomputes the
// window average over non-edge pixels with its own reference code and checks
// the engine's average, colour code and cell order; it checks face_done, the
// face cycle count register against the measured time, that the time does
// not depend on the image, and that it is within the published 14.8 ms per
// face at 50 MHz. Random wait states are then added and the colours must
// still match. A register write changes the region of interest.
module tb_color_engine;
  import cubebot_pkg::*;
  localparam int W = 640, WIN = 32, LAT = 2;
  localparam int PUB_FACE_CYC = 740_000; // 14.8 ms at 50 MHz
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] csr_address = 0;
  logic csr_write = 0;
  logic [31:0] csr_writedata = 0, csr_rdata;
  logic [31:0] avm_address;
  logic avm_read, avm_waitrequest = 0, avm_readdatavalid = 0;
  logic [15:0] avm_readdata = 0;
  logic busy, cell_valid, face_done;
  logic [3:0] cell_idx;
  color_e cell_color;
  rgb8_t cell_avg;
  logic [31:0] face_cycles;

  color_engine dut (.*);
  always #5 clk = ~clk;

  // ---------------- frame model ----------------
  logic [15:0] pal [6];
  color_e      pal_c [6];
  int face_pat [9];
  int roi_x = 140, roi_y = 60, csz = 120;
  bit random_wait = 0;
  int base = 32'h0010_0000;

  function automatic logic [15:0] pixel(input int x, input int y);
    int cx, cy, lx, ly, c;
    logic [15:0] p;
    if (x < roi_x || y < roi_y || x >= roi_x + 3 * csz || y >= roi_y + 3 * csz) return 16'h0000;
    cx = (x - roi_x) / csz; cy = (y - roi_y) / csz;
    lx = (x - roi_x) % csz; ly = (y - roi_y) % csz;
    if (lx == csz / 2 - 3) return 16'h0841; // dark line
    c = face_pat[cy * 3 + cx];
    p = pal[c];
    // low-bit noise on red and blue
    p[11] = p[11] ^ 1'((x * 7 + y * 3) % 5 == 0);
    p[0]  = p[0] ^ 1'((x + y) % 3 == 0);
    return p;
  endfunction

  int pend_t [$];
  logic [15:0] pend_d [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    avm_readdatavalid <= 0;
    if (pend_t.size() > 0 && pend_t[0] == cyc) begin
      avm_readdatavalid <= 1;
      avm_readdata <= pend_d.pop_front();
      void'(pend_t.pop_front());
    end
    if (avm_read && !avm_waitrequest) begin
      int idx;
      idx = (avm_address - base) / 2;
      pend_t.push_back(cyc + LAT - 1);
      pend_d.push_back(pixel(idx % W, idx / W));
    end
    avm_waitrequest <= random_wait ? 1'($urandom_range(0, 2) == 0) : 1'b0;
  end

  // ---------------- reference ----------------
  function automatic rgb8_t ref_avg(input int ci);
    int x0, y0, sr = 0, sg = 0, sb = 0, n = 0, thr = 24;
    int lum [WIN][WIN];
    int rr [WIN][WIN], gg [WIN][WIN], bb [WIN][WIN];
    rgb8_t o;
    x0 = roi_x + (ci % 3) * csz + csz / 2 - WIN / 2;
    y0 = roi_y + (ci / 3) * csz + csz / 2 - WIN / 2;
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) begin
      logic [15:0] p;
      p = pixel(x0 + c, y0 + r);
      rr[r][c] = (int'(p[15:11]) << 3) | (int'(p[15:11]) >> 2);
      gg[r][c] = (int'(p[10:5]) << 2) | (int'(p[10:5]) >> 4);
      bb[r][c] = (int'(p[4:0]) << 3) | (int'(p[4:0]) >> 2);
      lum[r][c] = (rr[r][c] + 2 * gg[r][c] + bb[r][c]) / 4;
    end
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) begin
      int g = 0;
      if (c > 0) g += (lum[r][c] > lum[r][c-1]) ? lum[r][c] - lum[r][c-1] : lum[r][c-1] - lum[r][c];
      if (r > 0) g += (lum[r][c] > lum[r-1][c]) ? lum[r][c] - lum[r-1][c] : lum[r-1][c] - lum[r][c];
      if (g <= thr) begin sr += rr[r][c]; sg += gg[r][c]; sb += bb[r][c]; n++; end
    end
    o.r = (n == 0) ? 8'd0 : 8'(sr / n);
    o.g = (n == 0) ? 8'd0 : 8'(sg / n);
    o.b = (n == 0) ? 8'd0 : 8'(sb / n);
    return o;
  endfunction

  int n_cells, t_start, t_done, n_faces = 0, n_waits = 0;
  always @(posedge clk) if (avm_read && avm_waitrequest) n_waits++;

  task automatic run_face(input string what, input bit check_avg, output int took);
    n_cells = 0;
    @(negedge clk); start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    while (!face_done) begin
      @(posedge clk); #1;
      if (cell_valid) begin
        checks++;
        if (cell_idx != 4'(n_cells) || cell_color != pal_c[face_pat[n_cells]]) begin
          failures++;
          $display("FAIL %s cell %0d: idx %0d colour %0d exp %0d", what, n_cells, cell_idx, cell_color,
                   pal_c[face_pat[n_cells]]);
        end
        if (check_avg) begin
          rgb8_t e;
          e = ref_avg(n_cells);
          checks++;
          if (cell_avg != e) begin
            failures++; $display("FAIL %s cell %0d avg %0d,%0d,%0d exp %0d,%0d,%0d", what, n_cells,
                                 cell_avg.r, cell_avg.g, cell_avg.b, e.r, e.g, e.b);
          end
        end
        n_cells++;
      end
    end
    t_done = cyc;
    took = t_done - t_start;
    checks++;
    if (n_cells != 9 || face_cycles != 32'(took)) begin
      failures++; $display("FAIL %s: %0d cells, face_cycles %0d measured %0d", what, n_cells, face_cycles, took);
    end
    n_faces++;
    @(negedge clk); csr_address = 4'd7; #1;
    checks++;
    if (csr_rdata != face_cycles) begin failures++; $display("FAIL face_cycles register"); end
  endtask

  initial begin
    #50_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t1, t2, t3;
    pal[0] = 16'hFFFF; pal_c[0] = C_WHITE;   // white
    pal[1] = 16'hD8E3; pal_c[1] = C_RED;     // ~ (220, 28, 24)
    pal[2] = 16'h1159; pal_c[2] = C_BLUE;    // ~ (16, 40, 200)
    pal[3] = 16'hF3C2; pal_c[3] = C_ORANGE;  // ~ (240, 120, 16)
    pal[4] = 16'h15A7; pal_c[4] = C_GREEN;   // ~ (16, 180, 56)
    pal[5] = 16'hE6E3; pal_c[5] = C_YELLOW;  // ~ (224, 220, 24)
    foreach (face_pat[i]) face_pat[i] = i % 6;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); csr_address = 0; csr_writedata = base; csr_write = 1;
    @(negedge clk); csr_write = 0;
    run_face("face1", 1, t1);
    foreach (face_pat[i]) face_pat[i] = $urandom_range(0, 5);
    run_face("face2", 1, t2);
    checks++;
    if (t1 != t2) begin failures++; $display("FAIL face time depends on image: %0d vs %0d", t1, t2); end
    checks++;
    // fixed-latency memory: WIN*WIN pixels at LAT+1 cycles each, plus a small
    // constant per cell
    if (t1 < 9 * WIN * WIN * (LAT + 1) || t1 > 9 * (WIN * WIN * (LAT + 1) + 60) || t1 > PUB_FACE_CYC) begin
      failures++; $display("FAIL face time %0d cycles", t1);
    end
    $display("face time %0d cycles (%0d per cell)", t1, t1 / 9);
    // start while busy is ignored: one face_done only
    // wait states
    random_wait = 1;
    foreach (face_pat[i]) face_pat[i] = $urandom_range(0, 5);
    run_face("waits", 1, t3);
    random_wait = 0;
    checks++;
    if (n_waits == 0 || t3 <= t1) begin failures++; $display("FAIL wait states not seen"); end
    // move the region of interest by register
    roi_x = 100; roi_y = 40; csz = 130;
    @(negedge clk); csr_write = 1; csr_address = 1; csr_writedata = 100;
    @(negedge clk); csr_address = 2; csr_writedata = 40;
    @(negedge clk); csr_address = 3; csr_writedata = 130;
    @(negedge clk); csr_write = 0;
    foreach (face_pat[i]) face_pat[i] = $urandom_range(0, 5);
    run_face("roi", 1, t3);
    checks++;
    if (n_faces != 4) begin failures++; $display("FAIL faces %0d", n_faces); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
