// tb_cube_face_buffer - self-checking test of the six-face colour store.
// Writes random colours for random faces and cells, marks faces complete,
// and checks every read word (valid bit, face number, 27 colour bits), the
// valid mask, the completed-face count, out-of-range face numbers and clear.
module tb_cube_face_buffer;
  import cubebot_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, cell_valid = 0, face_done = 0;
  logic [2:0] wr_face = 0, rd_face = 0, faces_count;
  logic [3:0] cell_idx = 0;
  color_e cell_color = C_WHITE;
  logic [31:0] rd_word;
  logic [5:0] valid_mask;

  cube_face_buffer dut (.*);
  always #5 clk = ~clk;

  logic [26:0] model [6];
  logic [5:0] vmodel;

  task automatic check_all(input string what);
    #1;
    for (int f = 0; f < 8; f++) begin
      logic [31:0] e;
      rd_face = 3'(f); #1;
      e = (f < 6) ? {vmodel[f], 3'(f), 1'b0, model[f]} : 32'd0;
      checks++;
      if (rd_word != e) begin failures++; $display("FAIL %s face %0d: %08x exp %08x", what, f, rd_word, e); end
    end
    checks++;
    if (valid_mask != vmodel || faces_count != 3'($countones(vmodel))) begin
      failures++; $display("FAIL %s mask %b count %0d", what, valid_mask, faces_count);
    end
  endtask

  initial begin
    #10_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    color_e cols [7] = '{C_WHITE, C_RED, C_BLUE, C_ORANGE, C_GREEN, C_YELLOW, C_UNKNOWN};
    foreach (model[f]) model[f] = '0;
    vmodel = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      int f;
      f = $urandom_range(0, 6);
      @(negedge clk); wr_face = 3'(f);
      for (int c = 0; c < 10; c++) begin
        color_e col;
        col = cols[$urandom_range(0, 6)];
        @(negedge clk); cell_valid = 1; cell_idx = 4'(c); cell_color = col;
        if (f < 6 && c < 9) model[f][3*c +: 3] = col;
      end
      @(negedge clk); cell_valid = 0; face_done = 1;
      if (f < 6) vmodel[f] = 1'b1;
      @(negedge clk); face_done = 0;
      check_all("write");
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (model[f]) model[f] = '0;
    vmodel = '0;
    check_all("clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
