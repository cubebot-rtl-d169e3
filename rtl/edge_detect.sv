// edge_detect - streaming edge detector for one WIN x WIN sample window.
//
// Each incoming RGB565 pixel is expanded to 8-bit RGB and its luma
// Y = (R + 2G + B) / 4 is formed. The gradient is |Y - Y_left| + |Y - Y_up|,
// where Y_left is the previous pixel of the same row and Y_up comes from a
// one-row line buffer (WIN entries); terms that fall outside the window
// count as zero. A pixel whose gradient exceeds `edge_thr` is flagged as an
// edge. The result appears on `out_*` exactly one cycle after `in_valid`.
// Pixels must arrive in raster order; `in_col`/`in_row` give the position.
//
// The published design names an edge-detection stage that sharpens cell
// boundaries ahead of sampling; the gradient operator and the use of the
// flag (edge pixels are left out of the colour average downstream) are this
// design's own choice.
module edge_detect
  import cubebot_pkg::*;
#(
  parameter int unsigned WIN = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [7:0]             edge_thr,
  input  logic                   in_valid,
  input  logic [15:0]            in_pix,
  input  logic [$clog2(WIN)-1:0] in_col,
  input  logic [$clog2(WIN)-1:0] in_row,
  input  logic                   in_last,
  output logic                   out_valid,
  output rgb8_t                  out_rgb,
  output logic                   out_edge,
  output logic                   out_last
);
  logic [7:0] line_buf [WIN];
  logic [7:0] y_left;

  rgb8_t      c;
  logic [7:0] y, y_up;
  logic [8:0] gx, gy;
  logic [9:0] grad;

  always_comb begin
    c    = rgb565_to_888(in_pix);
    y    = luma(c);
    y_up = line_buf[in_col];
    gx   = (in_col == '0) ? 9'd0 : ((y > y_left) ? 9'(y - y_left) : 9'(y_left - y));
    gy   = (in_row == '0) ? 9'd0 : ((y > y_up)   ? 9'(y - y_up)   : 9'(y_up - y));
    grad = 10'(gx) + 10'(gy);
  end

  always_ff @(posedge clk) begin
    if (in_valid) line_buf[in_col] <= y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_left    <= '0;
      out_valid <= 1'b0;
      out_rgb   <= '0;
      out_edge  <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid & in_last;
      if (in_valid) begin
        y_left   <= y;
        out_rgb  <= c;
        out_edge <= grad > 10'(edge_thr);
      end
    end
  end

endmodule
