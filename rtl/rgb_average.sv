// rgb_average - statistical averaging stage of the colour engine.
//
// Accumulates R, G and B of every pixel of a window whose `in_edge` flag is
// low, and counts those pixels. When the pixel flagged `in_last` arrives it
// starts three sequential dividers (one per channel) and, once they finish,
// presents the per-channel mean on `avg` with a one-cycle `avg_valid` pulse
// and the number of pixels used on `avg_count`. The accumulators clear for
// the next window at the same time. If every pixel was an edge pixel the
// count is zero and the average is reported as 0/0/0.
//
// Latency from `in_last` to `avg_valid`: SW + 2 cycles, SW = 8 + 2*log2(WIN)+1.
//
// The published design computes representative RGB values by averaging the
// sampled region; excluding edge pixels and the divider structure are this
// design's own.
module rgb_average
  import cubebot_pkg::*;
#(
  parameter int unsigned WIN = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  rgb8_t                          in_rgb,
  input  logic                           in_edge,
  input  logic                           in_last,
  output logic                           avg_valid,
  output rgb8_t                          avg,
  output logic [2*$clog2(WIN):0]         avg_count
);
  localparam int CNTW = 2 * $clog2(WIN) + 1;
  localparam int SW   = 8 + CNTW;

  logic [SW-1:0]   sum_r, sum_g, sum_b;
  logic [CNTW-1:0] cnt;
  logic            div_start;
  logic [SW-1:0]   q_r, q_g, q_b;
  logic            done_r, done_g, done_b, busy_r, busy_g, busy_b;
  logic [SW-1:0]   nsum_r, nsum_g, nsum_b;
  logic [CNTW-1:0] ncnt;
  logic [SW-1:0]   dsum_r, dsum_g, dsum_b;
  logic [CNTW-1:0] dcnt;

  // Sums including the pixel on the input this cycle.
  always_comb begin
    nsum_r = sum_r;
    nsum_g = sum_g;
    nsum_b = sum_b;
    ncnt   = cnt;
    if (in_valid && !in_edge) begin
      nsum_r = sum_r + SW'(in_rgb.r);
      nsum_g = sum_g + SW'(in_rgb.g);
      nsum_b = sum_b + SW'(in_rgb.b);
      ncnt   = cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_r     <= '0;
      sum_g     <= '0;
      sum_b     <= '0;
      cnt       <= '0;
      div_start <= 1'b0;
      dsum_r    <= '0;
      dsum_g    <= '0;
      dsum_b    <= '0;
      dcnt      <= '0;
    end else begin
      div_start <= 1'b0;
      if (in_valid && in_last) begin
        dsum_r    <= nsum_r;
        dsum_g    <= nsum_g;
        dsum_b    <= nsum_b;
        dcnt      <= ncnt;
        div_start <= 1'b1;
        sum_r     <= '0;
        sum_g     <= '0;
        sum_b     <= '0;
        cnt       <= '0;
      end else begin
        sum_r <= nsum_r;
        sum_g <= nsum_g;
        sum_b <= nsum_b;
        cnt   <= ncnt;
      end
    end
  end

  seq_divider #(.NW(SW), .DW(CNTW)) u_div_r (.clk, .rst_n, .start(div_start), .dividend(dsum_r),
    .divisor(dcnt), .busy(busy_r), .done(done_r), .quotient(q_r));
  seq_divider #(.NW(SW), .DW(CNTW)) u_div_g (.clk, .rst_n, .start(div_start), .dividend(dsum_g),
    .divisor(dcnt), .busy(busy_g), .done(done_g), .quotient(q_g));
  seq_divider #(.NW(SW), .DW(CNTW)) u_div_b (.clk, .rst_n, .start(div_start), .dividend(dsum_b),
    .divisor(dcnt), .busy(busy_b), .done(done_b), .quotient(q_b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avg_valid <= 1'b0;
      avg       <= '0;
      avg_count <= '0;
    end else begin
      avg_valid <= done_r & done_g & done_b;
      if (done_r & done_g & done_b) begin
        avg_count <= dcnt;
        if (dcnt == '0) avg <= '0;
        else avg <= '{r: q_r[7:0], g: q_g[7:0], b: q_b[7:0]};
      end
    end
  end

endmodule
