// color_engine - colour detection engine for one cube face.
//
// A face occupies a square region of interest of the 640x480 RGB565 frame:
// top-left corner (roi_x0, roi_y0), split into a 3x3 grid of cells of
// `cell_size` pixels. On `start` the engine visits the nine cells one after
// another, reusing one datapath:
//   pixel_fetch   reads a WIN x WIN window centred in the cell
//   edge_detect   flags pixels on a luma gradient (boundaries, glare)
//   rgb_average   averages R, G, B over the non-edge pixels
//   color_classifier maps the average to a colour code
// Each cell result leaves on `cell_valid`/`cell_idx`/`cell_color`/`cell_avg`
// (cells numbered row-major 0..8); `face_done` pulses after cell 8 and
// `face_cycles` holds the cycle count from `start` to `face_done`. With a
// memory of fixed latency L the time per cell is fixed: WIN*WIN*(L+2) cycles
// plus a constant, so the face time does not depend on the image.
//
// Configuration registers (word address on csr_address, write with
// csr_write, read on csr_rdata combinationally):
//   0 frame_base  1 roi_x0  2 roi_y0  3 cell_size  4 edge_thr
//   5 {white_min, dom_min, margin, orange_g_min}  6 {yellow_g_min, yellow_b_max}
//   7 face_cycles (read only)  8 {busy, cell index} (read only)
//
// The sequential nine-cell schedule, the stage order (edge detection, grid
// sampling, colour analysis) and the calibrated threshold classification
// follow the published design. The fixed region of interest, the window
// size and all default register values are this design's own.
module color_engine
  import cubebot_pkg::*;
#(
  parameter int unsigned IMG_W        = 640,
  parameter int unsigned IMG_H        = 480,
  parameter int unsigned GRID         = 3,
  parameter int unsigned WIN          = 32,
  parameter int unsigned DEF_ROI_X0   = 140,
  parameter int unsigned DEF_ROI_Y0   = 60,
  parameter int unsigned DEF_CELL     = 120,
  parameter int unsigned DEF_EDGE_THR = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  // configuration registers
  input  logic [3:0]   csr_address,
  input  logic         csr_write,
  input  logic [31:0]  csr_writedata,
  output logic [31:0]  csr_rdata,
  // frame buffer read master
  output logic [31:0]  avm_address,
  output logic         avm_read,
  input  logic         avm_waitrequest,
  input  logic [15:0]  avm_readdata,
  input  logic         avm_readdatavalid,
  // results
  output logic         busy,
  output logic         cell_valid,
  output logic [3:0]   cell_idx,
  output color_e       cell_color,
  output rgb8_t        cell_avg,
  output logic         face_done,
  output logic [31:0]  face_cycles
);
  localparam int CW     = $clog2(WIN);
  localparam int NCELLS = GRID * GRID;

  // ---------------- configuration registers ----------------
  logic [31:0] frame_base;
  logic [9:0]  roi_x0, roi_y0, cell_size;
  logic [7:0]  edge_thr;
  thr_t        thr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_base <= '0;
      roi_x0     <= 10'(DEF_ROI_X0);
      roi_y0     <= 10'(DEF_ROI_Y0);
      cell_size  <= 10'(DEF_CELL);
      edge_thr   <= 8'(DEF_EDGE_THR);
      thr        <= THR_DEFAULT;
    end else if (csr_write) begin
      unique case (csr_address)
        4'd0: frame_base <= csr_writedata;
        4'd1: roi_x0     <= csr_writedata[9:0];
        4'd2: roi_y0     <= csr_writedata[9:0];
        4'd3: cell_size  <= csr_writedata[9:0];
        4'd4: edge_thr   <= csr_writedata[7:0];
        4'd5: {thr.white_min, thr.dom_min, thr.margin, thr.orange_g_min} <= csr_writedata;
        4'd6: {thr.yellow_g_min, thr.yellow_b_max} <= csr_writedata[15:0];
        default: ;
      endcase
    end
  end

  // ---------------- cell sequencer ----------------
  typedef enum logic [1:0] {E_IDLE, E_FETCH, E_WAIT} estate_e;
  estate_e    st;
  logic [3:0] cur_cell;
  logic [1:0] gcol;
  logic [9:0] xb, yb, xfirst;
  logic [31:0] cyc;
  logic       fetch_start, fetch_busy;

  logic                   pix_valid, pix_last;
  logic [15:0]            pix;
  logic [CW-1:0]          pix_col, pix_row;
  logic                   e_valid, e_edge, e_last;
  rgb8_t                  e_rgb;
  logic                   a_valid;
  rgb8_t                  a_rgb;
  logic [2*CW:0]          a_count;
  color_e                 cls;

  logic [9:0] half_off;
  assign half_off    = (cell_size >> 1) - 10'(WIN / 2);
  assign fetch_start = (st == E_FETCH);
  assign busy        = (st != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= E_IDLE;
      cur_cell        <= '0;
      gcol        <= '0;
      xb          <= '0;
      yb          <= '0;
      xfirst      <= '0;
      cyc         <= '0;
      face_cycles <= '0;
      cell_valid  <= 1'b0;
      cell_idx    <= '0;
      cell_color  <= C_UNKNOWN;
      cell_avg    <= '0;
      face_done   <= 1'b0;
    end else begin
      cell_valid <= 1'b0;
      face_done  <= 1'b0;
      if (st != E_IDLE) cyc <= cyc + 1'b1;
      unique case (st)
        E_IDLE: if (start) begin
          cur_cell   <= '0;
          gcol   <= '0;
          xfirst <= roi_x0 + half_off;
          xb     <= roi_x0 + half_off;
          yb     <= roi_y0 + half_off;
          cyc    <= 32'd1;
          st     <= E_FETCH;
        end
        E_FETCH: st <= E_WAIT;
        E_WAIT: if (a_valid) begin
          cell_valid <= 1'b1;
          cell_idx   <= cur_cell;
          cell_color <= cls;
          cell_avg   <= a_rgb;
          if (gcol == 2'(GRID - 1)) begin
            gcol <= '0;
            xb   <= xfirst;
            yb   <= yb + cell_size;
          end else begin
            gcol <= gcol + 1'b1;
            xb   <= xb + cell_size;
          end
          if (cur_cell == 4'(NCELLS - 1)) begin
            face_done   <= 1'b1;
            face_cycles <= cyc + 1'b1;
            st          <= E_IDLE;
          end else begin
            cur_cell <= cur_cell + 1'b1;
            st   <= E_FETCH;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (csr_address)
      4'd0:    csr_rdata = frame_base;
      4'd1:    csr_rdata = 32'(roi_x0);
      4'd2:    csr_rdata = 32'(roi_y0);
      4'd3:    csr_rdata = 32'(cell_size);
      4'd4:    csr_rdata = 32'(edge_thr);
      4'd5:    csr_rdata = {thr.white_min, thr.dom_min, thr.margin, thr.orange_g_min};
      4'd6:    csr_rdata = {16'd0, thr.yellow_g_min, thr.yellow_b_max};
      4'd7:    csr_rdata = face_cycles;
      4'd8:    csr_rdata = {busy, 27'd0, cur_cell};
      default: csr_rdata = '0;
    endcase
  end

  // ---------------- datapath ----------------
  pixel_fetch #(.IMG_W(IMG_W), .WIN(WIN)) u_fetch (
    .clk, .rst_n, .start(fetch_start), .x0(xb), .y0(yb), .frame_base, .busy(fetch_busy),
    .avm_address, .avm_read, .avm_waitrequest, .avm_readdata, .avm_readdatavalid,
    .pix_valid, .pix, .pix_col, .pix_row, .pix_last);

  edge_detect #(.WIN(WIN)) u_edge (
    .clk, .rst_n, .edge_thr, .in_valid(pix_valid), .in_pix(pix), .in_col(pix_col),
    .in_row(pix_row), .in_last(pix_last), .out_valid(e_valid), .out_rgb(e_rgb),
    .out_edge(e_edge), .out_last(e_last));

  rgb_average #(.WIN(WIN)) u_avg (
    .clk, .rst_n, .in_valid(e_valid), .in_rgb(e_rgb), .in_edge(e_edge), .in_last(e_last),
    .avg_valid(a_valid), .avg(a_rgb), .avg_count(a_count));

  color_classifier u_cls (.rgb(a_rgb), .thr, .color(cls));

  // IMG_H bounds the region of interest; the engine does not clip, the
  // configuration must keep the grid inside the frame.
  if (IMG_H < WIN) begin : g_bad_size
    $error("color_engine: window larger than the frame");
  end

endmodule
