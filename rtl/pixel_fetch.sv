// pixel_fetch - Avalon-MM read master that streams one square window of the
// RGB565 frame buffer.
//
// On `start` it latches the window origin (x0, y0) and reads WIN x WIN pixels
// in raster order from frame_base + 2*(y*IMG_W + x). One read is in flight at
// a time: `avm_read` is held until `avm_waitrequest` drops, then the block
// waits for `avm_readdatavalid` and emits the pixel on `pix_*` for one cycle,
// with its column and row inside the window and `pix_last` on the final
// pixel. `busy` is high from `start` until the last pixel has been emitted.
// Per pixel the block spends 1 issue cycle plus the memory's read latency.
//
// The published design places an Avalon bridge between the frame buffer and
// the image processing block; the read pattern, address formula and the
// single-outstanding-read policy here are this design's own.
module pixel_fetch #(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned WIN   = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [9:0]             x0,
  input  logic [9:0]             y0,
  input  logic [31:0]            frame_base,
  output logic                   busy,
  // Avalon-MM read master
  output logic [31:0]            avm_address,
  output logic                   avm_read,
  input  logic                   avm_waitrequest,
  input  logic [15:0]            avm_readdata,
  input  logic                   avm_readdatavalid,
  // pixel stream
  output logic                   pix_valid,
  output logic [15:0]            pix,
  output logic [$clog2(WIN)-1:0] pix_col,
  output logic [$clog2(WIN)-1:0] pix_row,
  output logic                   pix_last
);
  localparam int CW = $clog2(WIN);

  typedef enum logic [1:0] {F_IDLE, F_ISSUE, F_WAIT} fstate_e;
  fstate_e st;

  logic [CW-1:0] col, row;
  logic [31:0]   row_addr;   // byte address of the first pixel of the current row

  assign busy        = (st != F_IDLE);
  assign avm_read    = (st == F_ISSUE);
  assign avm_address = row_addr + 32'({col, 1'b0});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= F_IDLE;
      col       <= '0;
      row       <= '0;
      row_addr  <= '0;
      pix_valid <= 1'b0;
      pix       <= '0;
      pix_col   <= '0;
      pix_row   <= '0;
      pix_last  <= 1'b0;
    end else begin
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
      unique case (st)
        F_IDLE: if (start) begin
          col      <= '0;
          row      <= '0;
          row_addr <= frame_base + ((32'(y0) * 32'(IMG_W) + 32'(x0)) << 1);
          st       <= F_ISSUE;
        end
        F_ISSUE: if (!avm_waitrequest) st <= F_WAIT;
        F_WAIT: if (avm_readdatavalid) begin
          pix_valid <= 1'b1;
          pix       <= avm_readdata;
          pix_col   <= col;
          pix_row   <= row;
          if (col == CW'(WIN - 1)) begin
            col      <= '0;
            row_addr <= row_addr + 32'(2 * IMG_W);
            if (row == CW'(WIN - 1)) begin
              pix_last <= 1'b1;
              st       <= F_IDLE;
            end else begin
              row <= row + 1'b1;
              st  <= F_ISSUE;
            end
          end else begin
            col <= col + 1'b1;
            st  <= F_ISSUE;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

endmodule
