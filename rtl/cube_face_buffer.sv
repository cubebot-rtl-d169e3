// cube_face_buffer - 3x3 colour storage for each of the six cube faces.
//
// While a face is scanned the colour engine delivers one code per cell
// (`cell_valid`, `cell_idx`, `cell_color`); the buffer writes it into the
// face selected by `wr_face`. `face_done` marks that face valid. The HPS
// picks a face with `rd_face` and reads it as one 32-bit word on `rd_word`
// (combinational):
//   [31] valid  [30:28] face index  [27] 0  [26:0] nine 3-bit codes,
//   cell 0 in bits 2:0 ... cell 8 in bits 26:24 (row-major).
// `valid_mask` and `faces_count` summarise which faces hold data; `clear`
// empties the buffer. Face indices of 6 and 7 are ignored.
//
// Storing the 3x3 grid per face with a face index follows the published
// design; the word layout and the clear behaviour are this design's own.
module cube_face_buffer
  import cubebot_pkg::*;
#(
  parameter int unsigned NFACES = 6,
  parameter int unsigned NCELLS = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [2:0]   wr_face,
  input  logic         cell_valid,
  input  logic [3:0]   cell_idx,
  input  color_e       cell_color,
  input  logic         face_done,
  input  logic [2:0]   rd_face,
  output logic [31:0]  rd_word,
  output logic [NFACES-1:0] valid_mask,
  output logic [2:0]   faces_count
);
  logic [3*NCELLS-1:0] faces [NFACES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_mask <= '0;
      for (int f = 0; f < NFACES; f++) faces[f] <= '0;
    end else if (clear) begin
      valid_mask <= '0;
      for (int f = 0; f < NFACES; f++) faces[f] <= '0;
    end else if (32'(wr_face) < NFACES) begin
      if (cell_valid && 32'(cell_idx) < NCELLS)
        faces[wr_face][cell_idx*3 +: 3] <= cell_color;
      if (face_done) valid_mask[wr_face] <= 1'b1;
    end
  end

  always_comb begin
    faces_count = '0;
    for (int f = 0; f < NFACES; f++) faces_count = faces_count + 3'(valid_mask[f]);
  end

  always_comb begin
    rd_word = '0;
    if (32'(rd_face) < NFACES) begin
      rd_word[31]     = valid_mask[rd_face];
      rd_word[30:28]  = rd_face;
      rd_word[3*NCELLS-1:0] = faces[rd_face];
    end
  end

endmodule
