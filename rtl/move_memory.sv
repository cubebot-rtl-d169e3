// move_memory - dual-port on-chip RAM for the encoded robot move list.
//
// MEM_BYTES bytes stored as 32-bit words. Port A is the HPS side (32-bit,
// word address, byte enables for writes); port B is the byte port used by
// the move encoding buffer (byte address). Both ports read with one cycle of
// latency: `a_rdata`/`b_rdata` show the word/byte addressed in the previous
// cycle when `a_read`/`b_read` was high. Bytes are little-endian within a
// word (byte address 4w+k is bits 8k+7:8k of word w). If both ports write
// the same byte in one cycle, port B wins.
//
// The published design keeps the move list in a dual-slave on-chip memory
// in the 0xF000-0xF0FF window; the latency, byte order and collision rule
// are this design's own.
module move_memory #(
  parameter int unsigned MEM_BYTES = 256
) (
  input  logic                           clk,
  // port A: HPS, 32-bit words
  input  logic [$clog2(MEM_BYTES)-3:0]   a_addr,
  input  logic                           a_read,
  input  logic                           a_write,
  input  logic [31:0]                    a_wdata,
  input  logic [3:0]                     a_be,
  output logic [31:0]                    a_rdata,
  // port B: bytes
  input  logic [$clog2(MEM_BYTES)-1:0]   b_addr,
  input  logic                           b_read,
  input  logic                           b_we,
  input  logic [7:0]                     b_wdata,
  output logic [7:0]                     b_rdata
);
  localparam int NWORDS = MEM_BYTES / 4;
  logic [31:0] mem [NWORDS];

  logic [$clog2(MEM_BYTES)-3:0] b_word;
  logic [1:0]                   b_lane;
  assign b_word = b_addr[$clog2(MEM_BYTES)-1:2];
  assign b_lane = b_addr[1:0];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (a_write && a_be[k] && !(b_we && b_word == a_addr && b_lane == 2'(k)))
        mem[a_addr][8*k +: 8] <= a_wdata[8*k +: 8];
    end
    if (b_we) mem[b_word][8*b_lane +: 8] <= b_wdata;
    if (a_read) a_rdata <= mem[a_addr];
    if (b_read) b_rdata <= mem[b_word][8*b_lane +: 8];
  end

endmodule
