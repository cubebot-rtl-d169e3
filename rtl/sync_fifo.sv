// sync_fifo - single-clock first-in first-out queue.
//
// `push` writes `wdata` when not full; `pop` removes the head when not empty.
// `rdata` always shows the head (first-word fall-through). `level` is the
// number of stored words. Pushing into a full queue is dropped and raises
// `overflow` for one cycle. DEPTH must be a power of two. Helper of
// move_encode_buffer.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   push,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   pop,
  output logic [WIDTH-1:0]       rdata,
  output logic                   empty,
  output logic                   full,
  output logic                   overflow,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty = (level == '0);
  assign full  = (level == (AW+1)'(DEPTH));
  assign rdata = mem[rp];
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      wp       <= '0;
      rp       <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && full;
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // A full queue must not be pushed without the loss being reported.
  a_no_silent_loss: assert property (@(posedge clk) disable iff (!rst_n)
    (push && full && !clear) |=> overflow);

endmodule
