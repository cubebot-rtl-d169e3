// seq_divider - unsigned restoring divider, one quotient bit per cycle.
//
// `start` loads dividend and divisor; `done` pulses NW cycles later with the
// quotient (remainder discarded). A zero divisor yields an all-ones quotient.
// `busy` is high while the division runs. Helper of rgb_average.
module seq_divider #(
  parameter int unsigned NW = 20,  // dividend / quotient width
  parameter int unsigned DW = 13   // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient
);
  logic [NW-1:0]          q;
  logic [DW:0]            rem;
  logic [DW-1:0]          dv;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]            trial;

  assign trial    = {rem[DW-1:0], q[NW-1]};
  assign quotient = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      rem  <= '0;
      dv   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend;
        rem  <= '0;
        dv   <= divisor;
        cnt  <= ($clog2(NW+1))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, dv}) begin
          rem <= trial - {1'b0, dv};
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= trial;
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
