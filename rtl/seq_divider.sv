// Sequential unsigned divider, one quotient bit per cycle (restoring).
//
// `start` loads dividend and divisor; DW cycles later `done` pulses with
// quotient = floor(dividend / divisor) and the remainder. The divisor must be
// non-zero. Used by the Collector to divide the summed tranche losses by the
// number of Monte-Carlo paths; the architecture only shows a divider, the
// bit-serial form is this design's choice.
module seq_divider #(
  parameter int unsigned DW = 57,
  parameter int unsigned VW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder
);
  logic [DW-1:0]         q;
  logic [VW-1:0]         rem;
  logic [VW-1:0]         dv;
  logic [$clog2(DW+1)-1:0] cnt;
  logic [VW:0]           trial;

  assign trial = {rem, q[DW-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        q    <= dividend;
        rem  <= '0;
        dv   <= divisor;
        cnt  <= '0;
      end else if (busy) begin
        if (trial >= {1'b0, dv}) begin
          rem <= VW'(trial - {1'b0, dv});
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= VW'(trial);
          q   <= {q[DW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(DW+1))'(DW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
  assign quotient  = q;
  assign remainder = rem;
endmodule
