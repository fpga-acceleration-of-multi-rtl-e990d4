// Fast Simplex Link style FIFO.
//
// A point-to-point, unidirectional first-in first-out channel used between the
// pricing cores, the Collector and the host link. The writer pushes a word
// when `wr_en` is high and `full` is low; the reader sees `exists` whenever a
// word is waiting on `rd_data` (first-word fall-through) and pops it with
// `rd_en`. A push and a pop may happen in the same cycle. Storage is a
// circular array with read and write pointers; depth must be a power of two.
// Only the FIFO behaviour of the link is taken from the architecture; the
// depth and the fall-through interface are this design's choices.
module fsl_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             exists,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic push, pop;

  assign push    = wr_en && !full;
  assign pop     = rd_en && exists;
  assign count   = wptr - rptr;
  assign full    = count == (AW+1)'(DEPTH);
  assign exists  = count != '0;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  // Protocol rules of the link.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("fsl_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && !exists))
    else $error("fsl_fifo: read while empty");
endmodule
