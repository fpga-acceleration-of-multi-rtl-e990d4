// Double-buffered simple dual-port memory ("Write Mem / Read Mem").
//
// Two banks of DEPTH words. The loading side writes bank `wr_bank` while the
// computing side reads bank `rd_bank`; the owner flips the bank selects
// between simulations, so the data of the next simulation can be loaded while
// the current one runs. This is how a dual-ported block RAM gives the double
// buffering of the input data. The read is synchronous: `rd_data` shows the
// word addressed one cycle earlier.
module dbuf_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic                     wr_bank,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_bank,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_addr}] <= wr_data;
    rd_data <= mem[{rd_bank, rd_addr}];
  end
endmodule
