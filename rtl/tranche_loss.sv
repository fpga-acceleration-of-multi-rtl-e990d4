// Stage 4: tranche loss from pool loss, L^ = min(D - A, max(L - A, 0)).
//
// The attachment point A is subtracted from the pool loss; two comparators
// detect a pool loss below the attachment point and a difference above the
// tranche width W = D - A, and a (3,1) mux picks 0, W or L - A. All values
// are unsigned integers in cents. One result per cycle, one cycle of
// latency; the time-step tag and the last flag travel with the value.
// The structure follows the architecture; the register placement is this
// design's choice.
module tranche_loss
  import cdo_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  money_t         attach,
  input  money_t         width,
  input  logic           in_valid,
  input  money_t         in_loss,
  input  logic [K_W-1:0] in_k,
  input  logic           in_last,
  output logic           out_valid,
  output money_t         out_loss,
  output logic [K_W-1:0] out_k,
  output logic           out_last
);
  logic   below, above;
  money_t diff;

  assign diff  = in_loss - attach;
  assign below = in_loss < attach;   // L - A < 0
  assign above = width < diff;       // L - A > D - A

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    unique case ({below, above && !below})
      2'b10:   out_loss <= '0;
      2'b01:   out_loss <= width;
      default: out_loss <= diff;
    endcase
    out_k    <= in_k;
    out_last <= in_last;
  end
endmodule
