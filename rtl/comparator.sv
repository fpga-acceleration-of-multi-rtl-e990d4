// One comparator replica of Stage 2: indicator I(Y(i) < H(Ind(i), t_k)) and
// the running pool loss of its time steps.
//
// Replica c handles time steps k = 8m + c. It owns the default barriers of
// those steps (double-buffered memory, entry {barrier curve, m}) and the
// partial pool losses L(t_k, x), kept in two banks of MAX_CC words each.
// Pipeline, driven by the shared sequencer of pool_loss:
//   cycle B: barrier read at {Ind(i), m}
//   cycle C: compare Y < H; the (2,1) mux picks R(i) or 0; partial loss read
//   cycle D: partial loss + selected value written back
// A read-modify-write to one word is therefore two cycles long; the sequencer
// alternates banks by instrument parity when eight or fewer time steps make
// back-to-back updates of one word possible. `clr_*` writes zero (start-up
// clear and read-out); the partial losses of both banks are visible on
// `l0_rd`/`l1_rd` one cycle after `l_raddr`.
module comparator
  import cdo_pkg::*;
(
  input  logic               clk,
  // barrier memory load / read
  input  logic               h_we,
  input  logic               h_wbank,
  input  logic [MADDR_W-1:0] h_waddr,
  input  fx_t                h_wdata,
  input  logic               h_rbank,
  input  logic [MADDR_W-1:0] h_raddr,
  // cycle C
  input  logic               c_v,
  input  logic               c_k_ok,    // this replica's time step exists
  input  fx_t                c_y,
  input  money_t             c_r,
  // partial loss memory
  input  logic [M_W-1:0]     l_raddr,
  input  logic               d_v,
  input  logic               d_bank,
  input  logic [M_W-1:0]     d_m,
  input  logic               clr_we0,
  input  logic               clr_we1,
  input  logic [M_W-1:0]     clr_addr,
  output money_t             l0_rd,
  output money_t             l1_rd,
  output logic               hit        // cycle C: instrument defaulted at this step
);
  fx_t    h_rd;
  money_t lmem0 [MAX_CC];
  money_t lmem1 [MAX_CC];
  money_t d_add;

  dbuf_ram #(.WIDTH(FX_W), .DEPTH(MEM_DEPTH)) u_h (
    .clk,
    .wr_en(h_we), .wr_bank(h_wbank), .wr_addr(h_waddr), .wr_data(h_wdata),
    .rd_bank(h_rbank), .rd_addr(h_raddr), .rd_data(h_rd)
  );

  assign hit = c_v && c_k_ok && (c_y < h_rd);

  always_ff @(posedge clk) begin
    d_add <= hit ? c_r : '0;
    l0_rd <= lmem0[l_raddr];
    l1_rd <= lmem1[l_raddr];
    if (clr_we0)                lmem0[clr_addr] <= '0;
    else if (d_v && !d_bank)    lmem0[d_m]      <= l0_rd + d_add;
    if (clr_we1)                lmem1[clr_addr] <= '0;
    else if (d_v && d_bank)     lmem1[d_m]      <= l1_rd + d_add;
  end
endmodule
