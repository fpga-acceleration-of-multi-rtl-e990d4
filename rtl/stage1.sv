// Stage 1: creditworthiness index Y(i) = sum_j alpha(i,j) X(j) + beta(i) Z(i).
//
// The Factor Accumulation Module forms the systemic part from factors made by
// one Wallace generator; a second Wallace generator supplies the idiosyncratic
// factor Z(i), one sample per instrument, so Z never waits on the systemic
// generator. For each factor sum leaving the FAM, beta(i) is read from its
// double-buffered memory and Z(i) is taken (cycle 1), beta*Z is formed
// (cycle 2) and added to the sum (cycle 3); Y(i) then goes into a small FIFO
// together with the instrument number and a last-of-path flag.
//
// Because an instrument's Y may take several cycles to produce, Stage 1 and
// Stage 2 are decoupled by that FIFO. The FAM starts an instrument only while
// fewer than Y_DEPTH instruments are in flight or waiting, so the FIFO never
// overflows and the FAM simply pauses when Stage 2 is slower.
//
// From the architecture: the FAM, the separate generator for Z, beta memory,
// multiplier and adder. This design's own: the FIFO, its depth and the credit
// count.
module stage1
  import cdo_pkg::*;
#(
  parameter int unsigned Y_DEPTH = 8,
  parameter logic [31:0] SEED_X  = 32'h1234_5679,
  parameter logic [31:0] SEED_Z  = 32'h8765_4321,
  parameter int unsigned POOL    = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [NPATH_W-1:0] n_paths,
  input  logic [IDX_W:0]     n_instr,
  input  logic [F_W-1:0]     n_factors,
  output logic               busy,
  output logic               ready,     // generators initialised
  // memory load
  input  memwr_t             mw,
  input  logic               wbank,
  input  logic               rbank,
  // Y stream
  output logic               y_valid,
  output fx_t                y_data,
  output logic [IDX_W-1:0]   y_idx,
  output logic               y_last,
  input  logic               y_pop,
  // events
  output logic               x_wait
);
  logic  x_valid, x_take, z_valid, z_next;
  fx_t   x_sample, z_sample;

  wallace_grng #(.POOL(POOL)) u_grng_x (
    .clk, .rst_n, .seed(SEED_X), .next(x_take), .valid(x_valid), .sample(x_sample)
  );
  wallace_grng #(.POOL(POOL)) u_grng_z (
    .clk, .rst_n, .seed(SEED_Z), .next(z_next), .valid(z_valid), .sample(z_sample)
  );

  assign ready = x_valid && z_valid;

  logic             can_issue, inst_issue;
  logic             f_valid, f_last;
  fx_t              f_sum;
  logic [IDX_W-1:0] f_idx;
  logic             fam_busy;

  fam u_fam (
    .clk, .rst_n,
    .start, .n_paths, .n_instr, .n_factors, .busy(fam_busy),
    .a_we   (mw.we && mw.tgt == TGT_ALPHA),
    .a_wbank(wbank),
    .a_waddr(mw.addr[10:0]),
    .a_wdata(fx_t'(mw.data[FX_W-1:0])),
    .a_rbank(rbank),
    .x_valid, .x_data(x_sample), .x_take,
    .can_issue, .inst_issue, .x_wait,
    .out_valid(f_valid), .out_sum(f_sum), .out_idx(f_idx), .out_last(f_last)
  );

  // beta * Z
  fx_t beta_rd;
  dbuf_ram #(.WIDTH(FX_W), .DEPTH(MEM_DEPTH)) u_beta (
    .clk,
    .wr_en  (mw.we && mw.tgt == TGT_BETA),
    .wr_bank(wbank),
    .wr_addr(mw.addr[MADDR_W-1:0]),
    .wr_data(mw.data[FX_W-1:0]),
    .rd_bank(rbank),
    .rd_addr(f_idx),
    .rd_data(beta_rd)
  );

  assign z_next = f_valid;

  logic             v1, v2, v3;
  fx_t              sum1, sum2, z1, bz2, y3;
  logic [IDX_W-1:0] idx1, idx2, idx3;
  logic             last1, last2, last3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else begin
      v1 <= f_valid; v2 <= v1; v3 <= v2;
    end
    sum1 <= f_sum;  idx1 <= f_idx; last1 <= f_last; z1 <= z_sample;
    sum2 <= sum1;   idx2 <= idx1;  last2 <= last1;  bz2 <= fx_mul(beta_rd, z1);
    y3   <= sum2 + bz2;            idx3 <= idx2;    last3 <= last2;
  end

  // Y FIFO with credit-based flow control
  logic [$clog2(Y_DEPTH):0] fifo_cnt;
  logic [$clog2(Y_DEPTH):0] inflight;
  logic                     fifo_full;

  always_ff @(posedge clk) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + inst_issue - (y_pop && y_valid);
  end
  assign can_issue = ready && (inflight < ($clog2(Y_DEPTH)+1)'(Y_DEPTH));

  fsl_fifo #(.WIDTH(FX_W + IDX_W + 1), .DEPTH(Y_DEPTH)) u_yfifo (
    .clk, .rst_n,
    .wr_en  (v3),
    .wr_data({y3, idx3, last3}),
    .full   (fifo_full),
    .rd_en  (y_pop),
    .rd_data({y_data, y_idx, y_last}),
    .exists (y_valid),
    .count  (fifo_cnt)
  );

  assign busy = fam_busy || v1 || v2 || v3;

  a_credit: assert property (@(posedge clk) disable iff (!rst_n) !(v3 && fifo_full))
    else $error("stage1: Y FIFO overflow");
endmodule
