// One CDO pricing core: the five-stage pipeline that estimates the expected
// tranche loss E[L^(t_k)] x #paths for every time step, over its share of
// the Monte-Carlo paths.
//
//   Stage 1    stage1       Y(i) = sum_j alpha(i,j) X(j) + beta(i) Z(i)
//   Stage 2/3  pool_loss    L(t_k, x) = sum_i R(i) [Y(i) < H(Ind(i), t_k)]
//   Stage 4    tranche_loss L^ = min(D - A, max(L - A, 0))
//   Stage 5    path_accum   sum of L^(t_k, x) over the paths
//
// All input memories are double buffered (`wbank` is loaded while `rbank` is
// computed on). `start` (with `cfg`, whose n_paths is this core's share)
// begins a simulation; `busy` stays high until the T sums have been written
// into the output FIFO, from which the Collector reads them (`out_*`).
// `ready` is high once the random number generators have initialised.
// SEED_X and SEED_Z make every core draw different random numbers.
// The stage structure is the architecture's; the FIFO depths and the
// start/busy handshake are this design's choices.
module cdo_core
  import cdo_pkg::*;
#(
  parameter logic [31:0] SEED_X = 32'h1234_5679,
  parameter logic [31:0] SEED_Z = 32'h8765_4321,
  parameter int unsigned POOL   = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cfg_t  cfg,
  input  memwr_t mw,
  input  logic  wbank,
  input  logic  rbank,
  output logic  busy,
  output logic  ready,
  // results towards the Collector
  input  logic  out_rd,
  output acc_t  out_data,
  output logic  out_exists,
  // events
  output logic  x_wait,
  output logic  y_starve,
  output logic  draining
);
  logic             y_valid, y_last, y_pop;
  fx_t              y_data;
  logic [IDX_W-1:0] y_idx;
  logic             s1_busy;

  stage1 #(.SEED_X(SEED_X), .SEED_Z(SEED_Z), .POOL(POOL)) u_stage1 (
    .clk, .rst_n, .start,
    .n_paths(cfg.n_paths), .n_instr(cfg.n_instr), .n_factors(cfg.n_factors),
    .busy(s1_busy), .ready,
    .mw, .wbank, .rbank,
    .y_valid, .y_data, .y_idx, .y_last, .y_pop,
    .x_wait
  );

  logic             l_valid, l_last, pl_busy;
  money_t           l_data;
  logic [K_W-1:0]   l_k;
  logic [NCMP-1:0]  hits;

  pool_loss u_pool (
    .clk, .rst_n, .n_steps(cfg.n_steps),
    .mw, .wbank, .rbank,
    .y_valid, .y_data, .y_idx, .y_last, .y_pop,
    .l_valid, .l_data, .l_k, .l_last,
    .busy(pl_busy), .y_starve, .draining, .hits
  );

  logic             t_valid, t_last;
  money_t           t_loss;
  logic [K_W-1:0]   t_k;

  tranche_loss u_tranche (
    .clk, .rst_n, .attach(cfg.attach), .width(cfg.width),
    .in_valid(l_valid), .in_loss(l_data), .in_k(l_k), .in_last(l_last),
    .out_valid(t_valid), .out_loss(t_loss), .out_k(t_k), .out_last(t_last)
  );

  logic  sum_done, pa_valid, pa_busy, fifo_full;
  acc_t  pa_sum;

  path_accum u_accum (
    .clk, .rst_n, .start,
    .n_paths(cfg.n_paths), .n_steps(cfg.n_steps),
    .in_valid(t_valid), .in_loss(t_loss), .in_k(t_k), .in_last(t_last),
    .sum_done, .out_valid(pa_valid), .out_sum(pa_sum), .out_ready(!fifo_full),
    .busy(pa_busy)
  );

  logic [$clog2(MAX_T):0] fifo_cnt;
  fsl_fifo #(.WIDTH(ACC_W), .DEPTH(MAX_T)) u_out (
    .clk, .rst_n,
    .wr_en(pa_valid && !fifo_full), .wr_data(pa_sum), .full(fifo_full),
    .rd_en(out_rd), .rd_data(out_data), .exists(out_exists), .count(fifo_cnt)
  );

  // run flag: from start until the sums are in the output FIFO
  logic running, done_seen;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      done_seen <= 1'b0;
    end else if (start) begin
      running   <= 1'b1;
      done_seen <= 1'b0;
    end else begin
      if (sum_done) done_seen <= 1'b1;
      if (done_seen && !pa_busy && !s1_busy) running <= 1'b0;
    end
  end
  assign busy = running || start;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !running)
    else $error("cdo_core: start while busy");
endmodule
