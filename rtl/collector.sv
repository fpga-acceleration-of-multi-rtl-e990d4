// Collector: combines the per-core results and divides by the number of
// Monte-Carlo paths.
//
// Every core leaves, per simulation, T sums (one per time step) in its
// output FIFO. For each time step the Collector's (NCORES,1) mux visits the
// cores in turn, waiting for each one's word, and an adder with a feedback
// register accumulates them. The total goes through an internal FIFO to a
// bit-serial divider that forms round(total / P) with P the number of paths
// of that simulation (the quotient of total + floor(P/2)). Results leave on
// `res_*` as {last[63], step[62:57], E[L^(t_k)] in cents[56:0]}.
// Jobs ({T, P}, one per START) queue in a small FIFO, so the cores may start
// the next simulation while the Collector still works on the previous one.
// From the architecture: the mux, the accumulating adder, the FIFO, the
// divider by the number of paths. This design's own: the visiting order,
// the rounding, the job queue and the result word.
module collector
  import cdo_pkg::*;
#(
  parameter int unsigned NCORES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // jobs from the Distributor
  input  logic                job_valid,
  input  logic [T_W-1:0]      job_steps,
  input  logic [NPATH_W-1:0]  job_paths,
  // core result FIFOs
  input  logic [NCORES-1:0]   core_exists,
  input  acc_t                core_data [NCORES],
  output logic [NCORES-1:0]   core_rd,
  // results
  output logic                res_valid,
  output logic [HOST_W-1:0]   res_data,
  input  logic                res_ready,
  output logic                busy
);
  localparam int unsigned CW = ACC_W + $clog2(NCORES + 1);
  localparam int unsigned QW = 57;
  localparam int unsigned CI = (NCORES > 1) ? $clog2(NCORES) : 1;

  // ---------------- job queue ----------------
  logic                 jq_exists, jq_full, jq_rd;
  logic [T_W-1:0]       j_steps;
  logic [NPATH_W-1:0]   j_paths;
  logic [2:0]           jq_cnt;
  fsl_fifo #(.WIDTH(T_W + NPATH_W), .DEPTH(4)) u_jobs (
    .clk, .rst_n,
    .wr_en(job_valid), .wr_data({job_steps, job_paths}), .full(jq_full),
    .rd_en(jq_rd), .rd_data({j_steps, j_paths}), .exists(jq_exists), .count(jq_cnt)
  );

  // ---------------- mux + accumulating adder ----------------
  logic [CI-1:0]   csel;
  logic [K_W-1:0]  k;
  logic [CW-1:0]   acc;
  logic            take;
  logic            mid_full, mid_wr;
  logic [CW-1:0]   mid_sum;
  logic [K_W-1:0]  mid_k;
  logic            mid_last;
  logic            last_core, last_step;

  assign last_core = (csel == CI'(NCORES - 1));
  assign last_step = (k == K_W'(j_steps - 1'b1));
  assign take      = jq_exists && core_exists[csel] && !(last_core && mid_full);
  assign jq_rd     = take && last_core && last_step;
  always_comb begin
    core_rd = '0;
    core_rd[csel] = take;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      csel   <= '0;
      k      <= '0;
      acc    <= '0;
      mid_wr <= 1'b0;
    end else begin
      mid_wr <= 1'b0;
      if (take) begin
        if (last_core) begin
          csel     <= '0;
          acc      <= '0;
          mid_wr   <= 1'b1;
          mid_sum  <= acc + CW'(core_data[csel]);
          mid_k    <= k;
          mid_last <= last_step;
          k        <= last_step ? '0 : k + 1'b1;
        end else begin
          csel <= csel + 1'b1;
          acc  <= acc + CW'(core_data[csel]);
        end
      end
    end
  end

  // paths of the job being summed travel with each total
  logic [NPATH_W-1:0] mid_paths;
  always_ff @(posedge clk) if (take && last_core) mid_paths <= j_paths;

  // ---------------- FIFO between adder and divider ----------------
  logic               f_exists, f_rd;
  logic [CW-1:0]      f_sum;
  logic [K_W-1:0]     f_k;
  logic               f_last;
  logic [NPATH_W-1:0] f_paths;
  logic [4:0]         f_cnt;
  logic               mid_almost;

  fsl_fifo #(.WIDTH(CW + K_W + 1 + NPATH_W), .DEPTH(16)) u_mid (
    .clk, .rst_n,
    .wr_en(mid_wr), .wr_data({mid_sum, mid_k, mid_last, mid_paths}), .full(mid_almost),
    .rd_en(f_rd), .rd_data({f_sum, f_k, f_last, f_paths}), .exists(f_exists), .count(f_cnt)
  );
  // one word may be on its way in the mid_wr register
  assign mid_full = mid_almost || (mid_wr && f_cnt == 5'd15);

  // ---------------- divider ----------------
  logic            div_busy, div_done, div_start;
  logic [QW-1:0]   quo;
  logic [NPATH_W-1:0] remd;
  logic            holding;
  logic [K_W-1:0]  h_k;
  logic            h_last;

  assign div_start = f_exists && !div_busy && !holding && !res_valid;
  assign f_rd      = div_start;

  always_ff @(posedge clk) begin
    if (div_start) begin
      h_k    <= f_k;
      h_last <= f_last;
    end
  end

  seq_divider #(.DW(QW), .VW(NPATH_W)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend(QW'(f_sum) + QW'(f_paths >> 1)),
    .divisor(f_paths),
    .busy(div_busy), .done(div_done), .quotient(quo), .remainder(remd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      holding   <= 1'b0;
      res_valid <= 1'b0;
    end else begin
      if (div_start) holding <= 1'b1;
      if (div_done) begin
        res_valid <= 1'b1;
        res_data  <= {h_last, h_k, quo};
        holding   <= 1'b0;
      end else if (res_valid && res_ready) begin
        res_valid <= 1'b0;
      end
    end
  end

  assign busy = jq_exists || f_exists || holding || res_valid || mid_wr;
endmodule
