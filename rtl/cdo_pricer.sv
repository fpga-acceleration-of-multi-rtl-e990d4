// Multi-core Monte-Carlo pricer of CDO tranches under the multi-factor
// Gaussian copula: top level.
//
// Host words enter through a FIFO to the Distributor, which loads the same
// data into the double-buffered memories of all NCORES pricing cores and
// starts them together, each on its share of the paths with its own random
// seeds. Every core leaves T per-time-step sums in its output FIFO; the
// Collector adds them across cores, divides by the number of paths and puts
// E[L^(t_k)] (cents) for k = 0..T-1 into the output FIFO towards the host.
// The two host streams are plain valid/ready word channels where a PCI
// Express endpoint would connect.
//
// The default of five cores is the largest count the architecture fits for
// the integer variant; the core count is otherwise free. Host word format:
// see distributor.sv and cdo_pkg.sv. Result word: see collector.sv.
module cdo_pricer
  import cdo_pkg::*;
#(
  parameter int unsigned NCORES = 5,
  parameter int unsigned POOL   = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // host -> FPGA
  input  logic              host_in_valid,
  input  logic [HOST_W-1:0] host_in_data,
  output logic              host_in_ready,
  // FPGA -> host
  output logic              host_out_valid,
  output logic [HOST_W-1:0] host_out_data,
  input  logic              host_out_ready,
  // status
  output logic              busy,
  output events_t           events
);
  // ---------------- input FIFO ----------------
  logic              in_full, in_exists, in_rd;
  logic [HOST_W-1:0] in_data;
  logic [4:0]        in_cnt;

  fsl_fifo #(.WIDTH(HOST_W), .DEPTH(16)) u_in (
    .clk, .rst_n,
    .wr_en(host_in_valid && !in_full), .wr_data(host_in_data), .full(in_full),
    .rd_en(in_rd), .rd_data(in_data), .exists(in_exists), .count(in_cnt)
  );
  assign host_in_ready = !in_full;

  // ---------------- Distributor ----------------
  memwr_t             mw;
  logic               wbank, rbank, start;
  cfg_t               core_cfg [NCORES];
  logic [NCORES-1:0]  core_busy, core_ready;
  logic               job_valid;
  logic [T_W-1:0]     job_steps;
  logic [NPATH_W-1:0] job_paths;
  logic               start_wait, overlap_load;

  distributor #(.NCORES(NCORES)) u_dist (
    .clk, .rst_n,
    .in_exists, .in_data, .in_rd,
    .core_busy, .core_ready,
    .mw, .wbank, .rbank, .start, .core_cfg,
    .job_valid, .job_steps, .job_paths,
    .start_wait, .overlap_load
  );

  // ---------------- pricing cores ----------------
  logic [NCORES-1:0] core_rd, core_exists;
  acc_t              core_data [NCORES];
  logic [NCORES-1:0] x_wait, y_starve, draining;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    cdo_core #(
      .SEED_X(32'h1234_5679 + 32'h9E37_79B9 * 32'(c)),
      .SEED_Z(32'h8765_4321 + 32'h7F4A_7C15 * 32'(c)),
      .POOL  (POOL)
    ) u_core (
      .clk, .rst_n,
      .start, .cfg(core_cfg[c]),
      .mw, .wbank, .rbank,
      .busy(core_busy[c]), .ready(core_ready[c]),
      .out_rd(core_rd[c]), .out_data(core_data[c]), .out_exists(core_exists[c]),
      .x_wait(x_wait[c]), .y_starve(y_starve[c]), .draining(draining[c])
    );
  end

  // ---------------- Collector ----------------
  logic              res_valid, res_ready, col_busy;
  logic [HOST_W-1:0] res_data;

  collector #(.NCORES(NCORES)) u_coll (
    .clk, .rst_n,
    .job_valid, .job_steps, .job_paths,
    .core_exists, .core_data, .core_rd,
    .res_valid, .res_data, .res_ready,
    .busy(col_busy)
  );

  // ---------------- output FIFO ----------------
  logic       out_full;
  logic [6:0] out_cnt;

  fsl_fifo #(.WIDTH(HOST_W), .DEPTH(64)) u_out (
    .clk, .rst_n,
    .wr_en(res_valid && !out_full), .wr_data(res_data), .full(out_full),
    .rd_en(host_out_ready && host_out_valid), .rd_data(host_out_data),
    .exists(host_out_valid), .count(out_cnt)
  );
  assign res_ready = !out_full;

  // mechanism pulses, ORed over the cores
  assign events = '{start_wait: start_wait, overlap_load: overlap_load,
                    x_wait: |x_wait, y_starve: |y_starve, draining: |draining};

  assign busy = (core_busy != '0) || col_busy || in_exists || host_out_valid;
endmodule
