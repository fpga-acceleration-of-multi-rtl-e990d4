// Distributor: turns the host's word stream into memory loads of every
// pricing core and starts simulations.
//
// Each 64-bit host word is {target[63:60], address[59:44], data[43:0]}
// (targets and configuration registers are listed in cdo_pkg). Memory words
// are broadcast, one cycle later, to all cores at once, into the bank of the
// double-buffered memories that the cores are not computing on, so a new
// data set can be loaded while the previous simulation runs. Configuration
// words set shadow registers. A START word waits until every core is idle
// and has initialised its generators; it then flips the bank select, copies
// the shadow configuration, gives core c floor(P/NCORES) paths plus one if
// c < P mod NCORES (P is the total number of paths, at least NCORES), pulses
// `start` and hands {T, P} to the Collector as a job.
// The architecture gives the Distributor's role (loading every core with the
// same data and splitting the paths equally); the word format, the register
// map and the start rule are this design's own.
module distributor
  import cdo_pkg::*;
#(
  parameter int unsigned NCORES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // host words (from the input FIFO)
  input  logic                in_exists,
  input  logic [HOST_W-1:0]   in_data,
  output logic                in_rd,
  // cores
  input  logic [NCORES-1:0]   core_busy,
  input  logic [NCORES-1:0]   core_ready,
  output memwr_t              mw,
  output logic                wbank,
  output logic                rbank,
  output logic                start,
  output cfg_t                core_cfg [NCORES],
  // job for the Collector
  output logic                job_valid,
  output logic [T_W-1:0]      job_steps,
  output logic [NPATH_W-1:0]  job_paths,
  // status
  output logic                start_wait,   // START held back by busy cores
  output logic                overlap_load  // memory word loaded while cores compute
);
  target_e     tgt;
  logic [15:0] addr;
  logic [43:0] data;
  assign tgt  = target_e'(in_data[63:60]);
  assign addr = in_data[59:44];
  assign data = in_data[43:0];

  cfg_t shadow;
  logic can_start;
  assign can_start  = (core_busy == '0) && (&core_ready);
  assign in_rd      = in_exists && (tgt != TGT_START || can_start);
  assign start_wait = in_exists && tgt == TGT_START && !can_start;
  assign wbank      = ~rbank;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mw        <= '0;
      rbank     <= 1'b0;
      start     <= 1'b0;
      job_valid <= 1'b0;
      shadow    <= '0;
      overlap_load <= 1'b0;
      for (int c = 0; c < NCORES; c++) core_cfg[c] <= '0;
    end else begin
      mw.we     <= 1'b0;
      start     <= 1'b0;
      job_valid <= 1'b0;
      overlap_load <= 1'b0;
      if (in_rd) begin
        unique case (tgt)
          TGT_CFG: unique case (cfg_reg_e'(addr[2:0]))
            CFG_PATHS:   shadow.n_paths   <= data[NPATH_W-1:0];
            CFG_INSTR:   shadow.n_instr   <= data[IDX_W:0];
            CFG_STEPS:   shadow.n_steps   <= data[T_W-1:0];
            CFG_FACTORS: shadow.n_factors <= data[F_W-1:0];
            CFG_ATTACH:  shadow.attach    <= data[R_W-1:0];
            CFG_WIDTH:   shadow.width     <= data[R_W-1:0];
            default: ;
          endcase
          TGT_START: begin
            rbank     <= ~rbank;
            start     <= 1'b1;
            job_valid <= 1'b1;
            job_steps <= shadow.n_steps;
            job_paths <= shadow.n_paths;
            for (int c = 0; c < NCORES; c++) begin
              core_cfg[c]         <= shadow;
              core_cfg[c].n_paths <= shadow.n_paths / NPATH_W'(NCORES)
                                   + NPATH_W'(NPATH_W'(c) < shadow.n_paths % NPATH_W'(NCORES));
            end
          end
          default: begin
            mw.we   <= 1'b1;
            mw.tgt  <= tgt;
            mw.addr <= addr;
            mw.data <= data;
            overlap_load <= core_busy != '0;
          end
        endcase
      end
    end
  end
endmodule
