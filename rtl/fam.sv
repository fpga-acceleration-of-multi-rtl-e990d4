// Factor Accumulation Module: sum over j of alpha(i,j) * X(j) for every
// instrument i of every Monte-Carlo path.
//
// Eight memories feed the datapath. Four hold the correlation factors, bank
// (j mod 4) at entry i*ceil(F/4) + floor(j/4); they are double buffered so
// the next simulation's factors can be loaded while this one runs. The other
// four hold the systemic factors X(j) of the current path, bank (j mod 4) at
// entry floor(j/4), in two halves: the Gaussian generator fills one half for
// the next path (one sample per cycle on `x_valid`/`x_take`) while the
// accumulator reads the other. Each cycle one group of four factors is read,
// the alpha of any lane with 4c+k >= F is forced to zero, four 5.27
// multiplies and a two-level adder tree form the group sum, and the
// accumulator adds it to the running sum (or restarts it on the first group).
// An instrument takes PC = ceil(F/4) cycles; its sum leaves on `out_*` four
// cycles after its last group was read.
//
// Timing: `start` begins a simulation of `n_paths` paths with `n_instr`
// instruments and `n_factors` factors. A path starts only when its X half is
// full (`x_wait` is high in each cycle it waits). The first group of an
// instrument is issued only while `can_issue` is high; `inst_issue` pulses
// then, so the consumer can count the instruments in flight.
//
// From the architecture: the eight memories, the four-lane multiply/adder
// tree with the zero mux, the accumulator with its restart mux, double
// buffering of X, 5.27 fixed point. This design's own: the memory layout, the
// pipeline registers and the handshakes.
module fam
  import cdo_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // simulation control
  input  logic               start,
  input  logic [NPATH_W-1:0] n_paths,
  input  logic [IDX_W:0]     n_instr,
  input  logic [F_W-1:0]     n_factors,
  output logic               busy,
  // correlation factor memory load (bank = addr[10:9])
  input  logic               a_we,
  input  logic               a_wbank,
  input  logic [10:0]        a_waddr,
  input  fx_t                a_wdata,
  input  logic               a_rbank,
  // systemic factor samples from the generator
  input  logic               x_valid,
  input  fx_t                x_data,
  output logic               x_take,
  // flow control towards the consumer
  input  logic               can_issue,
  output logic               inst_issue,
  output logic               x_wait,
  // one factor sum per instrument
  output logic               out_valid,
  output fx_t                out_sum,
  output logic [IDX_W-1:0]   out_idx,
  output logic               out_last     // last instrument of its path
);
  localparam int unsigned XW = $clog2(2 * XHALF);

  // ------------------------------------------------------------------
  // X double buffer and its writer
  // ------------------------------------------------------------------
  fx_t              xmem [NLANE][2*XHALF];
  logic [1:0]       x_full;
  logic             wr_half, rd_half;
  logic [F_W-1:0]   wr_j;
  logic [NPATH_W-1:0] wr_paths;
  logic             wr_active;

  assign x_take = wr_active && x_valid && !x_full[wr_half];

  always_ff @(posedge clk) begin
    if (x_take) xmem[wr_j[1:0]][{wr_half, wr_j[XW:2]}] <= x_data;
  end

  // ------------------------------------------------------------------
  // path / instrument / group sequencer
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_WAITX, S_RUN} state_e;
  state_e state;

  logic [NPATH_W-1:0] path;
  logic [IDX_W:0]     inst;
  logic [F_W-1:0]     grp;      // group counter c
  logic [MADDR_W:0]   base;     // i * PC
  logic [F_W-1:0]     pc;       // groups per instrument
  logic               issue;
  logic               last_grp, last_inst;
  logic               out_pipe_busy;

  assign pc        = ceil4(n_factors);
  assign last_grp  = (grp == pc - 1'b1);
  assign last_inst = (inst == n_instr - 1'b1);
  assign issue     = (state == S_RUN) && (grp != '0 || can_issue);
  assign inst_issue = issue && grp == '0;
  assign busy      = state != S_IDLE || out_pipe_busy;
  assign x_wait    = state == S_WAITX && !x_full[rd_half];

  logic release_half;
  assign release_half = issue && last_grp && last_inst;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      path      <= '0;
      inst      <= '0;
      grp       <= '0;
      base      <= '0;
      rd_half   <= 1'b0;
      wr_half   <= 1'b0;
      wr_j      <= '0;
      wr_paths  <= '0;
      wr_active <= 1'b0;
      x_full    <= '0;
    end else begin
      // writer: fill one half per path
      if (start) begin
        wr_active <= 1'b1;
        wr_paths  <= '0;
        wr_j      <= '0;
        wr_half   <= 1'b0;
      end else if (x_take) begin
        if (wr_j == n_factors - 1'b1) begin
          wr_j    <= '0;
          wr_half <= ~wr_half;
          x_full[wr_half] <= 1'b1;
          wr_paths <= wr_paths + 1'b1;
          if (wr_paths == n_paths - 1'b1) wr_active <= 1'b0;
        end else begin
          wr_j <= wr_j + 1'b1;
        end
      end
      if (release_half) x_full[rd_half] <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_WAITX;
          path    <= '0;
          rd_half <= 1'b0;
          x_full  <= '0;
        end
        S_WAITX: if (x_full[rd_half]) begin
          state <= S_RUN;
          inst  <= '0;
          grp   <= '0;
          base  <= '0;
        end
        S_RUN: if (issue) begin
          if (last_grp) begin
            grp  <= '0;
            base <= base + (MADDR_W+1)'(pc);
            if (last_inst) begin
              rd_half <= ~rd_half;
              path    <= path + 1'b1;
              state   <= (path == n_paths - 1'b1) ? S_IDLE : S_WAITX;
            end else begin
              inst <= inst + 1'b1;
            end
          end else begin
            grp <= grp + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // datapath: memories -> 4 multipliers -> adder tree -> accumulator
  // ------------------------------------------------------------------
  typedef struct packed {
    logic             v;
    logic             first;
    logic             last;
    logic             last_inst;
    logic [IDX_W-1:0] idx;
    logic [NLANE-1:0] lane_on;
  } ctl_t;

  ctl_t c1, c2, c3;
  fx_t  a_rd [NLANE];
  fx_t  x_rd [NLANE];
  fx_t  prod [NLANE];
  fx_t  tree;
  fx_t  acc;

  logic [XW-1:0] x_raddr;
  assign x_raddr = {rd_half, grp[XW-2:0]};

  for (genvar k = 0; k < NLANE; k++) begin : g_lane
    dbuf_ram #(.WIDTH(FX_W), .DEPTH(MEM_DEPTH)) u_alpha (
      .clk,
      .wr_en  (a_we && a_waddr[10:9] == 2'(k)),
      .wr_bank(a_wbank),
      .wr_addr(a_waddr[8:0]),
      .wr_data(a_wdata),
      .rd_bank(a_rbank),
      .rd_addr(MADDR_W'(base + (MADDR_W+1)'(grp))),
      .rd_data(a_rd[k])
    );
    always_ff @(posedge clk) x_rd[k] <= xmem[k][x_raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c1 <= '0;
      c2 <= '0;
      c3 <= '0;
      out_valid <= 1'b0;
    end else begin
      c1.v         <= issue;
      c1.first     <= grp == '0;
      c1.last      <= last_grp;
      c1.last_inst <= last_inst;
      c1.idx       <= IDX_W'(inst);
      for (int k = 0; k < NLANE; k++)
        c1.lane_on[k] <= ({grp, 2'b00} + (F_W+2)'(k)) < (F_W+2)'(n_factors);
      c2 <= c1;
      c3 <= c2;
      out_valid <= c3.v && c3.last;
    end
  end

  always_ff @(posedge clk) begin
    // stage 2: multiply, alpha forced to zero on unused lanes
    for (int k = 0; k < NLANE; k++)
      prod[k] <= fx_mul(c1.lane_on[k] ? a_rd[k] : '0, x_rd[k]);
    // stage 3: adder tree
    tree <= (prod[0] + prod[1]) + (prod[2] + prod[3]);
    // stage 4: accumulator with restart
    if (c3.v) begin
      acc     <= (c3.first ? '0 : acc) + tree;
      out_sum <= (c3.first ? '0 : acc) + tree;
      out_idx <= c3.idx;
      out_last <= c3.last_inst;
    end
  end

  assign out_pipe_busy = c1.v || c2.v || c3.v || out_valid;
endmodule
