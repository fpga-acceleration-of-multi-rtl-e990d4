// Stages 2 and 3: collateral pool loss L(t_k, x) = sum_i R(i) I(Y(i) < H(Ind(i), t_k))
// for every time step of one Monte-Carlo path.
//
// Stage 2 has eight comparator replicas, so eight time steps are handled per
// cycle: an instrument's Y occupies the comparators for CC = ceil(T/8)
// cycles, group m covering steps 8m..8m+7. The recovery-adjusted notional
// R(i) and the barrier index Ind(i) are read once per instrument from
// double-buffered memories shared by all replicas. A new Y is taken from the
// Stage 1 FIFO as the previous one finishes; if none is waiting the
// comparators idle (`y_starve`), which is the stall that appears when the
// factor accumulation needs more cycles per instrument than CC.
//
// Stage 3 starts after the last instrument of the path has left the
// pipeline: for k = 0..T-1 the two partial-loss banks of replica (k mod 8)
// are read at entry floor(k/8) and cleared, two (8,1) muxes pick the
// replica, an adder combines the two partial sums and a (2,1) mux passes
// either that sum or the single bank (when only one bank was used). One
// L(t_k, x) leaves per cycle on `l_*`, `l_last` marking step T-1. Stage 2
// does not take new Y values while Stage 3 reads out (`draining`).
//
// From the architecture: eight replicas, comparator, (2,1) mux of R/0, adder
// with partial-loss memory, two (8,1) muxes, adder and (2,1) mux of Stage 3,
// stall between Stages 2 and 3 while partial sums are combined. This design's
// own: the two-bank scheme that gives two partial sums, the pipeline depth,
// the memory layouts and the start-up clear.
module pool_loss
  import cdo_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [T_W-1:0]     n_steps,
  // memory load (R, Ind, H)
  input  memwr_t             mw,
  input  logic               wbank,
  input  logic               rbank,
  // Y stream from Stage 1
  input  logic               y_valid,
  input  fx_t                y_data,
  input  logic [IDX_W-1:0]   y_idx,
  input  logic               y_last,
  output logic               y_pop,
  // pool loss per time step
  output logic               l_valid,
  output money_t             l_data,
  output logic [K_W-1:0]     l_k,
  output logic               l_last,
  // status / events
  output logic               busy,
  output logic               y_starve,
  output logic               draining,
  output logic [NCMP-1:0]    hits
);
  typedef enum logic [1:0] {P_CLEAR, P_RUN, P_FLUSH, P_DRAIN} pstate_e;
  pstate_e state;

  logic [T_W-1:0] cc;
  logic           use_two;
  assign cc      = ceil8(n_steps);
  assign use_two = (cc == T_W'(1));

  // ---------------- stage A: sequencer ----------------
  logic             a_act, a_last;
  fx_t              a_y;
  logic [IDX_W-1:0] a_idx;
  logic [M_W-1:0]   a_m;
  logic             a_done, need_y, in_path;
  logic [K_W-1:0]   k;
  logic [M_W-1:0]   clr_m;

  assign a_done   = a_act && (a_m == M_W'(cc - 1'b1));
  assign need_y   = !a_act || (a_done && !a_last);
  assign y_pop    = (state == P_RUN) && y_valid && need_y;
  assign y_starve = (state == P_RUN) && in_path && need_y && !y_valid;
  assign draining = (state == P_FLUSH) || (state == P_DRAIN);

  // ---------------- pipeline registers ----------------
  logic             b_v, c_v, d_v, e_v;
  fx_t              b_y, c_y;
  logic [M_W-1:0]   b_m, c_m, d_m;
  logic             b_bank, c_bank, d_bank;
  money_t           c_r;
  logic [2:0]       e_c;
  logic [K_W-1:0]   e_k;
  logic             e_last;

  money_t           r_rd;
  logic [B_W-1:0]   ind_rd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= P_CLEAR;
      clr_m   <= '0;
      a_act   <= 1'b0;
      a_last  <= 1'b0;
      a_m     <= '0;
      in_path <= 1'b0;
      k       <= '0;
    end else begin
      unique case (state)
        P_CLEAR: begin
          clr_m <= clr_m + 1'b1;
          if (clr_m == M_W'(MAX_CC - 1)) state <= P_RUN;
        end
        P_RUN: begin
          if (y_pop) begin
            a_act   <= 1'b1;
            a_y     <= y_data;
            a_idx   <= y_idx;
            a_last  <= y_last;
            a_m     <= '0;
            in_path <= !y_last;
          end else if (a_done) begin
            a_act <= 1'b0;
            if (a_last) state <= P_FLUSH;
          end else if (a_act) begin
            a_m <= a_m + 1'b1;
          end
        end
        P_FLUSH: begin
          if (!b_v && !c_v && !d_v) begin
            state <= P_DRAIN;
            k     <= '0;
          end
        end
        P_DRAIN: begin
          k <= k + 1'b1;
          if (k == K_W'(n_steps - 1'b1)) state <= P_RUN;
        end
        default: state <= P_RUN;
      endcase
    end
  end

  // R and Ind, read at stage A with the instrument number
  dbuf_ram #(.WIDTH(R_W), .DEPTH(MEM_DEPTH)) u_r (
    .clk,
    .wr_en(mw.we && mw.tgt == TGT_R), .wr_bank(wbank),
    .wr_addr(mw.addr[MADDR_W-1:0]), .wr_data(mw.data[R_W-1:0]),
    .rd_bank(rbank), .rd_addr(a_idx), .rd_data(r_rd)
  );
  dbuf_ram #(.WIDTH(B_W), .DEPTH(MEM_DEPTH)) u_ind (
    .clk,
    .wr_en(mw.we && mw.tgt == TGT_IND), .wr_bank(wbank),
    .wr_addr(mw.addr[MADDR_W-1:0]), .wr_data(mw.data[B_W-1:0]),
    .rd_bank(rbank), .rd_addr(a_idx), .rd_data(ind_rd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_v <= 1'b0; c_v <= 1'b0; d_v <= 1'b0; e_v <= 1'b0;
    end else begin
      b_v <= (state == P_RUN) && a_act;
      c_v <= b_v;
      d_v <= c_v;
      e_v <= (state == P_DRAIN);
    end
    b_y <= a_y;  b_m <= a_m;  b_bank <= use_two && a_idx[0];
    c_y <= b_y;  c_m <= b_m;  c_bank <= b_bank; c_r <= r_rd;
    d_m <= c_m;  d_bank <= c_bank;
    e_c <= k[2:0]; e_k <= k; e_last <= (k == K_W'(n_steps - 1'b1));
  end

  // ---------------- eight comparator replicas ----------------
  money_t         l0_rd [NCMP];
  money_t         l1_rd [NCMP];
  logic [M_W-1:0] l_raddr, clr_addr;

  assign l_raddr  = (state == P_DRAIN) ? k[K_W-1:3] : c_m;
  assign clr_addr = (state == P_CLEAR) ? clr_m : k[K_W-1:3];

  for (genvar c = 0; c < NCMP; c++) begin : g_cmp
    logic clr;
    assign clr = (state == P_CLEAR) || (state == P_DRAIN && k[2:0] == 3'(c));
    comparator u_cmp (
      .clk,
      .h_we   (mw.we && mw.tgt == TGT_H && mw.addr[2:0] == 3'(c)),
      .h_wbank(wbank),
      .h_waddr({mw.addr[6+B_W-1:6], mw.addr[5:3]}),
      .h_wdata(mw.data[FX_W-1:0]),
      .h_rbank(rbank),
      .h_raddr({ind_rd, b_m}),
      .c_v,
      .c_k_ok ({1'b0, c_m, 3'(c)} < n_steps),
      .c_y, .c_r,
      .l_raddr,
      .d_v, .d_bank, .d_m,
      .clr_we0(clr), .clr_we1(clr), .clr_addr,
      .l0_rd(l0_rd[c]), .l1_rd(l1_rd[c]),
      .hit(hits[c])
    );
  end

  // ---------------- Stage 3: combine partial sums ----------------
  money_t sel0, sel1, both;
  assign sel0 = l0_rd[e_c];          // (8,1) mux, bank 0
  assign sel1 = l1_rd[e_c];          // (8,1) mux, bank 1
  assign both = sel0 + sel1;

  always_ff @(posedge clk) begin
    if (!rst_n) l_valid <= 1'b0;
    else        l_valid <= e_v;
    l_data <= use_two ? both : sel0;  // (2,1) mux
    l_k    <= e_k;
    l_last <= e_last;
  end

  assign busy = (state != P_RUN) || a_act || b_v || c_v || d_v || e_v || l_valid;
endmodule
