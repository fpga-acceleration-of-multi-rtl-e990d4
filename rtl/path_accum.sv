// Stage 5: sum of the tranche loss of every time step over all Monte-Carlo
// paths, E[L^(t_k)] x #paths.
//
// A memory of MAX_T words of ACC_W bits holds one running sum per time step.
// Each incoming tranche loss (tagged with its step k) is added with a
// two-cycle read-modify-write; the first path of a simulation writes its
// value instead of adding, so no clearing is needed. After the last time
// step of the last path (`sum_done` pulses), `dump` streams the T sums out
// in step order on `out_*`, one per cycle when `out_ready` is high.
// Steps of one path arrive with distinct k, and a path's steps are at least
// T cycles apart from the next path's, so the two-cycle update never reads a
// word that is still being written.
// From the architecture: the accumulator memory and adder of Stage 5 and
// its 54-bit width for the integer design. This design's own: the
// first-path write, the read-out interface.
module path_accum
  import cdo_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,       // a new simulation begins
  input  logic [NPATH_W-1:0] n_paths,
  input  logic [T_W-1:0]     n_steps,
  input  logic               in_valid,
  input  money_t             in_loss,
  input  logic [K_W-1:0]     in_k,
  input  logic               in_last,
  output logic               sum_done,
  output logic               out_valid,
  output acc_t               out_sum,
  input  logic               out_ready,
  output logic               busy
);
  acc_t               mem [MAX_T];
  acc_t               rd;
  logic [NPATH_W-1:0] path;
  logic               first;
  logic               v1, last1;
  logic [K_W-1:0]     k1;
  money_t             loss1;

  // dump engine
  logic               dumping;
  logic [K_W-1:0]     dk;
  logic               dv;          // read issued last cycle
  logic               dlast;

  logic [K_W-1:0] raddr;
  assign raddr = dumping ? dk : in_k;

  always_ff @(posedge clk) rd <= mem[raddr];

  always_ff @(posedge clk) begin
    if (v1) mem[k1] <= first ? acc_t'(loss1) : rd + acc_t'(loss1);
  end

  // read-out handshake: word held in out_sum until accepted
  logic issue_rd;
  assign issue_rd = dumping && (!out_valid || out_ready) && !dv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      path      <= '0;
      first     <= 1'b1;
      v1        <= 1'b0;
      sum_done  <= 1'b0;
      dumping   <= 1'b0;
      dk        <= '0;
      dv        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1       <= in_valid;
      k1       <= in_k;
      loss1    <= in_loss;
      last1    <= in_last;
      sum_done <= 1'b0;
      if (start) begin
        path  <= '0;
        first <= 1'b1;
      end else if (v1 && last1) begin
        path  <= path + 1'b1;
        first <= 1'b0;
        if (path == n_paths - 1'b1) begin
          sum_done <= 1'b1;
          dumping  <= 1'b1;
          dk       <= '0;
        end
      end
      // read-out
      if (out_valid && out_ready) out_valid <= 1'b0;
      dv <= issue_rd;
      if (issue_rd) begin
        dlast <= dk == K_W'(n_steps - 1'b1);
        dk    <= dk + 1'b1;
      end
      if (dv) begin
        out_valid <= 1'b1;
        out_sum   <= rd;
        if (dlast) dumping <= 1'b0;
      end
    end
  end

  assign busy = dumping || v1 || out_valid;
endmodule
