// Self-checking test of pool_loss (Stages 2 and 3).
// Loads notionals, barrier indexes and barrier curves through the memory
// bus, feeds creditworthiness indexes as a stream, and compares each path's
// T pool losses with sum_i R(i) [Y(i) < H(Ind(i), t_k)] computed here.
// Covers T <= 8 (two partial-sum banks), T not a multiple of 8 and T = 64,
// checks that a new Y is taken every ceil(T/8) cycles when Y is always
// available, and that the starvation and read-out stalls both occur.
module tb_pool_loss;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [T_W-1:0]   n_steps;
  memwr_t           mw;
  logic             wbank, rbank;
  logic             y_valid, y_last, y_pop;
  fx_t              y_data;
  logic [IDX_W-1:0] y_idx;
  logic             l_valid, l_last, busy, y_starve, draining;
  money_t           l_data;
  logic [K_W-1:0]   l_k;
  logic [NCMP-1:0]  hits;
  int checks = 0, failures = 0;
  int starve_cycles = 0, drain_stall = 0;

  pool_loss dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  money_t R   [MAX_N];
  int     ind [MAX_N];
  fx_t    H   [MAX_B][MAX_T];
  fx_t    yq  [$];
  int     iq  [$];
  bit     lq  [$];
  bit     gappy;
  int     pop_cyc [$];
  int     cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (y_pop) begin
      void'(yq.pop_front()); void'(iq.pop_front()); void'(lq.pop_front());
      pop_cyc.push_back(cyc);
    end
    if (y_starve) starve_cycles++;
    if (draining && yq.size() != 0) drain_stall++;
  end
  always @(negedge clk) begin
    y_valid = yq.size() != 0 && (!gappy || ($urandom % 4 == 0));
    if (yq.size() != 0) begin
      y_data = yq[0]; y_idx = IDX_W'(iq[0]); y_last = lq[0];
    end
  end

  task automatic wr(target_e t, int addr, logic [43:0] d);
    @(negedge clk);
    mw.we = 1; mw.tgt = t; mw.addr = 16'(addr); mw.data = d;
    @(negedge clk);
    mw.we = 0;
  endtask

  task automatic run_case(int n, int t, int nb, int p, bit g);
    fx_t ys [MAX_N];
    money_t exp_v;
    int cc;
    cc = (t + 7) / 8;
    wbank = ~rbank;
    for (int b = 0; b < nb; b++)
      for (int k = 0; k < t; k++) begin
        // barrier rises with time, around zero
        H[b][k] = fx_t'((k - t / 2) * (1 << 24) + int'($urandom % (1 << 25)) - (b << 24));
        wr(TGT_H, b * 64 + k, 44'(unsigned'(H[b][k])));
      end
    for (int i = 0; i < n; i++) begin
      R[i] = money_t'($urandom % 100_000_000) * 100;
      ind[i] = $urandom % nb;
      wr(TGT_R, i, 44'(R[i]));
      wr(TGT_IND, i, 44'(ind[i]));
    end
    @(negedge clk);
    rbank = wbank;
    n_steps = T_W'(t);
    gappy = g;
    pop_cyc.delete();
    for (int path = 0; path < p; path++) begin
      for (int i = 0; i < n; i++) begin
        ys[i] = fx_t'($signed($urandom) >>> 4);
        yq.push_back(ys[i]); iq.push_back(i); lq.push_back(i == n - 1);
      end
      for (int k = 0; k < t; k++) begin
        @(posedge clk);
        while (!l_valid) @(posedge clk);
        exp_v = '0;
        for (int i = 0; i < n; i++) if (ys[i] < H[ind[i]][k]) exp_v += R[i];
        checks++;
        if (l_data !== exp_v || l_k !== K_W'(k) || l_last !== (k == t - 1)) begin
          failures++;
          $display("n=%0d t=%0d path %0d step %0d: got %0d k=%0d last=%0b exp %0d",
                   n, t, path, k, l_data, l_k, l_last, exp_v);
        end
      end
      if (!g) begin
        // within the path Y was taken every ceil(T/8) cycles
        checks++;
        if (pop_cyc[n - 1] - pop_cyc[0] != (n - 1) * cc) begin
          failures++;
          $display("rate: %0d cycles for %0d instruments, cc=%0d", pop_cyc[n - 1] - pop_cyc[0], n, cc);
        end
      end
      pop_cyc.delete();
      // next path is fed only after this one is read out
    end
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after run"); end
  endtask

  initial begin
    mw = '0; wbank = 1; rbank = 0; n_steps = 1; gappy = 0;
    y_valid = 0; y_data = 0; y_idx = 0; y_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (12) @(posedge clk);
    run_case(14, 6, 3, 3, 0);    // T <= 8: two partial-sum banks
    run_case(25, 20, 5, 2, 0);
    run_case(9, 64, 2, 2, 0);
    run_case(16, 13, 4, 2, 1);   // Y arrives with gaps
    // two paths queued at once, with the data of the case above:
    // Stage 2 must stall during read-out
    begin
      fx_t ys2 [2][8];
      money_t exp_v;
      gappy = 0;
      for (int path = 0; path < 2; path++)
        for (int i = 0; i < 8; i++) begin
          ys2[path][i] = fx_t'($signed($urandom) >>> 4);
          yq.push_back(ys2[path][i]); iq.push_back(i); lq.push_back(i == 7);
        end
      for (int path = 0; path < 2; path++)
        for (int k = 0; k < 13; k++) begin
          @(posedge clk);
          while (!l_valid) @(posedge clk);
          exp_v = '0;
          for (int i = 0; i < 8; i++) if (ys2[path][i] < H[ind[i]][k]) exp_v += R[i];
          checks++;
          if (l_data !== exp_v) begin failures++; $display("queued path %0d step %0d", path, k); end
        end
    end
    run_case(1, 1, 1, 3, 0);
    checks++;
    if (starve_cycles == 0 || drain_stall == 0) begin
      failures++; $display("stall not seen: starve=%0d drain=%0d", starve_cycles, drain_stall);
    end
    $display("starve=%0d drain_stall=%0d", starve_cycles, drain_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
