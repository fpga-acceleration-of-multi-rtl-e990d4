// Self-checking test of one pricing core (Stages 1-5).
// Run 1 uses barrier curves whose outcome does not depend on the random
// numbers: "always defaults" (H = +max), "never defaults" (H = -max) and one
// that alternates between the two from step to step. The T sums the core
// leaves must then equal P x min(D-A, max(L(t_k) - A, 0)) exactly, with
// L(t_k) computed here. Run 2 uses the barrier H = 0 (default probability
// 1/2) with unit-variance Y, and checks the expected loss within a
// statistical tolerance (three instruments of $10,000, so 1.5M cents). Run 2's data are loaded while run 1 computes.
module tb_cdo_core;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, ready, wbank, rbank, out_rd, out_exists;
  logic x_wait, y_starve, draining;
  cfg_t cfg;
  memwr_t mw;
  acc_t out_data;
  int checks = 0, failures = 0;

  cdo_core #(.POOL(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam fx_t HMAX = 32'sh7fff_ffff;
  localparam fx_t HMIN = -32'sh7fff_ffff;

  task automatic wr(target_e t, int addr, logic [43:0] d);
    @(negedge clk);
    mw.we = 1; mw.tgt = t; mw.addr = 16'(addr); mw.data = d;
    @(negedge clk);
    mw.we = 0;
  endtask

  // alpha(i,j) = 0.5/sqrt(F) style values: F factors of 0.25 and beta so that
  // sum alpha^2 + beta^2 = 1 for F <= 16
  task automatic load_factors(int n, int f);
    int pc;
    real a, b;
    pc = (f + 3) / 4;
    a = 0.25;
    b = $sqrt(1.0 - f * a * a);
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < f; j++)
        wr(TGT_ALPHA, (j % 4) * 512 + i * pc + j / 4, 44'(int'(a * 2.0 ** 27)));
      wr(TGT_BETA, i, 44'(int'(b * 2.0 ** 27)));
    end
  endtask

  money_t R [64];
  int     ind [64];

  task automatic load_run1(int n, int t, int f);
    load_factors(n, f);
    for (int k = 0; k < t; k++) begin
      wr(TGT_H, 0 * 64 + k, 44'(unsigned'(HMAX)));
      wr(TGT_H, 1 * 64 + k, 44'(unsigned'(HMIN)));
      wr(TGT_H, 2 * 64 + k, 44'(unsigned'(k % 2 == 0 ? HMAX : HMIN)));
    end
    for (int i = 0; i < n; i++) begin
      R[i] = money_t'($urandom % 1_000_000) * 100;
      ind[i] = $urandom % 3;
      wr(TGT_R, i, 44'(R[i]));
      wr(TGT_IND, i, 44'(ind[i]));
    end
  endtask

  task automatic do_start(int n, int t, int f, int p, money_t a, money_t w);
    @(negedge clk);
    while (busy || !ready) @(negedge clk);
    rbank = ~rbank; wbank = ~wbank;
    cfg.n_paths = NPATH_W'(p); cfg.n_instr = (IDX_W+1)'(n); cfg.n_steps = T_W'(t);
    cfg.n_factors = F_W'(f); cfg.attach = a; cfg.width = w;
    start = 1;
    @(negedge clk);
    start = 0;
  endtask

  task automatic read_out(int t, output acc_t v [MAX_T]);
    for (int k = 0; k < t; k++) begin
      @(negedge clk);
      while (!out_exists) @(negedge clk);
      v[k] = out_data;
      out_rd = 1;
      @(negedge clk);
      out_rd = 0;
    end
  endtask

  int n_xw = 0, n_ys = 0, n_dr = 0;
  always @(negedge clk) begin
    if (x_wait) n_xw++;
    if (y_starve) n_ys++;
    if (draining) n_dr++;
  end

  initial begin
    acc_t got [MAX_T];
    money_t l, lt, a, w;
    longint cyc0, cyc1;
    real mean;
    start = 0; mw = '0; wbank = 1; rbank = 0; out_rd = 0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- run 1: deterministic barriers, 20 instruments, 13 steps, 6 factors
    load_run1(20, 13, 6);
    a = 0; for (int i = 0; i < 20; i++) a += R[i];
    a = a / 5;  w = a;           // attachment 20% of the pool, width 20%
    do_start(20, 13, 6, 30, a, w);
    // ---- load run 2 while run 1 computes (other bank)
    load_factors(3, 16);
    for (int k = 0; k < 9; k++) wr(TGT_H, k, 44'd0);
    for (int i = 0; i < 3; i++) begin
      wr(TGT_R, i, 44'd1_000_000);
      wr(TGT_IND, i, 44'd0);
    end
    checks++;
    if (!busy) begin failures++; $display("run 2 was not loaded during run 1"); end
    read_out(13, got);
    for (int k = 0; k < 13; k++) begin
      l = 0;
      for (int i = 0; i < 20; i++)
        if (ind[i] == 0 || (ind[i] == 2 && k % 2 == 0)) l += R[i];
      lt = (l < a) ? 0 : ((l - a > w) ? w : l - a);
      checks++;
      if (got[k] !== acc_t'(lt) * 30) begin
        failures++;
        $display("run1 step %0d: got %0d exp %0d (pool loss %0d)", k, got[k], acc_t'(lt) * 30, l);
      end
    end
    // ---- run 2: three instruments, H = 0, 16 factors: 4 cycles per Y
    // against 2 cycles of comparisons, so Stage 2 waits for Y
    do_start(3, 9, 16, 2000, 0, 44'd3_000_000);
    read_out(9, got);
    for (int k = 0; k < 9; k++) begin
      mean = real'(got[k]) / 2000.0;
      checks++;
      if (mean < 1_350_000.0 || mean > 1_650_000.0) begin
        failures++; $display("run2 step %0d: mean loss %f, expected about 1500000", k, mean);
      end
    end
    // all steps see the same Y, so every step must agree
    checks++;
    if (got[0] != got[8]) begin failures++; $display("steps disagree"); end
    $display("x_wait=%0d y_starve=%0d draining=%0d", n_xw, n_ys, n_dr);
    checks++;
    if (n_ys == 0 || n_dr == 0) begin failures++; $display("stall not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
