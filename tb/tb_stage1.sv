// Self-checking test of stage1: Y(i) = sum_j alpha(i,j) X(j) + beta(i) Z(i).
// Correlation factors and betas are loaded through the memory-write bus; the
// testbench records the systemic and idiosyncratic samples the two generators
// hand out (by watching their sample/next signals) and recomputes every Y in
// 5.27 arithmetic. The consumer pops at random, so the FIFO fills and the
// factor accumulation must pause; it also checks that Y arrives in
// instrument order with the last-of-path flag and that the module goes idle.
module tb_stage1;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, ready, wbank, rbank, y_valid, y_last, y_pop, x_wait;
  logic [NPATH_W-1:0] n_paths;
  logic [IDX_W:0]     n_instr;
  logic [F_W-1:0]     n_factors;
  memwr_t             mw;
  fx_t                y_data;
  logic [IDX_W-1:0]   y_idx;
  int checks = 0, failures = 0;

  stage1 #(.POOL(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t mul(fx_t a, fx_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return fx_t'(p >>> 27);
  endfunction

  fx_t alpha [64][32];
  fx_t beta  [64];
  fx_t xs [$];
  fx_t zs [$];
  bit  slow;
  int  full_cycles = 0;

  always @(posedge clk) begin
    if (dut.x_take) xs.push_back(dut.x_sample);
    if (dut.z_next) zs.push_back(dut.z_sample);
  end
  always @(negedge clk) begin
    y_pop <= y_valid && (slow ? ($urandom % 8 == 0) : 1'b1);
    if (dut.fifo_full) full_cycles++;
  end

  task automatic wr(target_e t, int addr, fx_t d);
    @(negedge clk);
    mw.we = 1; mw.tgt = t; mw.addr = 16'(addr); mw.data = 44'(unsigned'(d));
    @(negedge clk);
    mw.we = 0;
  endtask

  task automatic run_case(int n, int f, int p, bit s);
    int pc;
    fx_t exp_v;
    pc = (f + 3) / 4;
    wbank = ~rbank;
    for (int i = 0; i < n; i++) begin
      beta[i] = fx_t'($urandom % (1 << 27));
      wr(TGT_BETA, i, beta[i]);
      for (int j = 0; j < f; j++) begin
        alpha[i][j] = fx_t'($urandom % (1 << 26));
        wr(TGT_ALPHA, (j % 4) * 512 + i * pc + j / 4, alpha[i][j]);
      end
    end
    @(negedge clk);
    rbank = wbank;
    n_instr = (IDX_W+1)'(n); n_factors = F_W'(f); n_paths = NPATH_W'(p);
    xs.delete(); zs.delete();
    slow = s;
    start = 1;
    @(negedge clk);
    start = 0;
    for (int path = 0; path < p; path++)
      for (int i = 0; i < n; i++) begin
        @(posedge clk);
        while (!(y_valid && y_pop)) @(posedge clk);
        exp_v = '0;
        for (int j = 0; j < f; j++) exp_v += mul(alpha[i][j], xs[path * f + j]);
        exp_v += mul(beta[i], zs[path * n + i]);
        checks++;
        if (y_data !== exp_v || y_idx !== IDX_W'(i) || y_last !== (i == n - 1)) begin
          failures++;
          $display("n=%0d f=%0d path %0d inst %0d: got %h idx %0d last %0b exp %h",
                   n, f, path, i, y_data, y_idx, y_last, exp_v);
        end
      end
    repeat (20) @(posedge clk);
    checks++;
    if (busy || y_valid) begin failures++; $display("not idle after the run"); end
  endtask

  initial begin
    start = 0; mw = '0; wbank = 1; rbank = 0;
    n_paths = 1; n_instr = 1; n_factors = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    run_case(20, 5, 3, 1);
    run_case(6, 12, 2, 0);
    run_case(30, 2, 2, 1);
    checks++;
    if (full_cycles == 0) begin failures++; $display("Y FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
