// Self-checking test of fam (Factor Accumulation Module).
// The testbench loads correlation factors into the loading bank, supplies
// systemic factors as a sample stream, records which samples the module
// takes, and compares every instrument's sum with sum_j alpha(i,j) X(j)
// computed here in the same 5.27 arithmetic. It covers factor counts that
// are and are not multiples of four, a consumer that withholds `can_issue`,
// the back-to-back rate of one instrument per ceil(F/4) cycles, and the wait
// for systemic factors when a path is shorter than F cycles.
module tb_fam;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, a_we, a_wbank, a_rbank, x_valid, x_take;
  logic can_issue, inst_issue, x_wait, out_valid, out_last;
  logic [NPATH_W-1:0] n_paths;
  logic [IDX_W:0]     n_instr;
  logic [F_W-1:0]     n_factors;
  logic [10:0]        a_waddr;
  fx_t                a_wdata, x_data, out_sum;
  logic [IDX_W-1:0]   out_idx;
  int checks = 0, failures = 0;
  int x_wait_cycles = 0;

  fam dut (.*);
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

  fx_t alpha [MAX_N][64];
  fx_t xs [$];          // samples taken, in order
  bit  stall_consumer;
  bit  feed;

  // sample source
  always @(posedge clk) begin
    if (x_take) xs.push_back(x_data);
  end
  always @(negedge clk) begin
    x_valid <= feed && ($urandom % 10) < 8;
    x_data  <= fx_t'($signed($urandom) >>> 3);   // about +/-2^28 -> +/-2.0
    can_issue <= stall_consumer ? ($urandom % 3 == 0) : 1'b1;
    if (x_wait) x_wait_cycles++;
  end

  task automatic run_case(int n, int f, int p, bit stall);
    int pc, path, inst, first_cyc, last_cyc, cyc, got;
    fx_t exp_v;
    pc = (f + 3) / 4;
    // load alpha into bank 1 while bank 0 is "in use"
    a_wbank = 1;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < f; j++) begin
        alpha[i][j] = fx_t'($urandom % (1 << 27));    // 0 .. 1.0
        @(negedge clk);
        a_we = 1;
        a_waddr = {2'(j % 4), 9'(i * pc + j / 4)};
        a_wdata = alpha[i][j];
      end
    @(negedge clk);
    a_we = 0;
    a_rbank = 1;
    n_instr = (IDX_W+1)'(n); n_factors = F_W'(f); n_paths = NPATH_W'(p);
    xs.delete();
    stall_consumer = stall;
    feed = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    got = 0; cyc = 0; first_cyc = -1; last_cyc = 0;
    for (path = 0; path < p; path++) begin
      for (inst = 0; inst < n; inst++) begin
        while (!out_valid) begin @(posedge clk); #1; cyc++; end
        if (path == 0 && inst == 0) first_cyc = cyc;
        if (path == 0) last_cyc = cyc;
        exp_v = '0;
        for (int j = 0; j < f; j++) exp_v += mul(alpha[inst][j], xs[path * f + j]);
        checks++;
        if (out_sum !== exp_v || out_idx !== IDX_W'(inst) || out_last !== (inst == n - 1)) begin
          failures++;
          $display("n=%0d f=%0d path %0d inst %0d: got %h/%0d/%0b exp %h", n, f, path, inst,
                   out_sum, out_idx, out_last, exp_v);
        end
        got++;
        @(posedge clk); #1; cyc++;
      end
    end
    if (!stall && f <= 4 * n) begin
      // one instrument every ceil(F/4) cycles within a path
      checks++;
      if (last_cyc - first_cyc != (n - 1) * pc) begin
        failures++;
        $display("rate: %0d cycles for %0d instruments, expected %0d", last_cyc - first_cyc, n, (n - 1) * pc);
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    feed = 0;
    a_rbank = 0;
  endtask

  initial begin
    start = 0; a_we = 0; a_wbank = 0; a_rbank = 0; a_waddr = 0; a_wdata = 0;
    n_paths = 1; n_instr = 1; n_factors = 1; feed = 0; stall_consumer = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_case(10, 6, 3, 0);
    run_case(5, 16, 2, 0);
    run_case(7, 1, 4, 1);
    run_case(12, 9, 3, 1);
    run_case(1, 16, 3, 0);   // path needs 4 cycles, factors need 16: waits for X
    checks++;
    if (x_wait_cycles == 0) begin failures++; $display("never waited for systemic factors"); end
    $display("x_wait cycles: %0d", x_wait_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
