// Self-checking test of path_accum (Stage 5): random tranche losses for P
// paths of T steps are summed per step and compared with sums kept here;
// the read-out is checked for order, back-pressure and the T-word length,
// and a second simulation checks that the first path restarts the sums.
module tb_path_accum;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_last, sum_done, out_valid, out_ready, busy;
  logic [NPATH_W-1:0] n_paths;
  logic [T_W-1:0]     n_steps;
  money_t             in_loss;
  logic [K_W-1:0]     in_k;
  acc_t               out_sum;
  int checks = 0, failures = 0;

  path_accum dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sim(int p, int t);
    acc_t exp_s [MAX_T];
    int got;
    n_paths = NPATH_W'(p); n_steps = T_W'(t);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < t; k++) exp_s[k] = '0;
    for (int path = 0; path < p; path++) begin
      for (int k = 0; k < t; k++) begin
        @(negedge clk);
        in_valid = 1; in_k = K_W'(k); in_last = (k == t - 1);
        in_loss = money_t'({$urandom, $urandom});
        exp_s[k] += acc_t'(in_loss);
      end
      @(negedge clk); in_valid = 0;
      repeat ($urandom % 4) @(negedge clk);
    end
    got = 0;
    while (got < t) begin
      @(negedge clk);
      out_ready = ($urandom % 3) != 0;
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_sum !== exp_s[got]) begin
          failures++; $display("p=%0d t=%0d step %0d: got %h exp %h", p, t, got, out_sum, exp_s[got]);
        end
        got++;
      end
    end
    @(posedge clk); #1;
    out_ready = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (busy || out_valid) begin failures++; $display("extra output / busy"); end
  endtask

  initial begin
    start = 0; in_valid = 0; in_last = 0; in_loss = 0; in_k = 0; out_ready = 0;
    n_paths = 1; n_steps = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_sim(5, 20);
    run_sim(3, 64);
    run_sim(7, 1);
    run_sim(1, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
