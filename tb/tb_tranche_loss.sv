// Self-checking test of tranche_loss (Stage 4): the three regions of
// min(D - A, max(L - A, 0)) and their boundaries, plus random values,
// against a reference computed in the testbench; checks the one-cycle latency.
module tb_tranche_loss;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  money_t attach, width, in_loss, out_loss;
  logic in_valid, in_last, out_valid, out_last;
  logic [K_W-1:0] in_k, out_k;
  int checks = 0, failures = 0;
  int n_below = 0, n_mid = 0, n_above = 0;

  tranche_loss dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic money_t ref_loss(money_t l, money_t a, money_t w);
    longint signed d;
    d = longint'(l) - longint'(a);
    if (d < 0) return '0;
    if (d > longint'(w)) return w;
    return money_t'(d);
  endfunction

  task automatic apply(money_t l);
    money_t exp_v;
    @(negedge clk);
    in_valid = 1; in_loss = l; in_k = K_W'($urandom); in_last = 1'($urandom);
    exp_v = ref_loss(l, attach, width);
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || out_loss !== exp_v || out_k !== in_k || out_last !== in_last) begin
      failures++;
      $display("L=%0d A=%0d W=%0d: got %0d exp %0d", l, attach, width, out_loss, exp_v);
    end
    if (longint'(l) < longint'(attach)) n_below++;
    else if (longint'(l) - longint'(attach) > longint'(width)) n_above++;
    else n_mid++;
  endtask

  initial begin
    in_valid = 0; in_loss = 0; in_k = 0; in_last = 0;
    attach = 42'd300_000; width = 42'd300_000;   // 3% .. 6% of a $100k pool, cents
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the worked example: 4% pool loss -> one third of the tranche lost
    apply(42'd400_000);
    checks++;
    if (out_loss != 42'd100_000) begin failures++; $display("example failed"); end
    apply(42'd0); apply(42'd299_999); apply(42'd300_000); apply(42'd300_001);
    apply(42'd600_000); apply(42'd600_001); apply(42'h3FF_FFFF_FFFF);
    for (int i = 0; i < 300; i++) begin
      attach = money_t'({$urandom, $urandom}) >> ($urandom % 30 + 1);
      width  = money_t'({$urandom, $urandom}) >> ($urandom % 30 + 1);
      apply(money_t'({$urandom, $urandom}) >> ($urandom % 30 + 1));
    end
    checks++;
    if (n_below == 0 || n_mid == 0 || n_above == 0) begin
      failures++; $display("region not covered %0d %0d %0d", n_below, n_mid, n_above);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
