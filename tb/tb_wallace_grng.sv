// Self-checking test of wallace_grng: start-up time, one new sample per
// cycle, and the first four moments of 40,000 samples against those of a
// standard normal distribution (mean 0, variance 1, skew 0, kurtosis 3).
module tb_wallace_grng;
  import cdo_pkg::*;
  localparam int POOL = 256;
  logic clk = 0, rst_n = 0;
  logic next, valid;
  fx_t  sample;
  logic [31:0] seed = 32'hCAFE_F00D;
  int checks = 0, failures = 0;

  wallace_grng #(.POOL(POOL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    real x, s1, s2, s3, s4, m, v, sk, ku;
    int cyc, same;
    fx_t prev;
    next = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (!valid) begin @(posedge clk); #1; cyc++; end
    // seed load and pool fill: POOL cycles after the first edge out of reset
    check(cyc == POOL, $sformatf("start-up took %0d cycles", cyc));
    // warm-up: let the pool mix
    next = 1;
    repeat (40000) @(posedge clk);
    s1 = 0; s2 = 0; s3 = 0; s4 = 0; same = 0; prev = '0;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      x = real'(sample) / real'(1 << FX_FRAC);
      s1 += x; s2 += x * x; s3 += x * x * x; s4 += x * x * x * x;
      if (sample == prev) same++;
      prev = sample;
    end
    m  = s1 / 40000.0;
    v  = s2 / 40000.0 - m * m;
    sk = s3 / 40000.0 / (v ** 1.5);
    ku = s4 / 40000.0 / (v * v);
    $display("mean=%f var=%f skew=%f kurt=%f repeats=%0d", m, v, sk, ku, same);
    check(m > -0.05 && m < 0.05, "mean");
    check(v > 0.9 && v < 1.1, "variance");
    check(sk > -0.15 && sk < 0.15, "skew");
    check(ku > 2.6 && ku < 3.4, "kurtosis");
    check(same < 400, "new sample every cycle");
    // with next low the sample holds
    next = 0;
    @(negedge clk); prev = sample;
    repeat (5) @(negedge clk);
    check(sample == prev, "sample held while next is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
