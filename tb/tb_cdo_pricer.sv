// End-to-end test of the multi-core pricer at its default size (five cores),
// driven only through the host word stream.
// Run 1: barrier curves with a fixed outcome ("always", "never", and
//        alternating per step) so E[L^(t_k)] is known exactly; 1003 paths
//        split unevenly over the cores.
// Run 2: loaded while run 1 computes (its START must wait); T = 6, so the
//        comparators use two partial-sum banks; barrier 0 (probability 1/2),
//        16 factors so Stage 2 waits for Y; checked against the expectation.
// The host drains results with back-pressure. Every mechanism of the design
// is counted and must occur at least once.
module tb_cdo_pricer;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_in_valid, host_in_ready, host_out_valid, host_out_ready, busy;
  logic [HOST_W-1:0] host_in_data, host_out_data;
  events_t events;
  int checks = 0, failures = 0;

  cdo_pricer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam fx_t HMAX = 32'sh7fff_ffff;
  localparam fx_t HMIN = -32'sh7fff_ffff;

  task automatic send(target_e t, int addr, logic [43:0] d);
    @(negedge clk);
    host_in_valid = 1; host_in_data = {t, 16'(addr), d};
    #1;
    while (!host_in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    host_in_valid = 0;
  endtask

  task automatic cfg(cfg_reg_e r, longint v);
    send(TGT_CFG, int'(r), 44'(v));
  endtask

  task automatic load_factors(int n, int f);
    int pc;
    real a, b;
    pc = (f + 3) / 4;
    a = 0.25;
    b = $sqrt(1.0 - f * a * a);
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < f; j++)
        send(TGT_ALPHA, (j % 4) * 512 + i * pc + j / 4, 44'(int'(a * 2.0 ** 27)));
      send(TGT_BETA, i, 44'(int'(b * 2.0 ** 27)));
    end
  endtask

  // results arrive in order; the receiver runs on its own
  longint unsigned res [$];
  int              res_k [$];
  bit              res_last [$];
  int n_bp = 0;
  always @(negedge clk) begin
    host_out_ready = ($urandom % 4) != 0;
    #1;
    if (host_out_valid && !host_out_ready) n_bp++;
    if (host_out_valid && host_out_ready) begin
      res.push_back(longint'(host_out_data[56:0]));
      res_k.push_back(int'(host_out_data[62:57]));
      res_last.push_back(host_out_data[63]);
    end
  end

  // mechanism counters
  int n_sw = 0, n_ov = 0, n_xw = 0, n_ys = 0, n_dr = 0, n_two = 0;
  always @(negedge clk) begin
    if (events.start_wait)   n_sw++;
    if (events.overlap_load) n_ov++;
    if (events.x_wait)       n_xw++;
    if (events.y_starve)     n_ys++;
    if (events.draining)     n_dr++;
    if (dut.g_core[0].u_core.u_pool.use_two && dut.g_core[0].u_core.u_pool.d_v
        && dut.g_core[0].u_core.u_pool.d_bank) n_two++;
  end

  money_t R [64];
  int     ind [64];

  initial begin
    money_t l, lt, a, w;
    longint unsigned e;
    real mean;
    host_in_valid = 0; host_in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- run 1 ----------------
    load_factors(20, 6);
    for (int k = 0; k < 13; k++) begin
      send(TGT_H, 0 * 64 + k, 44'(unsigned'(HMAX)));
      send(TGT_H, 1 * 64 + k, 44'(unsigned'(HMIN)));
      send(TGT_H, 2 * 64 + k, 44'(unsigned'(k % 2 == 0 ? HMAX : HMIN)));
    end
    for (int i = 0; i < 20; i++) begin
      R[i] = money_t'($urandom % 1_000_000) * 100;
      ind[i] = $urandom % 3;
      send(TGT_R, i, 44'(R[i]));
      send(TGT_IND, i, 44'(ind[i]));
    end
    a = 0; for (int i = 0; i < 20; i++) a += R[i];
    a = a / 5; w = a;
    cfg(CFG_PATHS, 1003); cfg(CFG_INSTR, 20); cfg(CFG_STEPS, 13);
    cfg(CFG_FACTORS, 6); cfg(CFG_ATTACH, a); cfg(CFG_WIDTH, w);
    send(TGT_START, 0, 0);
    // ---------------- run 2, loaded during run 1 ----------------
    load_factors(3, 16);
    for (int k = 0; k < 6; k++) send(TGT_H, k, 44'd0);
    for (int i = 0; i < 3; i++) begin
      send(TGT_R, i, 44'd1_000_000);
      send(TGT_IND, i, 44'd0);
    end
    cfg(CFG_PATHS, 2000); cfg(CFG_INSTR, 3); cfg(CFG_STEPS, 6);
    cfg(CFG_FACTORS, 16); cfg(CFG_ATTACH, 0); cfg(CFG_WIDTH, 3_000_000);
    send(TGT_START, 0, 0);
    // ---------------- results ----------------
    wait (res.size() == 13 + 6);
    for (int k = 0; k < 13; k++) begin
      l = 0;
      for (int i = 0; i < 20; i++)
        if (ind[i] == 0 || (ind[i] == 2 && k % 2 == 0)) l += R[i];
      lt = (l < a) ? 0 : ((l - a > w) ? w : l - a);
      e = longint'(lt);          // same loss on every path: the mean is exact
      checks++;
      if (res[k] != e || res_k[k] != k || res_last[k] != (k == 12)) begin
        failures++;
        $display("run1 step %0d: got %0d (k=%0d last=%0b) exp %0d", k, res[k], res_k[k], res_last[k], e);
      end
    end
    for (int k = 0; k < 6; k++) begin
      mean = real'(res[13 + k]);
      checks++;
      if (mean < 1_400_000.0 || mean > 1_600_000.0 || res_k[13 + k] != k) begin
        failures++; $display("run2 step %0d: mean %f, expected about 1500000", k, mean);
      end
    end
    $display("run2 E[L^] = %0d cents", res[13]);
    repeat (20) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("busy at the end"); end
    $display("start_wait=%0d overlap_load=%0d x_wait=%0d y_starve=%0d draining=%0d two_bank=%0d backpressure=%0d",
             n_sw, n_ov, n_xw, n_ys, n_dr, n_two, n_bp);
    begin
      int cnt [7];
      cnt = '{n_sw, n_ov, n_xw, n_ys, n_dr, n_two, n_bp};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
