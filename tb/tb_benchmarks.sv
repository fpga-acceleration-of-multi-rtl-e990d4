// Benchmark-size runs of the five-core pricer at its default parameters.
//
// Four data sets with the pool sizes, time steps and factor counts of the
// CDX-style benchmarks the architecture was evaluated on:
//   CDX.EM         N = 14,  T = 6,  F = 16   (PC = 4 > CC = 1)
//   CDX.NA.HY      N = 100, T = 15, F = 8    (PC = 2 = CC = 2)
//   semi-homog.    N = 400, T = 24, F = 4    (PC = 1 < CC = 3)
//   CDX.NA.IG      N = 125, T = 35, F = 16   (PC = 4 < CC = 5)
// The notionals are drawn from the four sizes 20, 50, 100 and 200 million
// dollars with 40 % recovery (R in cents). The correlation factors follow the
// stick-breaking rule alpha(i,j) = U_j (1-U_{j-1})...(1-U_1)(1-beta_i^2) with
// uniform U and beta_i in [0.3, 0.7].
//
// Four barrier curves, instrument i using curve i mod 4. At step k curve b
// is "always default" (H = max), "never" (H = min) or H = 0 (probability one
// half for any index variance, since the index is a zero-mean Gaussian),
// chosen by (k + b) mod 3. With attachment 0 and a width above the pool
// notional the tranche loss equals the pool loss, so
//   E[L(t_k)] = sum of R over "always" + 1/2 sum of R over "H = 0",
// exact when no instrument sits at H = 0 and otherwise within five times the
// worst-case (fully correlated) standard error 0.5 sum/sqrt(P).
// Each run's data is loaded while the previous run computes. The run time of
// every core is checked against the producer/consumer model: a path takes
// N * max(PC, CC) cycles plus the Stage 3 read-out of T cycles and a short
// pipeline fill, PC = ceil(F/4) and CC = ceil(T/8).
module tb_benchmarks;
  import cdo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_in_valid, host_in_ready, host_out_valid, host_out_ready, busy;
  logic [HOST_W-1:0] host_in_data, host_out_data;
  events_t events;
  int checks = 0, failures = 0;

  cdo_pricer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam fx_t HMAX = 32'sh7fff_ffff;
  localparam fx_t HMIN = -32'sh7fff_ffff;
  localparam int  NB   = 4;
  localparam int  NPATHS = 500;
  localparam int  BN [NB] = '{14, 100, 400, 125};
  localparam int  BT [NB] = '{6, 15, 24, 35};
  localparam int  BF [NB] = '{16, 8, 4, 16};

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

  function automatic real urand();
    return real'($urandom % 1_000_000) / 1_000_000.0;
  endfunction

  // stick-breaking correlation factors
  task automatic load_factors(int n, int f);
    int  pc;
    real b, rest, u;
    pc = (f + 3) / 4;
    for (int i = 0; i < n; i++) begin
      b    = 0.3 + 0.4 * urand();
      rest = 1.0;
      for (int j = 0; j < f; j++) begin
        u = urand();
        send(TGT_ALPHA, (j % 4) * 512 + i * pc + j / 4,
             44'(int'(u * rest * (1.0 - b * b) * 2.0 ** 27)));
        rest = rest * (1.0 - u);
      end
      send(TGT_BETA, i, 44'(int'(b * 2.0 ** 27)));
    end
  endtask

  // 0: H = 0, 1: always, 2: never
  function automatic int pattern(int k, int b);
    return (k + b) % 3;
  endfunction

  // results, drained with back-pressure
  longint unsigned res [$];
  int              res_k [$];
  bit              res_last [$];
  always @(negedge clk) begin
    host_out_ready = ($urandom % 3) != 0;
    #1;
    if (host_out_valid && host_out_ready) begin
      res.push_back(longint'(host_out_data[56:0]));
      res_k.push_back(int'(host_out_data[62:57]));
      res_last.push_back(host_out_data[63]);
    end
  end

  // core run times: from the start pulse until every core is idle again
  longint cyc = 0, t_start [$], t_end [$];
  logic   was_busy = 0;
  always @(negedge clk) begin
    cyc++;
    if (dut.start) t_start.push_back(cyc);
    if (was_busy && dut.core_busy == '0) t_end.push_back(cyc);
    was_busy = (dut.core_busy != '0);
  end

  money_t R [NB][512];

  initial begin
    longint unsigned e_all, e_half, got, tol, diff;
    longint sum_r;
    int     base, pc, cc, pcore;
    longint bound_lo, bound_hi, took;
    host_in_valid = 0; host_in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NB; r++) begin
      load_factors(BN[r], BF[r]);
      for (int b = 0; b < 4; b++)
        for (int k = 0; k < BT[r]; k++)
          send(TGT_H, b * 64 + k, 44'(unsigned'(pattern(k, b) == 0 ? 0 :
                                              pattern(k, b) == 1 ? HMAX : HMIN)));
      sum_r = 0;
      for (int i = 0; i < BN[r]; i++) begin
        case ($urandom % 4)
          0: R[r][i] = money_t'(20)  * 60_000_000;
          1: R[r][i] = money_t'(50)  * 60_000_000;
          2: R[r][i] = money_t'(100) * 60_000_000;
          default: R[r][i] = money_t'(200) * 60_000_000;
        endcase
        sum_r += longint'(R[r][i]);
        send(TGT_R, i, 44'(R[r][i]));
        send(TGT_IND, i, 44'(i % 4));
      end
      cfg(CFG_PATHS, NPATHS); cfg(CFG_INSTR, BN[r]); cfg(CFG_STEPS, BT[r]);
      cfg(CFG_FACTORS, BF[r]); cfg(CFG_ATTACH, 0); cfg(CFG_WIDTH, sum_r + 1);
      send(TGT_START, 0, 0);
    end
    wait (res.size() == BT[0] + BT[1] + BT[2] + BT[3]);
    wait (t_end.size() == NB);

    base = 0;
    for (int r = 0; r < NB; r++) begin
      for (int k = 0; k < BT[r]; k++) begin
        e_all = 0; e_half = 0;
        for (int i = 0; i < BN[r]; i++)
          case (pattern(k, i % 4))
            0: e_half += R[r][i];
            1: e_all  += R[r][i];
            default: ;
          endcase
        tol = longint'(2.5 * real'(e_half) / $sqrt(real'(NPATHS))) + 1;
        got = res[base + k];
        diff = (got > e_all + e_half / 2) ? got - (e_all + e_half / 2) : (e_all + e_half / 2) - got;
        checks++;
        if (diff > tol || res_k[base + k] != k || res_last[base + k] != (k == BT[r] - 1)) begin
          failures++;
          $display("bench %0d step %0d: got %0d (k=%0d) exp %0d +- %0d",
                   r, k, got, res_k[base + k], e_all + e_half / 2, tol);
        end
      end
      base += BT[r];

      pc    = (BF[r] + 3) / 4;
      cc    = (BT[r] + 7) / 8;
      pcore = (NPATHS + 4) / 5;
      took  = t_end[r] - t_start[r];
      bound_lo = longint'(pcore) * BN[r] * ((pc > cc) ? pc : cc);
      bound_hi = longint'(pcore) * (BN[r] * ((pc > cc) ? pc : cc) + BT[r] + 24) + 300;
      $display("bench %0d: N=%0d T=%0d F=%0d PC=%0d CC=%0d  %0d cycles for %0d paths per core (%0d per path, model %0d..%0d)",
               r, BN[r], BT[r], BF[r], pc, cc, took, pcore, took / pcore,
               bound_lo / pcore, bound_hi / pcore);
      checks++;
      if (took < bound_lo || took > bound_hi) begin
        failures++;
        $display("bench %0d: run time %0d outside %0d..%0d", r, took, bound_lo, bound_hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
