// Self-checking test of collector with three cores modelled as queues:
// per-step sums from each core arrive at random times, two jobs are queued
// back to back, and every result word must be {last, k, round(sum/P)} in
// step order; the host side applies random back-pressure.
module tb_collector;
  import cdo_pkg::*;
  localparam int NC = 3;
  logic clk = 0, rst_n = 0;
  logic job_valid, res_valid, res_ready, busy;
  logic [T_W-1:0] job_steps;
  logic [NPATH_W-1:0] job_paths;
  logic [NC-1:0] core_exists, core_rd;
  acc_t core_data [NC];
  logic [HOST_W-1:0] res_data;
  int checks = 0, failures = 0;

  collector #(.NCORES(NC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  acc_t cq [NC][$];
  acc_t pending [NC][$];    // words not yet released to the core FIFO model
  longint unsigned expq [$];
  int  stepq [$];
  bit  lastq [$];

  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) if (core_rd[c]) void'(cq[c].pop_front());
  end
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      if (pending[c].size() != 0 && ($urandom % 3 == 0)) cq[c].push_back(pending[c].pop_front());
      core_exists[c] = cq[c].size() != 0;
      core_data[c]   = cq[c].size() != 0 ? cq[c][0] : '0;
    end
    res_ready = ($urandom % 4) != 0;
  end

  task automatic add_job(int t, int p);
    longint unsigned s;
    acc_t v;
    @(negedge clk);
    job_valid = 1; job_steps = T_W'(t); job_paths = NPATH_W'(p);
    @(negedge clk);
    job_valid = 0;
    for (int k = 0; k < t; k++) begin
      s = 0;
      for (int c = 0; c < NC; c++) begin
        v = acc_t'({$urandom, $urandom}) >> 4;
        pending[c].push_back(v);
        s += longint'(v);
      end
      expq.push_back((s + longint'(p / 2)) / longint'(p));
      stepq.push_back(k);
      lastq.push_back(k == t - 1);
    end
  endtask

  initial begin
    longint unsigned q;
    job_valid = 0; job_steps = 0; job_paths = 1; res_ready = 0;
    for (int c = 0; c < NC; c++) core_exists[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    add_job(10, 100000);
    add_job(3, 7);
    add_job(64, 3);
    while (expq.size() != 0) begin
      @(posedge clk);
      if (res_valid && res_ready) begin
        q = expq.pop_front();
        checks++;
        if (res_data[56:0] !== 57'(q) || res_data[62:57] !== 6'(stepq[0]) || res_data[63] !== lastq[0]) begin
          failures++;
          $display("step %0d: got %h exp %h", stepq[0], res_data, q);
        end
        void'(stepq.pop_front()); void'(lastq.pop_front());
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (busy || res_valid) begin failures++; $display("busy after all results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
