// Self-checking test of distributor: host words become memory writes on the
// broadcast bus (into the bank not being computed on), configuration words
// set the simulation parameters, and a START word waits for idle, ready
// cores, then flips the banks, splits the paths over the cores and issues a
// job; memory words accepted while cores are busy are flagged as overlapped.
module tb_distributor;
  import cdo_pkg::*;
  localparam int NC = 5;
  logic clk = 0, rst_n = 0;
  logic in_exists, in_rd, wbank, rbank, start, job_valid, start_wait, overlap_load;
  logic [HOST_W-1:0] in_data;
  logic [NC-1:0] core_busy, core_ready;
  memwr_t mw;
  cfg_t core_cfg [NC];
  logic [T_W-1:0] job_steps;
  logic [NPATH_W-1:0] job_paths;
  int checks = 0, failures = 0;

  distributor #(.NCORES(NC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] word(logic [3:0] t, logic [15:0] a, logic [43:0] d);
    return {t, a, d};
  endfunction

  // send one word; returns the cycles it waited
  task automatic send(logic [63:0] w, output int waited);
    @(negedge clk);
    in_exists = 1; in_data = w;
    waited = 0;
    #1;
    while (!in_rd) begin @(negedge clk); #1; waited++; end
    @(negedge clk);
    in_exists = 0;
  endtask

  int w;
  bit saw_wait;
  int ov = 0;
  always @(negedge clk) if (overlap_load) ov++;
  always @(negedge clk) if (start_wait) saw_wait = 1;

  initial begin
    logic b0;
    in_exists = 0; in_data = 0; core_busy = '0; core_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    b0 = rbank;
    // memory write: appears on the bus one cycle after acceptance
    @(negedge clk); in_exists = 1; in_data = word(TGT_R, 16'd17, 44'd123456789);
    @(posedge clk); #1; in_exists = 0;
    check(mw.we && mw.tgt == TGT_R && mw.addr == 17 && mw.data == 44'd123456789, "R write on bus");
    check(wbank == ~rbank, "writes go to the bank not in use");
    @(posedge clk); #1;
    check(!mw.we, "single write pulse");
    send(word(TGT_CFG, 16'(CFG_PATHS), 44'd1003), w);
    send(word(TGT_CFG, 16'(CFG_INSTR), 44'd125), w);
    send(word(TGT_CFG, 16'(CFG_STEPS), 44'd35), w);
    send(word(TGT_CFG, 16'(CFG_FACTORS), 44'd4), w);
    send(word(TGT_CFG, 16'(CFG_ATTACH), 44'd300), w);
    send(word(TGT_CFG, 16'(CFG_WIDTH), 44'd400), w);
    // START held while a core is busy
    core_busy = 5'b00100;
    fork
      send(word(TGT_START, 0, 0), w);
      begin repeat (7) @(negedge clk); core_busy = '0; end
    join
    check(w >= 6, $sformatf("START waited %0d cycles", w));
    check(saw_wait, "start_wait flagged");
    check(rbank == ~b0, "banks flipped");
    for (int c = 0; c < NC; c++) begin
      check(core_cfg[c].n_paths == (c < 3 ? 201 : 200), $sformatf("core %0d paths %0d", c, core_cfg[c].n_paths));
      check(core_cfg[c].n_instr == 125 && core_cfg[c].n_steps == 35 && core_cfg[c].n_factors == 4
            && core_cfg[c].attach == 300 && core_cfg[c].width == 400, "config copied");
    end
    check(job_steps == 35 && job_paths == 1003, "job");
    // a load while cores compute is flagged as overlapped
    core_busy = '1;
    send(word(TGT_H, 16'h0041, 44'h0_0123_4567), w);
    @(posedge clk); #1;
    check(ov == 1, $sformatf("overlapped load flagged %0d", ov));
    // START also waits for generator start-up
    core_busy = '0; core_ready = 5'b11101;
    fork
      send(word(TGT_START, 0, 0), w);
      begin repeat (4) @(negedge clk); core_ready = '1; end
    join
    check(w >= 3, "START waits for ready cores");
    check(rbank == b0, "banks flipped back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
