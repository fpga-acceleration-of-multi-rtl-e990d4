// Self-checking test of fsl_fifo: random pushes and pops against a queue
// model; checks data order, `exists`, `full` and `count`.
module tb_fsl_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, exists;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;

  fsl_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // compare state with the model
      checks++;
      if (exists != (model.size() != 0) || full != (model.size() == D) || count != model.size()) begin
        failures++;
        $display("state mismatch: size=%0d exists=%0b full=%0b count=%0d", model.size(), exists, full, count);
      end
      if (model.size() != 0) begin
        checks++;
        if (rd_data != model[0]) begin
          failures++;
          $display("data mismatch: got %h exp %h", rd_data, model[0]);
        end
      end
      if (full) saw_full++;
      wr_en   = ($urandom % 100) < (i < 1000 ? 70 : 30) && !full;
      rd_en   = ($urandom % 100) < (i < 1000 ? 40 : 70) && exists;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("FIFO never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
