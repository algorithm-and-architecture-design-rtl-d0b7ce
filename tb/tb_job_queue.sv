// tb_job_queue: random pushes and pops (never pushing when full or popping
// when empty) against a queue model; checks head data, count, full and empty,
// and that the queue was driven full and empty at least once.
module tb_job_queue;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [47:0] wr_data, rd_data;
  logic [6:0] count;
  logic [47:0] model [$];
  int checks = 0, failures = 0, n_full = 0;

  job_queue #(.DEPTH(64), .WIDTH(48)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int bias;
      bias = ((n / 500) % 2) ? 3 : 1;     // phases that fill and drain
      @(negedge clk);
      checks++;
      if (count != 7'(model.size()) || full != (model.size() == 64) || empty != (model.size() == 0)) failures++;
      if (model.size() > 0) begin checks++; if (rd_data !== model[0]) failures++; end
      if (full) n_full++;
      push = !full && ($urandom % 4 < bias);
      pop  = !empty && ($urandom % 4 >= bias);
      wr_data = {$urandom, 16'($urandom)};
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    checks++; if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
