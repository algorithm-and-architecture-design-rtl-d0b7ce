// tb_sad_tree: drives random operand sets into the SAD tree back to back in
// both modes and checks every result against a sum computed here, and that
// each result appears exactly 4 cycles after its inputs.
module tb_sad_tree;
  import fruc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, mode_abs, out_valid;
  logic [13:0] a [16], b [16];
  logic [17:0] result;
  int checks = 0, failures = 0;

  sad_tree #(.IN_W(14), .OUT_W(18)) dut (.*);

  int exp_q [$];
  int cyc_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int e, c;
    e = exp_q.pop_front();
    c = cyc_q.pop_front();
    checks++;
    if (result !== 18'(e)) begin failures++; $display("mismatch %0d vs %0d", result, e); end
    checks++;
    if (cyc - c != 4) begin failures++; $display("latency %0d", cyc - c); end
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; mode_abs = 0;
    foreach (a[i]) begin a[i] = 0; b[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int e;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      mode_abs = $urandom % 2;
      e = 0;
      foreach (a[i]) begin
        a[i] = 14'($urandom);
        b[i] = (n % 7 == 0) ? 14'h3fff - a[i] : 14'($urandom);
        e += mode_abs ? (a[i] > b[i] ? a[i] - b[i] : b[i] - a[i]) : a[i];
      end
      if (in_valid) begin exp_q.push_back(e); cyc_q.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
