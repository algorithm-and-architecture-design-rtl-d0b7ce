// tb_bi_msea: streams pairs of 16x16 blocks (random, constant, and equal
// pairs with a zero result) through the bi-MSEA unit, with and without gaps
// between lines, and compares the result with the bilateral 8x8 MSEA worked
// out from the pixels: sum over the four 8x8 cells of |sum(forward) -
// sum(backward)|. Pixels outside 0..15 of each line are random and must be
// ignored. Without gaps the result must come 5 cycles after the last line.
module tb_bi_msea;
  import fruc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, line_valid, done;
  pix_t line [48];
  msea_t bi;
  int checks = 0, failures = 0;

  bi_msea dut (.*);

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int blk [2][16][16];

  task automatic run(input int mode, input bit gaps);
    int expv, cs [2][4], t_last, t_done;
    foreach (cs[d, c]) cs[d][c] = 0;
    for (int d = 0; d < 2; d++)
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          case (mode)
            0: blk[d][r][c] = int'($urandom % 256);
            1: blk[d][r][c] = (d == 0) ? 255 : 0;
            default: blk[d][r][c] = (d == 0) ? int'($urandom % 256) : blk[0][r][c];
          endcase
          cs[d][2 * (r / 8) + c / 8] += blk[d][r][c];
        end
    expv = 0;
    for (int c = 0; c < 4; c++) expv += (cs[0][c] > cs[1][c]) ? cs[0][c] - cs[1][c] : cs[1][c] - cs[0][c];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int n = 0; n < 32; n++) begin
      if (gaps) repeat ($urandom % 3) @(negedge clk);
      for (int i = 0; i < 48; i++) line[i] = (i < 16) ? pix_t'(blk[n / 16][n % 16][i]) : pix_t'($urandom);
      line_valid = 1;
      t_last = $time;
      @(negedge clk) line_valid = 0;
    end
    while (!done) @(negedge clk);
    t_done = $time;
    checks++;
    if (int'(bi) != expv) begin
      failures++;
      $display("mode %0d: bi-MSEA %0d expected %0d", mode, bi, expv);
    end
    if (!gaps) begin
      checks++;
      if ((t_done - t_last) / 10 != 5) begin
        failures++;
        $display("result %0d cycles after the last line", (t_done - t_last) / 10);
      end
    end
    @(negedge clk);
    checks++; if (done) failures++;    // a single pulse
  endtask

  initial begin
    start = 0; line_valid = 0;
    foreach (line[i]) line[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 1'b0);
    run(2, 1'b0);
    for (int k = 0; k < 200; k++) run(0, k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
