// tb_msea_accum: builds a random 48x48 window, feeds the lines a pattern needs
// with 8x1 sums computed here, and compares all 9 x 16 accumulated 8x8 sums
// with 8x8 sums taken directly from the window for each candidate position.
module tb_msea_accum;
  import fruc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic clear, in_valid;
  logic [5:0] y, top;
  logic [2:0] step;
  sum8_t sum8 [3][4];
  sum64_t sums [9][16];
  int checks = 0, failures = 0;
  pix_t win [48][48];

  msea_accum dut (.*);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int steps [3] = '{4, 2, 1};
    clear = 1; in_valid = 0; y = 0; top = 8; step = 4;
    foreach (sum8[j, i]) sum8[j][i] = '0;
    for (int n = 0; n < 12; n++) begin
      int s, cxv, cyv;
      s = steps[n % 3];
      cxv = int'($urandom % (2 * (8 - s) + 1)) - (8 - s);
      cyv = int'($urandom % (2 * (8 - s) + 1)) - (8 - s);
      foreach (win[r, c]) win[r][c] = pix_t'($urandom);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      step = 3'(s); top = 6'(8 + cyv);
      for (int ln = 8 + cyv - s; ln < 8 + cyv + s + 32; ln++) begin
        in_valid = 1; y = 6'(ln);
        for (int jx = 0; jx < 3; jx++)
          for (int i = 0; i < 4; i++) begin
            int e; e = 0;
            for (int p = 0; p < 8; p++) e += win[ln][8 + cxv + (jx - 1) * s + 8 * i + p];
            sum8[jx][i] = sum8_t'(e);
          end
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      for (int k = 0; k < 9; k++)
        for (int j = 0; j < 16; j++) begin
          int e, r0, c0; e = 0;
          r0 = 8 + cyv + (k / 3 - 1) * s + 8 * (j / 4);
          c0 = 8 + cxv + (k % 3 - 1) * s + 8 * (j % 4);
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) e += win[r0 + r][c0 + c];
          checks++;
          if (sums[k][j] != sum64_t'(e)) begin
            failures++;
            if (failures < 5) $display("k=%0d j=%0d got %0d exp %0d", k, j, sums[k][j], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
