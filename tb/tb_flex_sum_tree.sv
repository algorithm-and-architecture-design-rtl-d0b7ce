// tb_flex_sum_tree: random 48-pixel lines with every step (4, 2, 1) and
// every centre offset that keeps the pattern inside the +-8 window; each
// 8x1 sum is recomputed here from the pixel line. Plain mode is checked too.
module tb_flex_sum_tree;
  import fruc_pkg::*;
  pix_t line [48];
  logic [2:0] step;
  logic signed [4:0] cx;
  logic plain;
  sum8_t sum8 [3][4];
  int checks = 0, failures = 0;

  flex_sum_tree dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int steps [3] = '{4, 2, 1};
    for (int n = 0; n < 60; n++)
      foreach (steps[si])
        for (int c = -(8 - steps[si]); c <= 8 - steps[si]; c++) begin
          foreach (line[i]) line[i] = pix_t'($urandom);
          step = 3'(steps[si]); cx = 5'(c); plain = 0;
          #1;
          for (int jx = 0; jx < 3; jx++)
            for (int i = 0; i < 4; i++) begin
              int e, x;
              x = 8 + c + (jx - 1) * steps[si] + 8 * i;
              e = 0;
              for (int p = 0; p < 8; p++) e += line[x + p];
              checks++;
              if (sum8[jx][i] != sum8_t'(e)) failures++;
            end
        end
    plain = 1;
    #1;
    for (int k = 0; k < 6; k++) begin
      int e; e = 0;
      for (int p = 0; p < 8; p++) e += line[8*k + p];
      checks++;
      if (sum8[k / 4][k % 4] != sum8_t'(e)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
