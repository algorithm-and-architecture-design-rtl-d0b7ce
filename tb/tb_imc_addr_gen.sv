// tb_imc_addr_gen: random existing/inter block pairs and displacements. Every
// tile is painted into a coverage map of the existing block; the map must
// equal, pixel by pixel, the set of existing-block pixels the inter block
// takes its pixels from, each exactly once, and every tile's source and
// destination must differ by the displacement. Also checks one tile per
// cycle under a random ready signal and the empty-region case.
module tb_imc_addr_gen;
  localparam int CW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ready, tile_valid, busy, done;
  logic signed [CW-1:0] ex, ey, ix, iy, sdx, sdy, dst_x, dst_y;
  logic [6:0] src_x, src_y;
  logic [3:0] cols;
  logic [1:0] rows;
  int checks = 0, failures = 0, n_tiles = 0, n_empty = 0;
  int cov_map [64][64];

  imc_addr_gen dut (.*);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && tile_valid && ready) begin
    n_tiles++;
    for (int r = 0; r < int'(rows); r++)
      for (int c = 0; c < int'(cols); c++) begin
        int sx, sy;
        sx = int'(src_x) + c; sy = int'(src_y) + r;
        if (sx < 64 && sy < 64) cov_map[sy][sx]++;
        else cov_map[0][0] += 100;
      end
    checks++;
    if (int'(dst_x) != int'(ex) + int'(src_x) - int'(sdx) || int'(dst_y) != int'(ey) + int'(src_y) - int'(sdy))
      failures++;
  end

  initial begin
    start = 0; ready = 1; ex = 0; ey = 0; ix = 0; iy = 0; sdx = 0; sdy = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      foreach (cov_map[r, c]) cov_map[r][c] = 0;
      ex = 640; ey = 512;
      ix = CW'(640 + 64 * (int'($urandom % 3) - 1)); iy = CW'(512 + 64 * (int'($urandom % 3) - 1));
      sdx = CW'(int'($urandom % 161) - 80); sdy = CW'(int'($urandom % 161) - 80);
      if (n == 5) sdx = 300;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) begin
        ready = ($urandom % 4 != 0);
        @(negedge clk);
      end
      ready = 1;
      for (int r = 0; r < 64; r++)
        for (int c = 0; c < 64; c++) begin
          int gx, gy, e;
          gx = 640 + c; gy = 512 + r;      // existing pixel; inter pixel = g - sd
          e = (gx - int'(sdx) >= int'(ix) && gx - int'(sdx) < int'(ix) + 64 &&
               gy - int'(sdy) >= int'(iy) && gy - int'(sdy) < int'(iy) + 64) ? 1 : 0;
          checks++; if (cov_map[r][c] != e) failures++;
        end
      if (sdx == 300) n_empty++;
    end
    checks++; if (n_tiles == 0 || n_empty == 0) failures++;
    $display("tiles %0d", n_tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
