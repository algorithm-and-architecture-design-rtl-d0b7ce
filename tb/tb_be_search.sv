// tb_be_search: a 16x16 sub-block of an inter-frame is surrounded by outside
// pixels; the testbench answers every request with those outside pixels and
// the inside boundary pixels of the block the candidate points to, taken from
// one of two synthetic existing frames (one per search direction). A model
// here evaluates the boundary error of all 162 candidates and picks the first
// minimum; the unit must agree on MV, direction and error, and finish within
// 648 request cycles plus the pipeline latency. Cases where the opposite
// window wins (occlusion) must occur.
module tb_be_search;
  import fruc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, req_valid, req_win, busy, done, best_win;
  mv_t init_mv, req_mv, best_mv;
  logic [1:0] req_part;
  pix_t resp_out [16], resp_in [16];
  logic [13:0] best_be;
  int checks = 0, failures = 0, n_opp = 0, seed;

  be_search dut (.*);

  function automatic int frame(int w, int x, int y);
    int h;
    h = (x * 37 + y * 91 + w * 53 + seed) * 2654435;
    return 128 + ((x * 3 + y * 5 + w * 40) % 60) + ((h >>> 9) & 15) - 30 + (w ? 0 : (x % 7));
  endfunction

  // boundary pixel position j (0..15) of part p, inside (d = 0) or outside (d = 1)
  function automatic void bpos(input int p, j, d, output int x, y);
    case (p)
      0: begin x = j;  y = d ? -1 : 0;  end
      1: begin x = j;  y = d ? 16 : 15; end
      2: begin x = d ? -1 : 0;  y = j;  end
      default: begin x = d ? 16 : 15; y = j; end
    endcase
  endfunction

  int tw, tmx, tmy;   // true source of the outside pixels

  function automatic int out_pix(int p, int j);
    int x, y;
    bpos(p, j, 1, x, y);
    return frame(tw, x + tmx, y + tmy);
  endfunction

  function automatic int in_pix(int w, int mx, int my, int p, int j);
    int x, y;
    bpos(p, j, 0, x, y);
    return frame(w, x + mx, y + my);
  endfunction

  always @(posedge clk) begin
    for (int j = 0; j < 16; j++) begin
      resp_out[j] <= pix_t'(out_pix(int'(req_part), j));
      resp_in[j]  <= pix_t'(in_pix(int'(req_win), int'(req_mv.x), int'(req_mv.y), int'(req_part), j));
    end
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; init_mv = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      int bmx, bmy, bw, bv, t0, t1, ix, iy;
      seed = n * 1234567;
      ix = int'($urandom % 41) - 20; iy = int'($urandom % 41) - 20;
      tw = n % 2;
      tmx = (tw ? -ix : ix) + 2 * int'($urandom % 9) - 8;
      tmy = (tw ? -iy : iy) + 2 * int'($urandom % 9) - 8;
      if (n % 4 == 3) begin tmx += 1; end    // true position off the even grid
      bv = 1 << 30; bmx = 0; bmy = 0; bw = 0;
      for (int w = 0; w < 2; w++)
        for (int dy = -8; dy <= 8; dy += 2)
          for (int dx = -8; dx <= 8; dx += 2) begin
            int cx, cy, be;
            cx = (w ? -ix : ix) + dx; cy = (w ? -iy : iy) + dy;
            be = 0;
            for (int p = 0; p < 4; p++)
              for (int j = 0; j < 16; j++) begin
                int d;
                d = (out_pix(p, j) & 255) - (in_pix(w, cx, cy, p, j) & 255);
                be += d < 0 ? -d : d;
              end
            if (be < bv) begin bv = be; bmx = cx; bmy = cy; bw = w; end
          end
      @(negedge clk); start = 1; init_mv.x = MV_W'(ix); init_mv.y = MV_W'(iy);
      t0 = $time;
      @(negedge clk); start = 0;
      wait (done);
      t1 = $time;
      @(negedge clk);
      checks++;
      if (int'(best_mv.x) != bmx || int'(best_mv.y) != bmy || int'(best_win) != bw || int'(best_be) != bv) begin
        failures++;
        $display("got (%0d,%0d) w%0d %0d exp (%0d,%0d) w%0d %0d", int'(best_mv.x), int'(best_mv.y), best_win, best_be, bmx, bmy, bw, bv);
      end
      checks++; if ((t1 - t0) / 10 < 648 || (t1 - t0) / 10 > 656) failures++;
      if (n == 0) $display("cycles %0d", (t1 - t0) / 10);
      n_opp += bw;
    end
    checks++; if (n_opp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
