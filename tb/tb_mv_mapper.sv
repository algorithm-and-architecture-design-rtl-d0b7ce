// tb_mv_mapper: for random inter blocks, the 3x3 existing blocks around them
// are projected with random MVs (some neighbourhoods uniform, some mixed) at
// time phases 1/5 .. 4/5 and 1/2. A model here computes the per-axis overlap
// of each projection, accumulates area per distinct MV and applies the
// largest-area-above-512 rule or the area-weighted mean. Both rules must
// occur.
module tb_mv_mapper;
  import fruc_pkg::*;
  localparam int CW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, cand_valid, finish, out_valid, out_by_max;
  logic signed [CW-1:0] ib_x, ib_y, ex, ey;
  logic signed [3:0] num;
  logic [3:0] den;
  mv_t cand_mv, out_mv;
  logic [2*CW-1:0] out_area;
  int checks = 0, failures = 0, n_max = 0, n_mean = 0;

  mv_mapper dut (.*);

  function automatic int ov(int a, int b);
    int lo, hi;
    lo = a > b ? a : b;
    hi = (a + 32) < (b + 32) ? a + 32 : b + 32;
    return hi > lo ? hi - lo : 0;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; cand_valid = 0; finish = 0; ib_x = 0; ib_y = 0; ex = 0; ey = 0;
    num = 1; den = 5; cand_mv = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int tmx [16], tmy [16], ta [16], nt, ibx, iby, mxa, mxi, sa, sx, sy, exx, exy;
      int nm, dn;
      bit uni;
      uni = (n % 2 == 0);
      ibx = 320 + 32 * int'($urandom % 8); iby = 256 + 32 * int'($urandom % 8);
      dn = (n % 5 == 4) ? 2 : 5;
      nm = (dn == 2) ? 1 : 1 + n % 4;
      if (n % 7 == 3) nm = -nm;
      @(negedge clk); start = 1; ib_x = CW'(ibx); ib_y = CW'(iby); num = 4'(nm); den = 4'(dn);
      @(negedge clk); start = 0;
      nt = 0;
      for (int k = 0; k < 9; k++) begin
        int bx, by, mx, my, px, py, a, hit;
        bx = ibx + 32 * (k % 3 - 1); by = iby + 32 * (k / 3 - 1);
        if (uni) begin mx = 20 + int'($urandom % 3); my = -10; end
        else begin mx = int'($urandom % 81) - 40; my = int'($urandom % 81) - 40; end
        px = bx + (mx * nm) / dn; py = by + (my * nm) / dn;
        a = ov(px, ibx) * ov(py, iby);
        if (a != 0) begin
          hit = -1;
          for (int t = 0; t < nt; t++) if (tmx[t] == mx && tmy[t] == my) hit = t;
          if (hit >= 0) ta[hit] += a;
          else begin tmx[nt] = mx; tmy[nt] = my; ta[nt] = a; nt++; end
        end
        cand_valid = 1; ex = CW'(bx); ey = CW'(by); cand_mv.x = MV_W'(mx); cand_mv.y = MV_W'(my);
        @(negedge clk);
      end
      cand_valid = 0; finish = 1;
      @(negedge clk); finish = 0;
      mxa = 0; mxi = 0; sa = 0; sx = 0; sy = 0;
      for (int t = 0; t < nt; t++) begin
        if (ta[t] > mxa) begin mxa = ta[t]; mxi = t; end
        sa += ta[t]; sx += ta[t] * tmx[t]; sy += ta[t] * tmy[t];
      end
      if (mxa > 512) begin exx = tmx[mxi]; exy = tmy[mxi]; n_max++; end
      else if (sa == 0) begin exx = 0; exy = 0; n_mean++; end
      else begin exx = sx / sa; exy = sy / sa; n_mean++; end
      @(negedge clk);
      checks++; if (!out_valid) failures++;
      checks++; if (int'(out_mv.x) != exx || int'(out_mv.y) != exy || out_by_max != (mxa > 512)) begin
        failures++;
        $display("n=%0d got (%0d,%0d) %0d exp (%0d,%0d) %0d", n, out_mv.x, out_mv.y, out_by_max, exx, exy, mxa);
      end
      checks++; if (int'(out_area) != mxa) failures++;
    end
    checks++; if (n_max == 0 || n_mean == 0) failures++;
    $display("max rule %0d mean rule %0d", n_max, n_mean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
