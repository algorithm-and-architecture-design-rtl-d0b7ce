// tb_mv_grouping: random neighbourhoods (clustered and scattered MVs) go
// through the grouping unit; a model here recomputes the nine total
// discontinuities and the two groups from an explicit edge list, and the
// 36-cycle latency is checked. It also counts that both groups and
// non-group nodes occurred.
module tb_mv_grouping;
  import fruc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, g1_valid, g2_valid;
  mv_t self_mv, neigh_mv [8];
  logic [DIS_W-1:0] total_dis [9];
  logic [2:0] g1_center, g2_center;
  logic [7:0] g1_mask, g2_mask, nongroup_mask;
  int checks = 0, failures = 0, n_g1 = 0, n_g2 = 0, n_ng = 0;

  mv_grouping dut (.*);

  function automatic int l1(mv_t a, mv_t b);
    int dx, dy;
    dx = int'(a.x) - int'(b.x); dy = int'(a.y) - int'(b.y);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  // returns group as mask, or 0
  function automatic logic [7:0] grp(logic [7:0] alive, bit e [8][8], output int c);
    int best, cnt;
    logic [7:0] m;
    best = -1; c = 0;
    for (int i = 0; i < 8; i++) if (alive[i]) begin
      cnt = 0;
      for (int j = 0; j < 8; j++) if (alive[j] && e[i][j]) cnt++;
      if (cnt > best) begin best = cnt; c = i; end
    end
    if (best < 2) return 8'h00;
    m = 8'h00; m[c] = 1;
    for (int j = 0; j < 8; j++) if (alive[j] && e[c][j]) m[j] = 1;
    return m;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; self_mv = '0;
    foreach (neigh_mv[i]) neigh_mv[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      bit e [8][8];
      int ed [9], c1, c2, t0;
      logic [7:0] m1, m2;
      mv_t all [9];
      for (int i = 0; i < 9; i++) begin
        int spread, bxv, byv;
        spread = (n % 3 == 0) ? 40 : ((n % 10 == 1) ? 1 : 8);
        bxv = (i < 4 || n % 4 == 0) ? 10 : -20;
        byv = (i < 4 || n % 4 == 0) ? -5 : 30;
        all[i].x = MV_W'(bxv + int'($urandom % spread) - spread / 2);
        all[i].y = MV_W'(byv + int'($urandom % spread) - spread / 2);
      end
      for (int i = 0; i < 8; i++) neigh_mv[i] = all[i];
      self_mv = all[8];
      for (int k = 0; k < 9; k++) ed[k] = 0;
      for (int k = 0; k < 8; k++) for (int j = 0; j < 8; j++) begin
        e[k][j] = (k != j) && l1(all[k], all[j]) <= 8;
        ed[k] += l1(all[k], all[j]);
      end
      for (int j = 0; j < 8; j++) ed[8] += l1(all[8], all[j]);
      m1 = grp(8'hff, e, c1);
      m2 = (m1 == 0) ? 8'h00 : grp(~m1, e, c2);
      @(negedge clk); start = 1; t0 = $time;
      @(negedge clk); start = 0;
      wait (done); 
      checks++; if (($time - t0) / 10 != 36) begin failures++; $display("lat %0d", ($time - t0) / 10); end
      @(negedge clk);
      for (int k = 0; k < 9; k++) begin checks++; if (int'(total_dis[k]) != ed[k]) failures++; end
      checks++; if (g1_valid != (m1 != 0) || g1_mask != m1 || (m1 != 0 && int'(g1_center) != c1)) failures++;
      checks++; if (g2_valid != (m2 != 0) || g2_mask != m2 || (m2 != 0 && int'(g2_center) != c2)) failures++;
      checks++; if (nongroup_mask != ~(m1 | m2)) failures++;
      n_g1 += (m1 != 0); n_g2 += (m2 != 0); n_ng += ((m1 | m2) != 8'hff);
    end
    checks++; if (n_g1 == 0 || n_g2 == 0 || n_ng == 0) failures++;
    $display("group1 %0d group2 %0d with non-group %0d", n_g1, n_g2, n_ng);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
