// tb_artifact_detect: directed cases (discontinuity at exactly 2 and 3,
// bi-MSEA ties, the 512 limit) and random sub-blocks; the label, the four
// conditions and the initial MV are recomputed here from the rules.
module tb_artifact_detect;
  import fruc_pkg::*;
  mv_t self_mv, neigh_mv [4], init_mv;
  msea_t self_bi, neigh_bi [4];
  logic [3:0] neigh_valid, cond;
  logic label;
  int checks = 0, failures = 0, n_lab = 0, n_avg = 0;

  artifact_detect dut (.*);

  task automatic check;
    int sx, sy, n, ex, ey;
    logic [3:0] c;
    sx = 0; sy = 0; n = 0;
    #1;
    for (int i = 0; i < 4; i++) begin
      int dx, dy;
      dx = int'(self_mv.x) - int'(neigh_mv[i].x); dy = int'(self_mv.y) - int'(neigh_mv[i].y);
      c[i] = neigh_valid[i] && (dx > 2 || dx < -2 || dy > 2 || dy < -2) && (self_bi > neigh_bi[i]);
      if (c[i]) begin sx += int'(neigh_mv[i].x); sy += int'(neigh_mv[i].y); n++; end
    end
    if (int'(self_bi) < 512 || n == 0) begin ex = int'(self_mv.x); ey = int'(self_mv.y); end
    else begin ex = sx / n; ey = sy / n; n_avg++; end
    checks++; if (cond != c || label != |c) failures++;
    checks++; if (int'(init_mv.x) != ex || int'(init_mv.y) != ey) failures++;
    n_lab += |c;
  endtask

  initial begin
    self_mv = '{x: 9'sd4, y: 9'sd0}; self_bi = 700; neigh_valid = 4'hf;
    for (int i = 0; i < 4; i++) begin neigh_mv[i] = self_mv; neigh_bi[i] = 100; end
    neigh_mv[0].x = 9'sd2; check();             // gap 2: no condition
    neigh_mv[0].x = 9'sd1; check();             // gap 3: condition
    neigh_bi[0] = 700; check();                 // equal bi-MSEA: no condition
    neigh_bi[0] = 100; self_bi = 511; check();  // below limit: own MV
    neigh_mv[1].y = -9'sd7; self_bi = 900; check();
    for (int n = 0; n < 2000; n++) begin
      self_mv.x = MV_W'(int'($urandom % 21) - 10); self_mv.y = MV_W'(int'($urandom % 21) - 10);
      self_bi = msea_t'($urandom % 1500);
      neigh_valid = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        neigh_mv[i].x = MV_W'(int'($urandom % 21) - 10); neigh_mv[i].y = MV_W'(int'($urandom % 21) - 10);
        neigh_bi[i] = msea_t'($urandom % 1500);
      end
      check();
    end
    checks++; if (n_lab == 0 || n_avg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
