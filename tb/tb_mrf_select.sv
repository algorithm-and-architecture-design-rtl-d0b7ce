// tb_mrf_select: random MSEA and discontinuity sets (with forced ties) are
// applied; the expected MV is the arg-min of MSEA + 48 x discontinuity,
// computed here with the own-MV-first tie rule. Checks the one-cycle latency.
module tb_mrf_select;
  import fruc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  mv_t cand_mv [9], new_mv;
  msea_t msea [9];
  logic [DIS_W-1:0] dis [9];
  logic [3:0] new_idx;
  logic [ENG_W-1:0] new_energy;
  int checks = 0, failures = 0, n_self = 0, n_other = 0;

  mrf_select dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0;
    foreach (cand_mv[i]) begin cand_mv[i] = '0; msea[i] = '0; dis[i] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int e [9], bi;
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 9; k++) begin
        cand_mv[k].x = MV_W'($urandom); cand_mv[k].y = MV_W'($urandom);
        msea[k] = msea_t'($urandom % 20000);
        dis[k]  = DIS_W'($urandom % 300);
      end
      if (n % 5 == 0) begin msea[2] = msea[8]; dis[2] = dis[8]; end
      bi = 8;
      for (int k = 0; k < 9; k++) e[k] = int'(msea[k]) + 48 * int'(dis[k]);
      for (int k = 0; k < 8; k++) if (e[k] < e[bi]) bi = k;
      @(negedge clk);
      in_valid = 0;
      checks++; if (!out_valid) failures++;
      checks++; if (new_mv != cand_mv[bi] || int'(new_idx) != bi || int'(new_energy) != e[bi]) failures++;
      if (bi == 8) n_self++; else n_other++;
    end
    checks++; if (n_self == 0 || n_other == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
