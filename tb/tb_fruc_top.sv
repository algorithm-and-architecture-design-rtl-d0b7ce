// tb_fruc_top: end-to-end run of the engine at its default sizes, one pass
// through every procedure for a small neighbourhood of blocks:
//   down-sample a 4K strip, motion estimation of four blocks (two accepted
//   predictors on both ping-pong pairs, two rejected predictors whose window
//   refetch travels through the job queue), an MRF step with grouping,
//   MV mapping under both rules, an inverse-MC tile walk, artifact detection
//   with a bilateral search where the opposite window wins and a skipped
//   sub-block, the first band of whole-frame 8x8 sums, the bi-MSEA of a
//   sub-block, and OBMC of a whole 32x32
//   sub-block.
// Each result is checked against values worked out here, and each mechanism
// (accepted/rejected predictor, refetch, both pairs, groups, MRF change,
// mapping max/mean rule, tiles, label/skip, opposite window, bi-MSEA, 8x8 sums,
// OBMC, down-sample)
// is counted; a mechanism that never happened counts as a failure.
module tb_fruc_top;
  import fruc_pkg::*;
  localparam int BX = 136, BY = 136, AW = 320;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic me_start, me_pp_sel, me_busy, me_done, me_rejected;
  mv_t me_neigh_mv [3], me_pred_mv, me_mv;
  sum64_t me_cur_sums [16];
  msea_t me_msea;
  logic m_we, m_pair, o_we, o_pair, fetch_done, dram_req_valid, dram_req_pop;
  logic [5:0] m_addr; logic [383:0] m_wdata; logic [3:0] o_bank; logic [6:0] o_addr;
  logic [15:0] o_wdata; logic [47:0] dram_req_data;
  logic mrf_start, mrf_valid, grp1_valid, grp2_valid;
  mv_t mrf_self_mv, mrf_neigh_mv [8], mrf_new_mv;
  msea_t mrf_msea [9];
  logic [3:0] mrf_new_idx;
  logic [7:0] grp1_mask, grp2_mask, nongroup_mask;
  logic map_start, map_cand_valid, map_finish, map_valid, map_by_max;
  logic signed [13:0] map_ib_x, map_ib_y, map_ex, map_ey;
  logic signed [3:0] map_num; logic [3:0] map_den;
  mv_t map_cand_mv, map_mv;
  logic imc_start, imc_ready, imc_tile_valid, imc_done;
  logic signed [13:0] imc_ex, imc_ey, imc_ix, imc_iy, imc_sdx, imc_sdy, imc_dst_x, imc_dst_y;
  logic [6:0] imc_src_x, imc_src_y; logic [3:0] imc_cols; logic [1:0] imc_rows;
  logic pp_start, pp_label, pp_skip, be_req_valid, be_req_win, be_done, be_best_win;
  mv_t pp_self_mv, pp_neigh_mv [4], pp_init_mv, be_req_mv, be_best_mv;
  msea_t pp_self_bi, pp_neigh_bi [4];
  logic [3:0] pp_neigh_valid; logic [1:0] be_req_part;
  pix_t be_resp_out [16], be_resp_in [16];
  logic [13:0] be_best_be;
  logic ob_valid, ob_out_valid; logic [4:0] ob_y, ob_x0;
  pix_t ob_c [16], ob_u [16], ob_r [16], ob_d [16], ob_l [16], ob_out [16];
  logic ds_valid, ds_out_valid; pix_t ds_row0 [8], ds_row1 [8], ds_out [4];

  logic bi_start, bi_line_valid, bi_done; pix_t bi_line [48]; msea_t bi_value;
  int n_bi = 0, n_fs = 0;
  logic fs_frame_start, fs_valid, fs_out_valid, fs_frame_done; pix_t fs_seg [48];
  sum64_t fs_out_sums [6]; logic [8:0] fs_out_gx; logic [7:0] fs_out_gy;
  fruc_top dut (.*);

  int checks = 0, failures = 0;
  int n_accept = 0, n_reject = 0, n_refetch = 0, n_pair [2] = '{0, 0}, n_group = 0, n_mrf_change = 0;
  int n_map_max = 0, n_map_mean = 0, n_tiles = 0, n_label = 0, n_skip = 0, n_opp = 0, n_obmc = 0, n_ds = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- reference area for motion estimation ----------------
  int refp [AW][AW];
  function automatic int ref_at(int x, int y);
    return refp[BY + y][BX + x];
  endfunction

  task automatic load_m(input logic pair, input int cx, cy);
    for (int y = 0; y < 48; y++) begin
      @(negedge clk);
      m_we = 1; m_pair = pair; m_addr = 6'(y);
      for (int i = 0; i < 48; i++) m_wdata[8*i +: 8] = 8'(ref_at(cx - 8 + i, cy - 8 + y));
    end
    @(negedge clk) m_we = 0;
  endtask

  task automatic load_o(input logic pair);
    for (int gy = 0; gy < 36; gy++)
      for (int gx = 0; gx < 36; gx++) begin
        int s;
        s = 0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) s += ref_at(-128 + 8*gx + c, -128 + 8*gy + r);
        @(negedge clk);
        o_we = 1; o_pair = pair; o_bank = 4'(4*(gy%4) + gx%4);
        o_addr = 7'(9*(gy/4) + gx/4); o_wdata = 16'(s);
      end
    @(negedge clk) o_we = 0;
  endtask

  // DRAM read side: pop a window request from the job queue, refill, acknowledge
  logic cur_pair;
  initial begin
    fetch_done = 0; dram_req_pop = 0;
    forever begin
      @(negedge clk);
      if (dram_req_valid) begin
        int cx, cy;
        cx = int'($signed(dram_req_data[17:9]));
        cy = int'($signed(dram_req_data[8:0]));
        dram_req_pop = 1;
        @(negedge clk) dram_req_pop = 0;
        repeat (50) @(negedge clk);             // bus latency
        n_refetch++;
        load_m(cur_pair, cx, cy);
        fetch_done = 1;
        @(negedge clk) fetch_done = 0;
      end
    end
  end

  task automatic me_block(input int tx, ty, input int nb [6], input logic pair,
                          input int ex, ey, input bit erej);
    for (int j = 0; j < 16; j++) begin
      int s;
      s = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) s += ref_at(8*(j%4) + c + tx, 8*(j/4) + r + ty);
      me_cur_sums[j] = sum64_t'(s);
    end
    for (int i = 0; i < 3; i++) begin
      me_neigh_mv[i].x = MV_W'(nb[2*i]); me_neigh_mv[i].y = MV_W'(nb[2*i+1]);
    end
    #1;
    load_m(pair, int'(me_pred_mv.x), int'(me_pred_mv.y));
    load_o(pair);
    cur_pair = pair;
    @(negedge clk); me_start = 1; me_pp_sel = pair;
    @(negedge clk); me_start = 0;
    wait (me_done);
    @(negedge clk);
    chk(int'(me_mv.x) == ex && int'(me_mv.y) == ey, $sformatf("ME mv (%0d,%0d)", int'(me_mv.x), int'(me_mv.y)));
    chk(me_msea == 0, "ME msea");
    chk(me_rejected == erej, "ME rejection");
    if (me_rejected) n_reject++; else n_accept++;
    n_pair[pair]++;
  endtask

  initial begin
    int t0;
    me_start = 0; me_pp_sel = 0; m_we = 0; m_pair = 0; m_addr = 0; m_wdata = 0;
    o_we = 0; o_pair = 0; o_bank = 0; o_addr = 0; o_wdata = 0;
    foreach (me_neigh_mv[i]) me_neigh_mv[i] = '0;
    foreach (me_cur_sums[i]) me_cur_sums[i] = '0;
    mrf_start = 0; mrf_self_mv = '0;
    foreach (mrf_neigh_mv[i]) mrf_neigh_mv[i] = '0;
    foreach (mrf_msea[i]) mrf_msea[i] = '0;
    map_start = 0; map_cand_valid = 0; map_finish = 0; map_ib_x = 0; map_ib_y = 0;
    map_ex = 0; map_ey = 0; map_num = 1; map_den = 5; map_cand_mv = '0;
    imc_start = 0; imc_ready = 1; imc_ex = 0; imc_ey = 0; imc_ix = 0; imc_iy = 0; imc_sdx = 0; imc_sdy = 0;
    pp_start = 0; pp_self_mv = '0; pp_self_bi = '0; pp_neigh_valid = 0;
    foreach (pp_neigh_mv[i]) begin pp_neigh_mv[i] = '0; pp_neigh_bi[i] = '0; end
    ob_valid = 0; ob_y = 0; ob_x0 = 0; ds_valid = 0;
    fs_frame_start = 0; fs_valid = 0; foreach (fs_seg[i]) fs_seg[i] = 0;
    bi_start = 0; bi_line_valid = 0; foreach (bi_line[i]) bi_line[i] = 0;
    for (int i = 0; i < 16; i++) begin
      ob_c[i] = 0; ob_u[i] = 0; ob_r[i] = 0; ob_d[i] = 0; ob_l[i] = 0;
      be_resp_out[i] = 0; be_resp_in[i] = 0;
    end
    foreach (ds_row0[i]) begin ds_row0[i] = 0; ds_row1[i] = 0; end
    for (int y = 0; y < AW; y++)
      for (int x = 0; x < AW; x++) begin
        real v;
        v = 128.0 + 55.0 * $sin(x * 0.071) + 45.0 * $cos(y * 0.083 + x * 0.01);
        refp[y][x] = int'(v) + ((x * 7 + y * 13) % 11) - 5;
        if (refp[y][x] < 0) refp[y][x] = 0;
        if (refp[y][x] > 255) refp[y][x] = 255;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- down-sample: a 16x2 strip of the 4K frame ----
    for (int n = 0; n < 4; n++) begin
      @(negedge clk); ds_valid = 1;
      foreach (ds_row0[i]) begin ds_row0[i] = pix_t'(10 * n + i); ds_row1[i] = pix_t'(10 * n + i + 3); end
      @(negedge clk); ds_valid = 0;
      for (int i = 0; i < 4; i++)
        chk(ds_out_valid && int'(ds_out[i]) ==
            ((10*n+2*i) + (10*n+2*i+1) + (10*n+2*i+3) + (10*n+2*i+4) + 2) / 4, "down-sample");
      n_ds++;
    end

    // ---- motion estimation ----
    me_block(3, -2, '{2, -2, 4, -1, 3, -3}, 1'b0, 3, -2, 1'b0);
    me_block(-51, -40, '{-50, -39, -52, -41, -51, -40}, 1'b1, -51, -40, 1'b0);
    me_block(4, 23, '{33, -28, 30, -25, 35, -30}, 1'b0, 4, 23, 1'b1);
    me_block(4, 23, '{33, -28, 30, -25, 35, -30}, 1'b1, 4, 23, 1'b1);

    // ---- MRF: one outlier block among consistent neighbours ----
    for (int k = 0; k < 8; k++) begin
      mrf_neigh_mv[k].x = MV_W'(5 + (k % 2)); mrf_neigh_mv[k].y = MV_W'(5);
      mrf_msea[k] = 600;
    end
    mrf_self_mv.x = 40; mrf_self_mv.y = -30; mrf_msea[8] = 500;
    @(negedge clk); mrf_start = 1;
    @(negedge clk); mrf_start = 0;
    wait (mrf_valid);
    @(negedge clk);
    // neighbour k has discontinuity 4 (even k) or 4 (odd k) to the others; self has 8*~64
    chk(mrf_new_mv.x == 9'sd5 && mrf_new_mv.y == 9'sd5 && mrf_new_idx == 0, "MRF picks the neighbour MV");
    chk(grp1_valid && grp1_mask == 8'hff && !grp2_valid && nongroup_mask == 0, "MRF grouping");
    n_group += grp1_valid;
    n_mrf_change += (mrf_new_idx != 8);

    // ---- MV mapping: uniform motion (max rule), then a lone projection (mean rule) ----
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); map_start = 1; map_ib_x = 320; map_ib_y = 320; map_num = 2; map_den = 5;
      @(negedge clk); map_start = 0;
      for (int k = 0; k < 9; k++) begin
        map_cand_valid = (pass == 0) || (k == 4);
        map_ex = 14'(320 + 32 * (k % 3 - 1)); map_ey = 14'(320 + 32 * (k / 3 - 1));
        map_cand_mv.x = (pass == 0) ? 9'sd20 : 9'sd40;
        map_cand_mv.y = (pass == 0) ? -9'sd10 : 9'sd45;
        @(negedge clk);
      end
      map_cand_valid = 0; map_finish = 1;
      @(negedge clk); map_finish = 0;
      @(negedge clk);
      if (pass == 0) begin
        chk(map_valid && map_by_max && map_mv.x == 9'sd20 && map_mv.y == -9'sd10, "mapping max rule");
        n_map_max += map_by_max;
      end else begin
        // (40,45)*2/5 = (16,18): overlap 16x14 = 224 < 512 -> mean of the one MV
        chk(map_valid && !map_by_max && map_mv.x == 9'sd40 && map_mv.y == 9'sd45, "mapping mean rule");
        n_map_mean += !map_by_max;
      end
    end

    // ---- inverse MC: inter block half over the existing block ----
    @(negedge clk); imc_start = 1; imc_ex = 640; imc_ey = 512; imc_ix = 640; imc_iy = 512;
    imc_sdx = 32; imc_sdy = 0;
    @(negedge clk); imc_start = 0;
    t0 = 0;
    while (!imc_done) begin
      if (imc_tile_valid) begin
        t0++;
        chk(imc_dst_x == 14'(640 + int'(imc_src_x) - 32) && imc_cols == 8 && imc_rows == 2, "IMC tile");
      end
      @(negedge clk);
    end
    chk(t0 == 4 * 32, "IMC tile count");   // 32x64 region in 8x2 tiles
    n_tiles += t0;

    // ---- whole-frame 8x8 sums: the first band (8 lines of 40 segments) ----
    @(negedge clk) fs_frame_start = 1;
    @(negedge clk) fs_frame_start = 0;
    for (int y = 0; y < 8; y++)
      for (int sg = 0; sg < 40; sg++) begin
        for (int i = 0; i < 48; i++) fs_seg[i] = pix_t'((48 * sg + i + 5 * y) % 256);
        fs_valid = 1;
        @(negedge clk) fs_valid = 0;
        if (y == 7) begin
          chk(fs_out_valid && int'(fs_out_gx) == 6 * sg && fs_out_gy == 0, "8x8 sum position");
          for (int k = 0; k < 6; k++) begin
            int e;
            e = 0;
            for (int r = 0; r < 8; r++)
              for (int c = 0; c < 8; c++) e += (48 * sg + 8 * k + c + 5 * r) % 256;
            chk(int'(fs_out_sums[k]) == e, "8x8 sum value");
          end
          n_fs += fs_out_valid;
        end
      end

    // ---- bi-MSEA of a sub-block: forward block from the reference area,
    //      backward block the same area brightened by 3 in its top half ----
    @(negedge clk) bi_start = 1;
    @(negedge clk) bi_start = 0;
    for (int n = 0; n < 32; n++) begin
      for (int i = 0; i < 48; i++)
        bi_line[i] = pix_t'(i < 16 ? refp[40 + n % 16][60 + i] % 200 + ((n >= 16 && n % 16 < 8) ? 3 : 0) : 0);
      bi_line_valid = 1;
      @(negedge clk) bi_line_valid = 0;
    end
    t0 = 0;
    while (!bi_done && t0 < 20) begin @(negedge clk); t0++; end
    chk(bi_done && int'(bi_value) == 2 * 64 * 3, "bi-MSEA");   // two top cells differ by 64*3
    n_bi += bi_done;

    // ---- post-processing: unlabelled sub-block skips, labelled one searches ----
    pp_self_mv = '{x: 9'sd6, y: 9'sd0}; pp_self_bi = 300; pp_neigh_valid = 4'hf;
    for (int i = 0; i < 4; i++) begin pp_neigh_mv[i] = pp_self_mv; pp_neigh_bi[i] = 100; end
    @(negedge clk); pp_start = 1; #1;
    chk(pp_skip && !pp_label, "post-processing skip");
    n_skip += pp_skip;
    @(negedge clk); pp_start = 0;
    pp_neigh_mv[1] = '{x: 9'sd14, y: 9'sd2}; pp_self_bi = 900;
    @(negedge clk); pp_start = 1; #1;
    chk(pp_label && pp_init_mv.x == 9'sd14 && pp_init_mv.y == 9'sd2, "artifact label and initial MV");
    n_label += pp_label;
    @(negedge clk); pp_start = 0;
    // responses: boundary error = |mv - (-12, -4)| (L1) in the opposite window only
    fork
      begin
        while (!be_done) begin
          @(posedge clk);
          for (int j = 0; j < 16; j++) begin
            int e;
            e = be_req_win ? (int'(be_req_mv.x) + 12 < 0 ? -(int'(be_req_mv.x) + 12) : int'(be_req_mv.x) + 12) +
                             (int'(be_req_mv.y) + 4 < 0 ? -(int'(be_req_mv.y) + 4) : int'(be_req_mv.y) + 4)
                           : 60;
            be_resp_out[j] <= 8'd100;
            be_resp_in[j]  <= pix_t'(100 + (j == 0 ? e : 0));
          end
        end
      end
    join
    @(negedge clk);
    chk(be_best_win && be_best_mv.x == -9'sd12 && be_best_mv.y == -9'sd4 && be_best_be == 0, "bilateral search");
    n_opp += be_best_win;

    // ---- OBMC over one 32x32 sub-block ----
    for (int ln = 0; ln < 64; ln++) begin
      @(negedge clk); ob_valid = 1; ob_y = 5'(ln / 2); ob_x0 = 5'(16 * (ln % 2));
      for (int i = 0; i < 16; i++) begin ob_c[i] = 160; ob_u[i] = 0; ob_d[i] = 0; ob_l[i] = 0; ob_r[i] = 0; end
      @(negedge clk); ob_valid = 0;
      for (int i = 0; i < 16; i++) begin
        int xx, yy, w;
        xx = 16 * (ln % 2) + i; yy = ln / 2;
        w = 16;
        if (yy < 16) w -= (4 * (16 - yy)) / 16;
        if (31 - yy < 16) w -= (4 * (16 - (31 - yy))) / 16;
        if (xx < 16) w -= (4 * (16 - xx)) / 16;
        if (31 - xx < 16) w -= (4 * (16 - (31 - xx))) / 16;
        chk(ob_out_valid && int'(ob_out[i]) == 160 * w / 16, "OBMC");
      end
      n_obmc++;
    end

    // ---- every mechanism happened ----
    chk(n_accept > 0, "accepted predictor");
    chk(n_reject > 0, "rejected predictor / 8-step");
    chk(n_refetch > 0, "window refetch via job queue");
    chk(n_pair[0] > 0 && n_pair[1] > 0, "both ping-pong pairs");
    chk(n_group > 0 && n_mrf_change > 0, "grouping and MRF correction");
    chk(n_map_max > 0 && n_map_mean > 0, "both mapping rules");
    chk(n_tiles > 0, "inverse MC tiles");
    chk(n_label > 0 && n_skip > 0 && n_opp > 0, "labelling, skipping, opposite window");
    chk(n_obmc > 0 && n_ds > 0, "OBMC and down-sample");
    chk(n_bi > 0, "bi-MSEA");
    chk(n_fs > 0, "whole-frame 8x8 sums");
    $display("accept %0d reject %0d refetch %0d pairs %0d/%0d group %0d mrf %0d map %0d/%0d tiles %0d label %0d skip %0d opp %0d obmc %0d ds %0d bi %0d sum8x8 %0d",
             n_accept, n_reject, n_refetch, n_pair[0], n_pair[1], n_group, n_mrf_change, n_map_max, n_map_mean,
             n_tiles, n_label, n_skip, n_opp, n_obmc, n_ds, n_bi, n_fs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
