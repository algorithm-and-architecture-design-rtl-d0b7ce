// tb_me_engine: runs the predictive square search on a synthetic reference
// area (two crossed sinusoids plus a hashed texture) for blocks displaced by
// known motion vectors. The testbench plays the window loader: it fills the
// M window (pixels +-8 around a centre) and the O window (8x8 sums over the
// +-128 range) of the selected ping-pong pair, and serves refetch requests.
// A behavioural model of the search, computing every 8x8 MSEA straight from
// pixels, gives the expected MV, MSEA and predictor-rejection flag. Cases
// cover an accepted predictor, a rejected predictor with 8-step re-estimation
// and refetch, and random cases. The cycle count of an accepted-predictor
// block (4-, 2- and 1-step patterns) is checked against a budget of 164
// cycles (the document's 149 plus one handshake cycle per pattern). Each
// 8-step pattern is watched as well: the first one of a block computes all 9
// candidates, every moved one only the 3 (straight move) or 5 (diagonal move)
// candidates it does not share with the previous square, and a pattern takes
// at most its SAD issues + 8 cycles (set-up, O read, 4 tree latency,
// collect and decision). Finally the mean block time for a 60/40 mix of
// accepted and rejected predictors is held against 266 cycles per block.
module tb_me_engine;
  import fruc_pkg::*;
  localparam int BX = 136, BY = 136;    // block position inside the area
  localparam int AW = 320;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, pp_sel, busy, done, rejected;
  mv_t neigh_mv [3], pred_mv, mv_out, fetch_center;
  sum64_t cur_sums [16];
  msea_t msea_out;
  logic m_we, m_pair, o_we, o_pair, fetch_req, fetch_done;
  logic [5:0] m_addr;
  logic [383:0] m_wdata;
  logic [3:0] o_bank;
  logic [6:0] o_addr;
  logic [15:0] o_wdata;
  int checks = 0, failures = 0;
  int n_reject = 0, n_accept = 0, n_fetch = 0;
  int cyc_accept = 0, cyc_reject = 0;   // summed block cycles per outcome

  me_engine dut (.*);

  // 8-step pattern monitor
  int n8_issue = 0, n8_cyc = 0, n8_moved = 0;
  always @(posedge clk) begin
    if (dut.phase == dut.PH_8 && dut.state != dut.S_IDLE && dut.state != dut.S_FETCH) begin
      n8_cyc++;
      if (dut.o_rd_en) n8_issue++;
      if (dut.state == dut.S_DECIDE) begin
        checks++;
        if (dut.rounds == 0 ? n8_issue != 9 : (n8_issue != 3 && n8_issue != 5)) begin
          failures++;
          $display("8-step pattern computed %0d candidates (round %0d)", n8_issue, dut.rounds);
        end
        checks++;
        if (n8_cyc > n8_issue + 8) begin
          failures++;
          $display("8-step pattern took %0d cycles for %0d candidates", n8_cyc, n8_issue);
        end
        if (dut.rounds != 0) n8_moved++;
        n8_issue = 0; n8_cyc = 0;
      end
    end
  end

  int refp [AW][AW];
  int cur [32][32];

  function automatic int ref_at(int x, int y);   // block-relative coordinates
    return refp[BY + y][BX + x];
  endfunction

  function automatic int msea_of(int mx, int my);
    int s;
    if (mx < -128 || mx > 128 || my < -128 || my > 128) return 32'h3ffff;
    s = 0;
    for (int j = 0; j < 16; j++) begin
      int a, b;
      a = 0; b = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          a += cur[8*(j/4) + r][8*(j%4) + c];
          b += ref_at(mx + 8*(j%4) + c, my + 8*(j/4) + r);
        end
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  // one square pattern: returns best position and value (centre wins ties)
  task automatic pattern(input int cx, cy, s, output int bx, by, bv, bk);
    bk = 4; bx = cx; by = cy; bv = msea_of(cx, cy);
    for (int k = 0; k < 9; k++) begin
      int v;
      v = msea_of(cx + (k%3 - 1)*s, cy + (k/3 - 1)*s);
      if (v < bv) begin bv = v; bx = cx + (k%3 - 1)*s; by = cy + (k/3 - 1)*s; bk = k; end
    end
  endtask

  function automatic int med(int a, int b, int c);
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction

  task automatic model(input int px, py, output int mx, my, mv, rej);
    int bx, by, bv, bk, cx, cy;
    rej = 0;
    pattern(px, py, 4, bx, by, bv, bk);
    if (!(bk == 4 || bv < 1024)) begin
      rej = 1; cx = 0; cy = 0;
      for (int r = 0; r < 32; r++) begin
        pattern(cx, cy, 8, bx, by, bv, bk);
        cx = bx; cy = by;
        if (bk == 4) break;
      end
      pattern(cx, cy, 4, bx, by, bv, bk);
    end
    pattern(bx, by, 2, bx, by, bv, bk);
    pattern(bx, by, 1, bx, by, bv, bk);
    mx = bx; my = by; mv = bv;
  endtask

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

  // refetch server: refill the active pair's M window, then acknowledge
  initial begin
    fetch_done = 0;
    forever begin
      @(posedge clk);
      if (fetch_req) begin
        n_fetch++;
        load_m(dut.pair, int'(fetch_center.x), int'(fetch_center.y));
        fetch_done = 1;
        @(negedge clk) fetch_done = 0;
      end
    end
  end

  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_block(input int tx, ty, input int nb [6], input logic pair, input bit timed);
    int ex, ey, ev, er, px, py, t0, t1;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) cur[r][c] = ref_at(c + tx, r + ty);
    for (int j = 0; j < 16; j++) begin
      int s;
      s = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) s += cur[8*(j/4) + r][8*(j%4) + c];
      cur_sums[j] = sum64_t'(s);
    end
    for (int i = 0; i < 3; i++) begin
      neigh_mv[i].x = MV_W'(nb[2*i]); neigh_mv[i].y = MV_W'(nb[2*i+1]);
    end
    px = med(nb[0], nb[2], nb[4]); py = med(nb[1], nb[3], nb[5]);
    load_m(pair, px, py);
    load_o(pair);
    model(px, py, ex, ey, ev, er);
    @(negedge clk); start = 1; pp_sel = pair;
    t0 = $time;
    @(negedge clk); start = 0;
    wait (done);
    t1 = $time;
    @(negedge clk);
    checks++; if (int'(mv_out.x) != ex || int'(mv_out.y) != ey) failures++;
    checks++; if (int'(msea_out) != ev) failures++;
    checks++; if (int'(rejected) != er) failures++;
    if (er) begin n_reject++; cyc_reject += (t1 - t0) / 10; end
    else    begin n_accept++; cyc_accept += (t1 - t0) / 10; end
    $display("true (%0d,%0d) pred (%0d,%0d) -> (%0d,%0d) msea %0d rej %0d | model (%0d,%0d) %0d %0d  cycles %0d",
             tx, ty, px, py, int'(mv_out.x), int'(mv_out.y), msea_out, rejected, ex, ey, ev, er, (t1 - t0) / 10);
    if (timed) begin
      checks++;
      if ((t1 - t0) / 10 > 164) failures++;
    end
  endtask

  initial begin
    start = 0; pp_sel = 0; m_we = 0; o_we = 0; m_pair = 0; o_pair = 0;
    m_addr = 0; m_wdata = 0; o_bank = 0; o_addr = 0; o_wdata = 0;
    foreach (neigh_mv[i]) neigh_mv[i] = '0;
    foreach (cur_sums[i]) cur_sums[i] = '0;
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
    // accepted predictor: neighbours agree with the motion
    run_block(3, -2, '{2, -2, 4, -1, 3, -3}, 1'b0, 1'b1);
    run_block(-5, 6, '{-4, 5, -5, 7, -6, 6}, 1'b1, 1'b1);
    // predictor far from the motion: re-estimation from the origin
    run_block(40, -24, '{-90, 80, -88, 82, -92, 79}, 1'b0, 1'b0);
    run_block(-17, 33, '{100, 100, 101, 99, 102, 98}, 1'b1, 1'b0);
    for (int n = 0; n < 6; n++) begin
      int tx, ty, nb [6];
      tx = int'($urandom % 161) - 80; ty = int'($urandom % 161) - 80;
      foreach (nb[i]) nb[i] = (n % 2) ? int'($urandom % 161) - 80 : ((i % 2) ? ty : tx) + int'($urandom % 5) - 2;
      run_block(tx, ty, nb, 1'(n), 1'b0);
    end
    checks++; if (n_reject == 0 || n_accept == 0 || n_fetch == 0 || n8_moved == 0) failures++;
    // frame budget: with 60% accepted and 40% rejected predictors a block may
    // take 266 cycles on average (window reloads by this testbench included)
    begin
      int avg;
      avg = (6 * cyc_accept / n_accept + 4 * cyc_reject / n_reject) / 10;
      checks++; if (avg > 266) failures++;
      $display("mean cycles per block at 60%% accepted / 40%% rejected: %0d", avg);
    end
    $display("accepted %0d rejected %0d refetches %0d moved 8-step patterns %0d",
             n_accept, n_reject, n_fetch, n8_moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
