// me_engine: predictive square search motion estimation for one 32x32 block
// (1080p comparison grid) with the 8x8 MSEA matching criterion.
//
// Algorithm. The predictor is the component-wise median of three neighbouring
// block MVs. A 4-step square pattern (nine candidates) is evaluated around it;
// if the best candidate is the centre or its MSEA is below THRESHOLD, 2-step
// and 1-step patterns converge around the best one. Otherwise the predictor is
// rejected and 8-step patterns are evaluated from the origin, re-centred on the
// best candidate until the centre wins, followed by 4-, 2- and 1-step
// convergence.
//
// Datapath. 4/2/1-step patterns read the M window (48 lines x 48 pixels, +-8
// around the window centre, three 128-bit banks per line): one line per cycle
// goes through flex_sum_tree into msea_accum, then the nine candidates' 8x8
// sums go through sad_tree against the current block's 8x8 sums (cur_sums).
// 8-step patterns read the O window: the 8x8 sums of the reference frame over
// the whole +-128 range, a 36x36 grid of sums interleaved over 16 banks
// (bank = 4*(gy%4) + gx%4, address = 9*(gy/4) + gx/4), so the 16 sums of any
// 8-aligned candidate are read in one cycle and go straight to the SAD tree.
//
// Ping-pong. Two pairs of windows (M1/O1 and M2/O2) exist; pp_sel, latched at
// start, selects the pair searched while the loader fills the other pair for
// the next block. The loader fills the selected pair's M window around
// pred_mv (and its O window around the zero vector) before start. When an
// 8-step search moves the centre, the engine raises fetch_req with
// fetch_center and waits for fetch_done while the loader refills the M window
// of the active pair around fetch_center.
//
// Timing: a 4/2/1-step pattern takes (32 + 2*step) line cycles plus 9 SAD
// issue cycles plus 4 cycles of SAD tree latency plus one decision cycle.
// The first 8-step pattern of a block computes all nine candidates; when the
// square moves by one 8-step, the candidates it shares with the previous
// square keep their MSEA and only the 3 (straight move) or 5 (diagonal move)
// new ones are read and sent to the SAD tree, so a moved pattern takes 3 or 5
// issue cycles plus 8 cycles of set-up, O read, tree latency and decision.
//
// The search rule, the threshold of 1024, the window sizes, the bank counts
// and the 16-bank 8x8-sum interleave for one-cycle 8-step candidates follow
// the document, as does reusing the shared candidates of a moved 8-step
// square. The fetch handshake, the bank-address formula and the tie rule (the
// centre wins ties, then the lowest index) are this design's own choices.
// Lint note: rst_n also disables the assertion, which Verilator reports as a
// signal used both synchronously and asynchronously; the flops themselves use
// it only as an asynchronous reset.
module me_engine
  import fruc_pkg::*;
#(
  parameter int SEARCH_RANGE = 128,
  parameter int THRESHOLD    = 1024,
  parameter int MAX_8STEP    = 32      // bound on 8-step re-centring rounds
) (
  input  logic          clk,
  input  logic          rst_n,
  // block command
  input  logic          start,
  input  logic          pp_sel,
  input  mv_t           neigh_mv [3],
  input  sum64_t        cur_sums [16],
  output mv_t           pred_mv,
  output logic          busy,
  output logic          done,          // one-cycle pulse
  output mv_t           mv_out,
  output msea_t         msea_out,
  output logic          rejected,      // predictor was rejected for this block
  // window loading (Read receive side)
  input  logic          m_we,
  input  logic          m_pair,
  input  logic [5:0]    m_addr,
  input  logic [383:0]  m_wdata,       // 48 pixels, pixel i in bits 8i+7:8i
  input  logic          o_we,
  input  logic          o_pair,
  input  logic [3:0]    o_bank,
  input  logic [6:0]    o_addr,
  input  logic [15:0]   o_wdata,
  output logic          fetch_req,
  output mv_t           fetch_center,
  input  logic          fetch_done
);

  typedef enum logic [2:0] {PH_PRED4, PH_CONV4, PH_2, PH_1, PH_8} phase_e;
  typedef enum logic [2:0] {S_IDLE, S_LINES, S_SAD, S_COLLECT, S_DECIDE, S_FETCH} state_e;

  state_e  state;
  phase_e  phase;
  logic    pair;
  mv_t     center, win_center;
  logic [2:0]  step;       // 1, 2, 4; 8-step uses step_is8
  logic [5:0]  line_cnt;   // lines issued
  logic [3:0]  k_issue, k_got;
  logic [5:0]  rounds;
  msea_t   cand_msea [9];
  logic [8:0] need;       // candidates of this pattern still to be computed

  // next candidate index >= from that must be computed (9: none)
  function automatic logic [3:0] next_need(logic [8:0] nd, int from);
    for (int k = 0; k < 9; k++)
      if (k >= from && nd[k]) return 4'(k);
    return 4'd9;
  endfunction

  // ---------------- median predictor ----------------
  function automatic logic signed [MV_W-1:0] med3(logic signed [MV_W-1:0] a,
                                                  logic signed [MV_W-1:0] b,
                                                  logic signed [MV_W-1:0] c);
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction

  assign pred_mv.x = med3(neigh_mv[0].x, neigh_mv[1].x, neigh_mv[2].x);
  assign pred_mv.y = med3(neigh_mv[0].y, neigh_mv[1].y, neigh_mv[2].y);

  // ---------------- window memories ----------------
  logic [383:0] m_rdata [2];
  logic [15:0]  o_rdata [2][16];
  logic         m_rd_en, o_rd_en;
  logic [5:0]   m_rd_addr;
  logic [6:0]   o_rd_addr [16];

  for (genvar pp = 0; pp < 2; pp++) begin : g_pair
    for (genvar bk = 0; bk < 3; bk++) begin : g_m
      logic wr;
      assign wr = m_we && (m_pair == pp[0]);
      sram_sp #(.DEPTH(48), .WIDTH(128)) u_m (
        .clk, .en(wr || (m_rd_en && pair == pp[0])), .we(wr),
        .addr(wr ? m_addr : m_rd_addr),
        .wdata(m_wdata[128*bk +: 128]), .rdata(m_rdata[pp][128*bk +: 128]));
    end
    for (genvar bk = 0; bk < 16; bk++) begin : g_o
      logic wr;
      assign wr = o_we && (o_pair == pp[0]) && (o_bank == bk[3:0]);
      sram_sp #(.DEPTH(84), .WIDTH(16)) u_o (
        .clk, .en(wr || (o_rd_en && pair == pp[0])), .we(wr),
        .addr(wr ? o_addr : o_rd_addr[bk]),
        .wdata(o_wdata), .rdata(o_rdata[pp][bk]));
    end
  end

  // ---------------- candidate geometry ----------------
  function automatic logic signed [MV_W-1:0] offs(int j, logic [3:0] s);
    return MV_W'((j - 1) * int'(s));
  endfunction

  logic [3:0] step_v;
  assign step_v = (phase == PH_8) ? 4'd8 : {1'b0, step};

  mv_t cand [9];
  logic cand_ok [9];
  always_comb
    for (int k = 0; k < 9; k++) begin
      cand[k].x = center.x + offs(k % 3, step_v);
      cand[k].y = center.y + offs(k / 3, step_v);
      cand_ok[k] = (int'(cand[k].x) >= -SEARCH_RANGE) && (int'(cand[k].x) <= SEARCH_RANGE) &&
                   (int'(cand[k].y) >= -SEARCH_RANGE) && (int'(cand[k].y) <= SEARCH_RANGE);
    end

  logic signed [4:0] cx, cy;
  assign cx = 5'(center.x - win_center.x);
  assign cy = 5'(center.y - win_center.y);

  logic [5:0] first_line, n_lines, top;
  assign top        = 6'(8 + int'(cy));
  assign first_line = 6'(int'(top) - int'(step));
  assign n_lines    = 6'(32 + 2 * int'(step));

  // ---------------- M path: lines -> sum-trees -> accumulators ----------------
  logic        line_vld_d;
  logic [5:0]  line_y_d;
  pix_t        line_pix [48];
  sum8_t       s8 [3][4];
  sum64_t      acc [9][16];
  logic        acc_clear;

  always_comb
    for (int i = 0; i < 48; i++) line_pix[i] = m_rdata[pair][8*i +: 8];

  flex_sum_tree u_fst (.line(line_pix), .step(step), .cx(cx), .plain(1'b0), .sum8(s8));

  msea_accum u_acc (.clk, .clear(acc_clear), .in_valid(line_vld_d), .y(line_y_d),
                    .top(top), .step(step), .sum8(s8), .sums(acc));

  // ---------------- O path: 8x8 sums of an 8-aligned candidate ----------------
  logic [5:0] gx0, gy0;    // grid cell of the candidate's first 8x8 sum
  always_comb begin
    gx0 = 6'((int'(cand[k_issue].x) + SEARCH_RANGE) / 8);
    gy0 = 6'((int'(cand[k_issue].y) + SEARCH_RANGE) / 8);
    for (int b = 0; b < 16; b++) o_rd_addr[b] = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int gx, gy;
        gx = int'(gx0) + c;
        gy = int'(gy0) + r;
        o_rd_addr[4 * (gy % 4) + (gx % 4)] = 7'(9 * (gy / 4) + gx / 4);
      end
  end

  logic        o_vld_d;
  logic [5:0]  gx0_d, gy0_d;

  // ---------------- SAD tree ----------------
  logic        sad_in_vld, sad_out_vld;
  sum64_t      sad_b [16];
  logic [17:0] sad_res;

  always_comb begin
    for (int j = 0; j < 16; j++) begin
      int gx, gy;
      gx = int'(gx0_d) + j % 4;
      gy = int'(gy0_d) + j / 4;
      if (phase == PH_8) sad_b[j] = o_rdata[pair][4 * (gy % 4) + (gx % 4)][S64_W-1:0];
      else               sad_b[j] = acc[k_issue][j];
    end
  end

  assign sad_in_vld = (phase == PH_8) ? o_vld_d : (state == S_SAD && k_issue < 9);

  sad_tree #(.IN_W(S64_W), .OUT_W(MSEA_W)) u_sad (
    .clk, .rst_n, .in_valid(sad_in_vld), .mode_abs(1'b1),
    .a(cur_sums), .b(sad_b), .out_valid(sad_out_vld), .result(sad_res));

  // k index of the candidate whose result comes out of the SAD tree
  // (results arrive in issue order)

  // ---------------- best-candidate selection ----------------
  int    best_k;
  msea_t best_v;
  always_comb begin
    best_k = CENTER;
    best_v = cand_msea[CENTER];
    for (int k = 0; k < 9; k++)
      if (cand_msea[k] < best_v) begin
        best_k = k;
        best_v = cand_msea[k];
      end
  end

  // 8-step reuse: candidate k of the square moved onto best_k is candidate
  // (k + best_k - CENTER) of the current square when it lies inside it
  logic [8:0] shared;
  msea_t      shared_msea [9];
  always_comb
    for (int k = 0; k < 9; k++) begin
      int ox, oy;
      ox = k % 3 + best_k % 3 - 1;
      oy = k / 3 + best_k / 3 - 1;
      shared[k]      = (ox >= 0 && ox < 3 && oy >= 0 && oy < 3);
      shared_msea[k] = shared[k] ? cand_msea[3 * oy + ox] : '1;
    end

  // ---------------- control ----------------
  assign m_rd_en = (state == S_LINES) && (line_cnt < n_lines);
  assign m_rd_addr = first_line + line_cnt;
  assign o_rd_en = (state == S_SAD) && (phase == PH_8) && (k_issue < 9);
  assign acc_clear = (state == S_IDLE) || (state == S_DECIDE) || (state == S_FETCH);
  assign busy = (state != S_IDLE);
  assign fetch_req = (state == S_FETCH);
  assign fetch_center = center;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= PH_PRED4;
      pair       <= 1'b0;
      center     <= '0;
      win_center <= '0;
      step       <= 3'd4;
      line_cnt   <= '0;
      k_issue    <= '0;
      k_got      <= '0;
      rounds     <= '0;
      done       <= 1'b0;
      mv_out     <= '0;
      msea_out   <= '0;
      rejected   <= 1'b0;
      line_vld_d <= 1'b0;
      line_y_d   <= '0;
      o_vld_d    <= 1'b0;
      gx0_d      <= '0;
      gy0_d      <= '0;
      for (int k = 0; k < 9; k++) cand_msea[k] <= '1;
      need       <= '1;
    end else begin
      done       <= 1'b0;
      line_vld_d <= m_rd_en;
      line_y_d   <= m_rd_addr;
      o_vld_d    <= o_rd_en;
      gx0_d      <= gx0;
      gy0_d      <= gy0;
      if (sad_out_vld) begin
        cand_msea[k_got] <= cand_ok[k_got] ? sad_res : '1;
        k_got <= next_need(need, int'(k_got) + 1);
      end
      unique case (state)
        S_IDLE: if (start) begin
          pair       <= pp_sel;
          center     <= pred_mv;
          win_center <= pred_mv;
          step       <= 3'd4;
          phase      <= PH_PRED4;
          rejected   <= 1'b0;
          rounds     <= '0;
          line_cnt   <= '0;
          state      <= S_LINES;
        end
        S_LINES: begin
          if (phase == PH_8) begin
            k_issue <= next_need(need, 0);
            k_got   <= next_need(need, 0);
            state   <= S_SAD;
          end else if (line_cnt < n_lines) begin
            line_cnt <= line_cnt + 6'd1;
          end else begin
            // last line was accumulated on this edge
            k_issue <= '0;
            k_got   <= '0;
            state   <= S_SAD;
          end
        end
        S_SAD: begin
          if (k_issue < 9) k_issue <= next_need(need, int'(k_issue) + 1);
          else             state   <= S_COLLECT;
        end
        S_COLLECT: if (k_got == 4'd9 && !sad_out_vld) state <= S_DECIDE;
        S_DECIDE: begin
          line_cnt <= '0;
          k_issue  <= '0;
          need     <= '1;
          unique case (phase)
            PH_PRED4: begin
              if (best_k == CENTER || best_v < msea_t'(THRESHOLD)) begin
                center <= cand[best_k];
                step   <= 3'd2;
                phase  <= PH_2;
                state  <= S_LINES;
              end else begin
                rejected <= 1'b1;
                center   <= '0;
                phase    <= PH_8;
                state    <= S_LINES;
              end
            end
            PH_CONV4: begin
              center <= cand[best_k];
              step   <= 3'd2;
              phase  <= PH_2;
              state  <= S_LINES;
            end
            PH_2: begin
              center <= cand[best_k];
              step   <= 3'd1;
              phase  <= PH_1;
              state  <= S_LINES;
            end
            PH_1: begin
              mv_out   <= cand[best_k];
              msea_out <= best_v;
              done     <= 1'b1;
              state    <= S_IDLE;
            end
            PH_8: begin
              if (best_k != CENTER && rounds < 6'(MAX_8STEP - 1)) begin
                center <= cand[best_k];
                rounds <= rounds + 6'd1;
                state  <= S_LINES;
                // keep the results of candidates the moved square shares
                // with this one; only the 3 or 5 new ones are computed
                for (int k = 0; k < 9; k++)
                  if (shared[k]) cand_msea[k] <= shared_msea[k];
                need <= ~shared;
              end else begin
                center <= cand[best_k];
                state  <= S_FETCH;
              end
            end
            default: state <= S_IDLE;
          endcase
        end
        S_FETCH: if (fetch_done) begin
          win_center <= center;
          step       <= 3'd4;
          phase      <= PH_CONV4;
          state      <= S_LINES;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The loader may only write the pair being searched while a fetch is open.
  a_no_write_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && state != S_FETCH) |-> !(m_we && m_pair == pair));

endmodule
