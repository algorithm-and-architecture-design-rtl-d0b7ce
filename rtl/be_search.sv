// be_search: bilateral motion vector refinement of one labelled 16x16
// sub-block with the boundary-error criterion.
//
// Two search windows are opened, one around the initial MV and one around its
// opposite (for occluded areas); each holds the even points of +-RANGE, i.e.
// (RANGE+1)^2 = 81 candidates for RANGE = 8. For a candidate the boundary
// error is the sum of absolute differences between the 64 pixels just outside
// the sub-block in the inter-frame and the 64 boundary pixels inside the block
// the candidate points to. The boundary is split into four 16-pixel parts
// (top, bottom, left, right). Every cycle the unit requests one part of one
// candidate (req_*); the pixel buffer answers one cycle later with the 16
// outside and 16 inside pixels (resp_*), which go through a 16-input SAD tree
// (16 absolute differences per cycle, 4-cycle latency). The candidate with the
// least boundary error wins; on a tie the first one searched is kept.
// Timing: 2 x 81 x 4 = 648 request cycles, done about 7 cycles after the last.
// Window shape, even-point search, the throughput of 16 differences per cycle
// and the 648-cycle figure follow the document; the request/response
// interface and candidate order (window 0 first, raster order) are this
// design's choices.
module be_search
  import fruc_pkg::*;
#(
  parameter int RANGE = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mv_t         init_mv,
  output logic        req_valid,
  output logic        req_win,       // 0: around init_mv, 1: around -init_mv
  output mv_t         req_mv,
  output logic [1:0]  req_part,      // 0 top, 1 bottom, 2 left, 3 right
  input  pix_t        resp_out [16], // outside pixels (inter-frame)
  input  pix_t        resp_in  [16], // inside pixels (existing frame)
  output logic        busy,
  output logic        done,
  output mv_t         best_mv,
  output logic        best_win,
  output logic [13:0] best_be
);

  localparam int NP = RANGE + 1;     // points per axis

  logic       run, rvld;
  mv_t        ctr;
  logic       win;
  logic [4:0] ix, iy;                // point index per axis
  logic [1:0] part;
  logic       last_req;

  assign req_valid = run;
  assign req_win   = win;
  assign req_part  = part;
  assign req_mv.x  = ctr.x + MV_W'(2 * int'(ix) - RANGE);
  assign req_mv.y  = ctr.y + MV_W'(2 * int'(iy) - RANGE);
  assign last_req  = win && ix == 5'(NP - 1) && iy == 5'(NP - 1) && part == 2'd3;

  // request bookkeeping travels beside the SAD tree
  typedef struct packed { logic last_part; logic win; mv_t mv; logic last; } tag_t;
  tag_t tag_q [6];

  pix_t       a16 [16], b16 [16];
  logic       sad_vld;
  logic [11:0] sad_res;
  assign a16 = resp_out;
  assign b16 = resp_in;

  sad_tree #(.IN_W(8), .OUT_W(12)) u_sad (
    .clk, .rst_n, .in_valid(rvld), .mode_abs(1'b1), .a(a16), .b(b16),
    .out_valid(sad_vld), .result(sad_res));

  logic [13:0] be_acc, tot;
  assign tot = be_acc + 14'(sad_res);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      run <= 1'b0; rvld <= 1'b0; done <= 1'b0;
      ctr <= '0; win <= 1'b0; ix <= '0; iy <= '0; part <= '0;
      be_acc <= '0; best_mv <= '0; best_win <= 1'b0; best_be <= '1;
      for (int i = 0; i < 6; i++) tag_q[i] <= '0;
    end else begin
      done <= 1'b0;
      rvld <= run;
      // tag pipeline: [0] at response, [1..4] inside the SAD tree
      tag_q[0] <= '{last_part: (part == 2'd3), win: win, mv: req_mv, last: last_req};
      for (int i = 1; i < 6; i++) tag_q[i] <= tag_q[i-1];

      if (start && !run) begin
        run <= 1'b1;
        ctr <= init_mv;
        win <= 1'b0;
        ix <= '0; iy <= '0; part <= '0;
        be_acc <= '0;
        best_be <= '1;
      end else if (run) begin
        part <= part + 2'd1;
        if (part == 2'd3) begin
          if (ix == 5'(NP - 1)) begin
            ix <= '0;
            if (iy == 5'(NP - 1)) begin
              iy <= '0;
              if (win) run <= 1'b0;
              else begin
                win <= 1'b1;
                ctr.x <= -init_mv.x;
                ctr.y <= -init_mv.y;
              end
            end else iy <= iy + 5'd1;
          end else ix <= ix + 5'd1;
        end
      end

      // result side: tag_q[4] matches the SAD tree output
      if (sad_vld) begin
        if (tag_q[4].last_part) begin
          be_acc <= '0;
          if (tot < best_be) begin
            best_be  <= tot;
            best_mv  <= tag_q[4].mv;
            best_win <= tag_q[4].win;
          end
          if (tag_q[4].last) done <= 1'b1;
        end else be_acc <= tot;
      end
    end

  assign busy = run;

endmodule
