// mv_mapper: block-based through motion vector mapping for one inter block.
//
// Existing blocks are projected along their MVs to the inter-frame time
// phase = num/den (for example 1/5 .. 4/5 between 24 Hz frames), giving a
// displaced square at (ex + mv.x*num/den, ey + mv.y*num/den). For every
// projected block presented (cand_valid, one per cycle) the overlap area with
// the inter block is computed (overlap_calc) and added to the table entry of
// its MV, so the same MV projected from several blocks accumulates its area.
// On finish the MV with the largest total area is chosen when that area
// exceeds half the block (AREA_HALF = 512 for 32x32); otherwise the inter
// block takes the area-weighted mean of all projected MVs (zero MV when
// nothing overlaps). out_valid pulses two cycles after finish.
// Projection, area accumulation per MV and the 512 rule follow the document.
// The fallback (area-weighted mean), the projection rounding (toward zero),
// the table size and the order in which the caller presents blocks are this
// design's choices.
// Lint note: the overlap helper also outputs the rectangle's corners and
// sides, which the inverse MC walker needs but the mapper does not; only the
// area is used here, so those outputs are left unread.
module mv_mapper
  import fruc_pkg::*;
#(
  parameter int BLK       = 32,
  parameter int AREA_HALF = 512,
  parameter int NTAB      = 16,
  parameter int CW        = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,       // clears the table
  input  logic signed [CW-1:0] ib_x, ib_y,  // inter block position
  input  logic signed [3:0]    num,         // time phase numerator (signed)
  input  logic [3:0]           den,         // time phase denominator
  input  logic                 cand_valid,
  input  logic signed [CW-1:0] ex, ey,      // existing block position
  input  mv_t                  cand_mv,
  input  logic                 finish,
  output logic                 out_valid,
  output mv_t                  out_mv,
  output logic                 out_by_max,  // chosen by the > AREA_HALF rule
  output logic [2*CW-1:0]      out_area     // largest accumulated area
);

  logic signed [CW-1:0] px, py;
  logic signed [CW-1:0] x0, y0, x1, y1;
  logic [CW-1:0]        w, h;
  logic [2*CW-1:0]      area;

  assign px = ex + CW'((int'(cand_mv.x) * int'(num)) / int'(den));
  assign py = ey + CW'((int'(cand_mv.y) * int'(num)) / int'(den));

  overlap_calc #(.A_SIZE(BLK), .B_SIZE(BLK), .CW(CW)) u_ov (
    .ax(px), .ay(py), .bx(ib_x), .by(ib_y),
    .x0, .y0, .x1, .y1, .w, .h, .area);

  mv_t             t_mv   [NTAB];
  logic [2*CW-1:0] t_area [NTAB];
  logic [NTAB-1:0] t_used;
  logic            fin_d;

  int hit, free_i;
  always_comb begin
    hit = -1;
    free_i = -1;
    for (int i = NTAB - 1; i >= 0; i--) begin
      if (t_used[i] && t_mv[i] == cand_mv) hit = i;
      if (!t_used[i]) free_i = i;
    end
  end

  // selection over the table
  int              mx_i;
  logic [2*CW-1:0] mx_a, sum_a;
  logic signed [47:0] sum_x, sum_y;
  always_comb begin
    mx_i = 0;
    mx_a = '0;
    sum_a = '0;
    sum_x = '0;
    sum_y = '0;
    for (int i = 0; i < NTAB; i++)
      if (t_used[i]) begin
        if (t_area[i] > mx_a) begin
          mx_a = t_area[i];
          mx_i = i;
        end
        sum_a = sum_a + t_area[i];
        sum_x = sum_x + 48'(signed'({1'b0, t_area[i]})) * 48'(t_mv[i].x);
        sum_y = sum_y + 48'(signed'({1'b0, t_area[i]})) * 48'(t_mv[i].y);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      t_used     <= '0;
      fin_d      <= 1'b0;
      out_valid  <= 1'b0;
      out_mv     <= '0;
      out_by_max <= 1'b0;
      out_area   <= '0;
      for (int i = 0; i < NTAB; i++) begin
        t_mv[i]   <= '0;
        t_area[i] <= '0;
      end
    end else begin
      fin_d     <= finish;
      out_valid <= fin_d;
      if (start) t_used <= '0;
      else if (cand_valid && area != '0) begin
        if (hit >= 0) t_area[hit] <= t_area[hit] + area;
        else if (free_i >= 0) begin
          t_used[free_i] <= 1'b1;
          t_mv[free_i]   <= cand_mv;
          t_area[free_i] <= area;
        end
      end
      if (fin_d) begin
        out_area <= mx_a;
        if (mx_a > (2*CW)'(AREA_HALF)) begin
          out_mv     <= t_mv[mx_i];
          out_by_max <= 1'b1;
        end else begin
          out_by_max <= 1'b0;
          if (sum_a == '0) out_mv <= '0;
          else begin
            out_mv.x <= MV_W'(sum_x / signed'({1'b0, 20'(sum_a)}));
            out_mv.y <= MV_W'(sum_y / signed'({1'b0, 20'(sum_a)}));
          end
        end
      end
    end

endmodule
