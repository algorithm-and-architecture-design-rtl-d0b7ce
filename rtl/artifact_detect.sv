// artifact_detect: precise block-artifact detection for one 16x16 sub-block
// of an inter-frame, and its initial motion vector.
//
// A neighbour n (up, right, down, left) raises the condition when the MVs are
// discontinuous, |dx| > 2 or |dy| > 2, and the sub-block's bilateral MSEA
// (bi-MSEA, the 8x8 MSEA between the two blocks its MV and the opposite MV
// point to) is larger than the neighbour's, so that of two blocks sharing one
// discontinuity only the less reliable one is labelled. A sub-block with any
// condition raised is labelled for post-processing. Its initial MV is its own
// MV when its bi-MSEA is below BI_LIMIT, otherwise the mean of the MVs of the
// neighbours whose condition is raised (component-wise, rounded toward zero).
// Neighbours in the same 32x32 block share its MV and never raise the
// condition. Combinational.
// The two conditions and the 512 limit follow the document; equal weights in
// the neighbour mean are this design's choice.
module artifact_detect
  import fruc_pkg::*;
#(
  parameter int MV_GAP   = 2,
  parameter int BI_LIMIT = 512
) (
  input  mv_t         self_mv,
  input  msea_t       self_bi,
  input  mv_t         neigh_mv [4],
  input  msea_t       neigh_bi [4],
  input  logic [3:0]  neigh_valid,     // neighbour exists (frame border)
  output logic [3:0]  cond,
  output logic        label,
  output mv_t         init_mv
);

  always_comb begin
    int sx, sy, n;
    sx = 0; sy = 0; n = 0;
    for (int i = 0; i < 4; i++) begin
      cond[i] = neigh_valid[i] &&
                (int'(mv_absdiff(self_mv.x, neigh_mv[i].x)) > MV_GAP ||
                 int'(mv_absdiff(self_mv.y, neigh_mv[i].y)) > MV_GAP) &&
                (self_bi > neigh_bi[i]);
      if (cond[i]) begin
        sx += int'(neigh_mv[i].x);
        sy += int'(neigh_mv[i].y);
        n++;
      end
    end
    label = |cond;
    if (self_bi < msea_t'(BI_LIMIT) || n == 0) init_mv = self_mv;
    else begin
      init_mv.x = MV_W'(sx / n);
      init_mv.y = MV_W'(sy / n);
    end
  end

endmodule
