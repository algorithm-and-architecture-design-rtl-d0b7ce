// obmc_blend: overlapped block motion compensation of a labelled sub-block,
// one 16x1 pixel line per cycle.
//
// For each pixel the five predictions fetched with the sub-block's own MV and
// with the MVs of its up, right, down and left neighbours are weighted and
// summed, and the sum is divided by 16. The neighbour maps fall off from the
// matching edge over half the sub-block: w_up(y) = 4*(H-y)/H for y < H
// (H = SIZE/2), zero below, and mirrored for down, left and right. The
// centre map takes the rest, 16 - (w_up + w_down + w_left + w_right), so it
// is 16 inside and falls to 8 at the corners. Up/down/centre weights depend
// on the row (variable multipliers), left/right weights only on the column
// (constant multipliers per lane).
// Interface: in_valid with row y and first column x0 of the line; out_valid
// and the blended line follow one cycle later.
// The five-MV scheme, the edge-descending neighbour maps, the centre map
// descending from inside and the division by 16 follow the document; the
// exact weight values are this design's own choice.
module obmc_blend
  import fruc_pkg::*;
#(
  parameter int SIZE = 32            // sub-block size on the 3840x2160 grid
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [$clog2(SIZE)-1:0] y,
  input  logic [$clog2(SIZE)-1:0] x0,
  input  pix_t        p_c [16],
  input  pix_t        p_u [16],
  input  pix_t        p_r [16],
  input  pix_t        p_d [16],
  input  pix_t        p_l [16],
  output logic        out_valid,
  output pix_t        p_out [16]
);

  localparam int H = SIZE / 2;

  function automatic int w_edge(int d_e);
    return (d_e < H) ? (4 * (H - d_e)) / H : 0;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

  always_ff @(posedge clk)
    if (in_valid)
      for (int i = 0; i < 16; i++) begin
        int x, wu, wd, wl, wr, wc, acc;
        x  = int'(x0) + i;
        wu = w_edge(int'(y));
        wd = w_edge(SIZE - 1 - int'(y));
        wl = w_edge(x);
        wr = w_edge(SIZE - 1 - x);
        wc = 16 - wu - wd - wl - wr;
        acc = wc * int'(p_c[i]) + wu * int'(p_u[i]) + wd * int'(p_d[i]) +
              wl * int'(p_l[i]) + wr * int'(p_r[i]);
        p_out[i] <= pix_t'(acc / 16);
      end

endmodule
