// fruc_pkg: types and constants shared by the frame rate up-conversion engine.
// Motion vectors are signed 9-bit integer pixel displacements on the
// 1920x1080 comparison grid, so the +-128 search range fits with margin.
// Sums follow the widths of the accumulator registers: an 8x1 sum of 8-bit
// pixels needs 11 bits, an 8x8 sum 14 bits, and an 8x8 MSEA (sixteen absolute
// differences of 8x8 sums) 18 bits.
package fruc_pkg;

  localparam int PIX_W   = 8;
  localparam int S8_W    = 11;   // 8x1 sum
  localparam int S64_W   = 14;   // 8x8 sum (14-bit accumulator registers)
  localparam int MSEA_W  = 18;   // sum of 16 absolute differences of 8x8 sums
  localparam int MV_W    = 9;    // signed motion vector component
  localparam int DIS_W   = 14;   // sum of 8 L1 motion vector discontinuities
  localparam int ENG_W   = 24;   // MRF energy

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [S8_W-1:0]   sum8_t;
  typedef logic [S64_W-1:0]  sum64_t;
  typedef logic [MSEA_W-1:0] msea_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Square pattern candidate index k = 3*jy + jx, with offset
  // ((jx-1)*step, (jy-1)*step); k = 4 is the pattern centre.
  localparam int CENTER = 4;

  // absolute value of a signed motion vector component difference
  function automatic logic [MV_W:0] mv_absdiff(logic signed [MV_W-1:0] a,
                                               logic signed [MV_W-1:0] b);
    logic signed [MV_W:0] d;
    d = {a[MV_W-1], a} - {b[MV_W-1], b};
    return d[MV_W] ? (MV_W+1)'(-d) : (MV_W+1)'(d);
  endfunction

  // L1 discontinuity between two motion vectors
  function automatic logic [MV_W+1:0] mv_l1(mv_t a, mv_t b);
    return {1'b0, mv_absdiff(a.x, b.x)} + {1'b0, mv_absdiff(a.y, b.y)};
  endfunction

endpackage
