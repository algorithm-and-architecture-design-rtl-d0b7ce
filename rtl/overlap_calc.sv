// overlap_calc: overlapped region of two axis-aligned squares, the shared
// geometry of block-based through MV mapping and inverse motion compensation.
// Square A has side A_SIZE at (ax, ay), square B side B_SIZE at (bx, by).
// Outputs the region's corners (x0, y0 inclusive, x1, y1 exclusive), its
// width, height and area; width and height are zero when the squares do not
// meet. Combinational: max/min of corners, two subtractors, one multiplier.
module overlap_calc #(
  parameter int A_SIZE = 32,
  parameter int B_SIZE = 32,
  parameter int CW     = 14          // signed coordinate width
) (
  input  logic signed [CW-1:0] ax, ay, bx, by,
  output logic signed [CW-1:0] x0, y0, x1, y1,
  output logic [CW-1:0]        w, h,
  output logic [2*CW-1:0]      area
);

  logic signed [CW-1:0] ax1, ay1, bx1, by1;
  assign ax1 = ax + CW'(A_SIZE);
  assign ay1 = ay + CW'(A_SIZE);
  assign bx1 = bx + CW'(B_SIZE);
  assign by1 = by + CW'(B_SIZE);

  assign x0 = (ax > bx) ? ax : bx;
  assign y0 = (ay > by) ? ay : by;
  assign x1 = (ax1 < bx1) ? ax1 : bx1;
  assign y1 = (ay1 < by1) ? ay1 : by1;
  assign w  = (x1 > x0) ? CW'(x1 - x0) : '0;
  assign h  = (y1 > y0) ? CW'(y1 - y0) : '0;
  assign area = (2*CW)'(w) * (2*CW)'(h);

endmodule
