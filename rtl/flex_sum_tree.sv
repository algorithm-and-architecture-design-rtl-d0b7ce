// flex_sum_tree: sum-trees of flexible adders for the square pattern search.
// One line of the M1/M2 search window (48 pixels: the 32-pixel block plus 8 on
// each side) enters per cycle. For a square pattern of step s (4, 2 or 1)
// centred cx pixels right of the window centre, the three horizontal candidate
// positions start at column 8 + cx + (jx-1)*s, jx = 0..2. For each of them the
// tree outputs the four 8x1 sums of the 8x8 sub-block columns the line crosses,
// i.e. twelve 8x1 sums per cycle, shared by the three vertical candidates.
// In plain mode (plain = 1) it outputs the six aligned 8x1 sums of the line in
// sum8[0][*] and sum8[1][0..1], used for 8x8 sums of whole frames.
// Combinational. The selection network in front of the adders is written as a
// shift of the line; the document builds it from 49 rearrangeable adders, this
// code leaves the adder sharing to synthesis.
module flex_sum_tree
  import fruc_pkg::*;
(
  input  pix_t              line [48],
  input  logic [2:0]        step,       // 1, 2 or 4
  input  logic signed [4:0] cx,         // pattern centre column offset, -8..8
  input  logic              plain,
  output sum8_t             sum8 [3][4]
);

  always_comb begin
    for (int jx = 0; jx < 3; jx++) begin
      for (int i = 0; i < 4; i++) begin
        int base;
        sum8_t acc;
        if (plain) base = (jx * 4 + i) * 8;
        else       base = 8 + int'(cx) + (jx - 1) * int'(step) + 8 * i;
        acc = '0;
        for (int p = 0; p < 8; p++)
          if (base + p >= 0 && base + p < 48) acc = acc + sum8_t'(line[base + p]);
        sum8[jx][i] = (plain && jx * 4 + i >= 6) ? '0 : acc;
      end
    end
  end

endmodule
