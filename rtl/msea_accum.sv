// msea_accum: accumulators that build the sixteen 8x8 sums of each of the nine
// square-pattern candidates from the 8x1 sums of the flexible sum-trees.
// Line y of the search window belongs to candidate row jy (vertical offset
// (jy-1)*step) when r = y - (top + (jy-1)*step) lies in 0..31, where top is the
// window row of the centre candidate's first line; it then adds the four 8x1
// sums of horizontal candidate jx to sub-block row r/8 of candidate 3*jy+jx.
// 9 candidates x 4 adders = 36 adders, 9 x 16 registers of 14 bits. clear
// zeroes all registers; in_valid adds one line per cycle. Results are read
// from sums[k][4*row+col] one cycle after the last line.
module msea_accum
  import fruc_pkg::*;
(
  input  logic              clk,
  input  logic              clear,
  input  logic              in_valid,
  input  logic [5:0]        y,        // window line, 0..47
  input  logic [5:0]        top,      // first line of the centre candidate
  input  logic [2:0]        step,
  input  sum8_t             sum8 [3][4],
  output sum64_t            sums [9][16]
);

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int k = 0; k < 9; k++)
        for (int j = 0; j < 16; j++) sums[k][j] <= '0;
    end else if (in_valid) begin
      for (int jy = 0; jy < 3; jy++) begin
        int r;
        r = int'(y) - (int'(top) + (jy - 1) * int'(step));
        if (r >= 0 && r < 32)
          for (int jx = 0; jx < 3; jx++)
            for (int i = 0; i < 4; i++)
              sums[3*jy+jx][4*(r/8)+i] <= sums[3*jy+jx][4*(r/8)+i] + sum64_t'(sum8[jx][i]);
      end
    end
  end

endmodule
