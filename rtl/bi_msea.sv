// bi_msea: bilateral 8x8 MSEA of one 16x16 sub-block (1080p grid).
//
// The bi-MSEA of a sub-block compares the two blocks of the existing frames
// that its motion vector and the opposite vector point to: it is the sum over
// the four 8x8 cells of |forward cell sum - backward cell sum|. A low value
// means the vector is reliable; artifact detection uses it to decide which of
// two disagreeing neighbours to repair and which initial vector to search from.
//
// After start, the caller streams 16 lines of the forward block and then 16
// lines of the backward block (line_valid, one line per cycle, any gaps
// allowed), each line with the block in pixels 0..15 of the 48-pixel line
// bus. A flex_sum_tree in plain mode gives the two 8x1 sums of each line,
// which are accumulated into four cell sums per direction (the forward ones
// play the role of the current-block registers). When the 32nd line has been
// taken the eight cell sums go through a sad_tree; done pulses with the result
// 5 cycles after the last line (one issue cycle plus 4 cycles of tree
// latency), i.e. 37 cycles for a sub-block streamed without gaps.
//
// Sharing the sum-tree, accumulators and SAD tree of motion estimation, and
// loading the two blocks one after the other, follow the document. The line
// format, the separate instances and the start/done handshake are this
// design's choices; the ping-pong pre-fetch of the next sub-block belongs to
// the loader.
module bi_msea
  import fruc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,          // clear the cell sums, expect 32 lines
  input  logic   line_valid,
  input  pix_t   line [48],      // block pixels in line[0..15]
  output logic   done,           // one-cycle pulse, bi valid
  output msea_t  bi
);

  sum8_t   s8 [3][4];
  sum64_t  csum [2][4];          // [direction][2*(row/8) + column/8]
  logic [5:0] n_lines;           // lines taken since start, 0..32
  logic       issue;

  flex_sum_tree u_fst (.line(line), .step(3'd1), .cx(5'sd0), .plain(1'b1), .sum8(s8));

  logic       dir;
  logic [1:0] c_left, c_right;
  assign dir     = n_lines[4];           // lines 0..15 forward, 16..31 backward
  assign c_left  = {n_lines[3], 1'b0};   // cells 0,1 for rows 0..7, 2,3 below
  assign c_right = {n_lines[3], 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_lines <= '0;
      issue   <= 1'b0;
      for (int d = 0; d < 2; d++)
        for (int c = 0; c < 4; c++) csum[d][c] <= '0;
    end else begin
      issue <= 1'b0;
      if (start) begin
        n_lines <= '0;
        for (int d = 0; d < 2; d++)
          for (int c = 0; c < 4; c++) csum[d][c] <= '0;
      end else if (line_valid && n_lines < 6'd32) begin
        csum[dir][c_left]  <= csum[dir][c_left]  + sum64_t'(s8[0][0]);
        csum[dir][c_right] <= csum[dir][c_right] + sum64_t'(s8[0][1]);
        n_lines <= n_lines + 6'd1;
        issue   <= (n_lines == 6'd31);
      end
    end
  end

  sum64_t sad_a [16], sad_b [16];
  always_comb
    for (int j = 0; j < 16; j++) begin
      sad_a[j] = (j < 4) ? csum[0][j] : '0;
      sad_b[j] = (j < 4) ? csum[1][j] : '0;
    end

  sad_tree #(.IN_W(S64_W), .OUT_W(MSEA_W)) u_sad (
    .clk, .rst_n, .in_valid(issue), .mode_abs(1'b1),
    .a(sad_a), .b(sad_b), .out_valid(done), .result(bi));

endmodule
