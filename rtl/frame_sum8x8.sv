// frame_sum8x8: 8x8 sums of a whole 1080p frame on the 8-pixel grid.
//
// Before motion estimation each reference frame is reduced to the sums of its
// 8x8 cells at every 8-aligned position; the 8-step re-estimation reads these
// sums (the O windows) instead of pixels. The frame arrives in raster order,
// one 48-pixel segment of a line per cycle (in_valid), SEGS segments per line.
// A flex_sum_tree in plain mode turns a segment into six 8x1 sums, which are
// added into a row of partial cell sums (SEGS x 6 accumulators, one band of
// eight lines deep). On the eighth line of a band the completed six cell sums
// of the segment leave on out_sums, one cycle after the segment came in, with
// their grid position (out_gx = 6*segment, first of the six; out_gy = band),
// and the accumulators of that segment restart.
//
// Computing the frame's 8x8 sums with the shared sum-tree in a separate pass,
// and the 1920-pixel (240-cell) line of the 1080p frame, follow the document.
// The segment-per-cycle stream, the accumulator row and the output format are
// this design's choices; the writes of the sums to DRAM belong to the bus side.
// out_gx is always a multiple of 6, so its bit 0 is constant 0; it is kept so
// that the port carries the grid column directly.
module frame_sum8x8
  import fruc_pkg::*;
#(
  parameter int SEGS  = 40,           // 48-pixel segments per line (1920 / 48)
  parameter int LINES = 1080          // lines per frame
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,  // next segment is the frame's first
  input  logic          in_valid,
  input  pix_t          seg [48],
  output logic          out_valid,
  output sum64_t        out_sums [6],
  output logic [8:0]    out_gx,       // grid column of out_sums[0]
  output logic [7:0]    out_gy,       // grid row (band)
  output logic          frame_done    // with the last band's last segment
);

  localparam int SW = $clog2(SEGS);
  localparam int LW = $clog2(LINES);

  sum8_t              s8 [3][4];
  sum64_t             acc [SEGS][6];
  logic [SW-1:0]      sidx;           // segment within the line
  logic [LW-1:0]      line;           // line within the frame

  flex_sum_tree u_fst (.line(seg), .step(3'd1), .cx(5'sd0), .plain(1'b1), .sum8(s8));

  sum8_t  seg_sums [6];
  sum64_t upd [6];
  always_comb
    for (int i = 0; i < 6; i++) begin
      seg_sums[i] = s8[i / 4][i % 4];
      upd[i]      = acc[sidx][i] + sum64_t'(seg_sums[i]);
    end

  logic last_row, last_seg, last_line;
  assign last_row  = (line[2:0] == 3'd7);
  assign last_seg  = (sidx == SW'(SEGS - 1));
  assign last_line = (line == LW'(LINES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sidx       <= '0;
      line       <= '0;
      out_valid  <= 1'b0;
      frame_done <= 1'b0;
      out_gx     <= '0;
      out_gy     <= '0;
      for (int i = 0; i < 6; i++) out_sums[i] <= '0;
      for (int s = 0; s < SEGS; s++)
        for (int i = 0; i < 6; i++) acc[s][i] <= '0;
    end else begin
      out_valid  <= 1'b0;
      frame_done <= 1'b0;
      if (frame_start) begin
        sidx <= '0;
        line <= '0;
        for (int s = 0; s < SEGS; s++)
          for (int i = 0; i < 6; i++) acc[s][i] <= '0;
      end else if (in_valid) begin
        for (int i = 0; i < 6; i++) acc[sidx][i] <= last_row ? '0 : upd[i];
        if (last_row) begin
          out_valid <= 1'b1;
          out_sums  <= upd;
          out_gx    <= 9'(6 * int'(sidx));
          out_gy    <= 8'(line >> 3);
          frame_done <= last_seg && last_line;
        end
        if (last_seg) begin
          sidx <= '0;
          line <= last_line ? '0 : line + 1'b1;
        end else begin
          sidx <= sidx + 1'b1;
        end
      end
    end
  end

endmodule
