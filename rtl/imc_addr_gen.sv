// imc_addr_gen: tile walker of inverse motion compensation.
//
// Inverse MC works from the existing frame: one existing block is read into
// the on-chip buffer, and every inter block whose source area (its position
// displaced by its mapped MV scaled to its time phase, sdx/sdy) meets that
// block gets the overlapped pixels written out. For one (existing block,
// inter block) pair this unit derives the overlapped region with overlap_calc
// and walks it in tiles of 8x2 pixels, one tile per cycle while ready is
// high. Each tile gives the read position inside the buffered existing block
// (src_x, src_y), the write position in the inter-frame (dst_x, dst_y) and
// how many of its columns and rows lie in the region. done pulses after the
// last tile (or one cycle after start when the region is empty).
// The overlap derivation, its sharing with MV mapping and the 8x2 output
// rate follow the document. The row-major tile order, the ready handshake and
// tiles aligned to the region's corner are this design's choices; the SRAM
// rotate network that turns unaligned tiles into bank reads is not included.
// Lint note: the overlap helper's width and height outputs are not read; the
// walker steps between the rectangle's corners instead.
module imc_addr_gen #(
  parameter int EB = 64,             // existing block side (3840x2160 grid)
  parameter int IB = 64,             // inter block side
  parameter int CW = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [CW-1:0] ex, ey,
  input  logic signed [CW-1:0] ix, iy,
  input  logic signed [CW-1:0] sdx, sdy,
  input  logic                 ready,
  output logic                 tile_valid,
  output logic [6:0]           src_x, src_y,
  output logic signed [CW-1:0] dst_x, dst_y,
  output logic [3:0]           cols,
  output logic [1:0]           rows,
  output logic                 busy,
  output logic                 done
);

  logic signed [CW-1:0] x0, y0, x1, y1;
  logic [CW-1:0]        w, h;
  logic [2*CW-1:0]      area;

  overlap_calc #(.A_SIZE(IB), .B_SIZE(EB), .CW(CW)) u_ov (
    .ax(ix + sdx), .ay(iy + sdy), .bx(ex), .by(ey),
    .x0, .y0, .x1, .y1, .w, .h, .area);

  logic signed [CW-1:0] rx0, rx1, ry1, tx, ty, rex, rey, rdx, rdy;
  logic                 run;

  assign tile_valid = run;
  assign busy  = run;
  assign src_x = 7'(tx - rex);
  assign src_y = 7'(ty - rey);
  assign dst_x = tx - rdx;
  assign dst_y = ty - rdy;
  assign cols  = (rx1 - tx >= 8) ? 4'd8 : 4'(rx1 - tx);
  assign rows  = (ry1 - ty >= 2) ? 2'd2 : 2'(ry1 - ty);

  logic last_tile;
  assign last_tile = (tx + 8 >= rx1) && (ty + 2 >= ry1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0;
      rx0 <= '0; rx1 <= '0; ry1 <= '0; tx <= '0; ty <= '0;
      rex <= '0; rey <= '0; rdx <= '0; rdy <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        if (area == '0) done <= 1'b1;
        else begin
          run <= 1'b1;
          rx0 <= x0; rx1 <= x1; ry1 <= y1;
          tx  <= x0; ty  <= y0;
          rex <= ex; rey <= ey; rdx <= sdx; rdy <= sdy;
        end
      end else if (run && ready) begin
        if (last_tile) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else if (tx + 8 >= rx1) begin
          tx <= rx0;
          ty <= ty + 2;
        end else begin
          tx <= tx + 8;
        end
      end
    end

endmodule
