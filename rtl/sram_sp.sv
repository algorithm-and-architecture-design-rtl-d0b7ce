// sram_sp: single-port synchronous SRAM bank, one read or one write per cycle.
// The on-chip buffers are built from banks of this kind: M1/M2 from three
// 48 x 128-bit banks each (a 48-pixel search window line per address), O1/O2
// from sixteen 84 x 16-bit banks each (one 8x8 sum per word). A write (we = 1)
// stores wdata at addr; otherwise the word at addr appears on rdata after the
// next clock edge. Contents are not reset. Written as an array so a memory
// compiler macro can replace it.
module sram_sp #(
  parameter int DEPTH = 48,
  parameter int WIDTH = 128,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end

endmodule
