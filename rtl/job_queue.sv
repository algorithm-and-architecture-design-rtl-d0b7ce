// job_queue: first-in first-out queue of DRAM jobs. Requests are pushed when
// issued and popped when their data returns, which absorbs the uncertain bus
// latency (about fifty cycles). Also used to pre-pop the next sub-block job in
// post-processing. push and pop may happen in the same cycle; rd_data shows
// the oldest entry while not empty. A push when full or a pop when empty is a
// protocol error (asserted). The depth and word width are this design's
// choices.
// Lint note: rst_n also disables the assertions, which Verilator reports as a
// signal used both synchronously and asynchronously; the flops themselves use
// it only as an asynchronous reset.
module job_queue #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 48,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) if (push && !full) mem[wp] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push && !full) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop && !empty) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
