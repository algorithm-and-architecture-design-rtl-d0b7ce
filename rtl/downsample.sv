// downsample: reduces 3840x2160 pixels to the 1920x1080 grid on which all
// block matching is done. Each cycle an 8x2 group of 4K pixels (two rows of
// eight, as one DRAM access delivers them) enters and four down-sampled
// pixels leave one cycle later, each the rounded mean of a 2x2 square:
// (a + b + c + d + 2) / 4. The 2x2 mean is this design's choice of filter;
// the document states only the scale change.
module downsample
  import fruc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  row0 [8],
  input  pix_t  row1 [8],
  output logic  out_valid,
  output pix_t  p_out [4]
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

  always_ff @(posedge clk)
    if (in_valid)
      for (int i = 0; i < 4; i++)
        p_out[i] <= pix_t'(({2'b0, row0[2*i]} + {2'b0, row0[2*i+1]} +
                             {2'b0, row1[2*i]} + {2'b0, row1[2*i+1]} + 10'd2) >> 2);

endmodule
