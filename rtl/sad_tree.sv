// sad_tree: 16-to-1 adder tree with an ABS unit on each input pair.
// In difference mode (mode_abs = 1) it outputs sum |a[i] - b[i]|, which is the
// 8x8 MSEA when a and b hold the sixteen 8x8 sums of the current block and of a
// candidate; the same tree also computes boundary errors on pixel pairs. In
// sum mode (mode_abs = 0) it outputs sum a[i]. The ABS stage and the first
// three adder levels are registered; the last addition is combinational, so
// result (with out_valid) is valid 4 clock edges after the inputs were
// presented with in_valid. One new input set may enter every cycle. The ABS-unit-per-pair structure and the
// 4-cycle latency follow the described SAD tree; the exact placement of the
// pipeline registers is this design's choice.
module sad_tree
  import fruc_pkg::*;
#(
  parameter int IN_W  = S64_W,            // width of each operand
  parameter int OUT_W = IN_W + 4          // 16 terms need 4 more bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 mode_abs,
  input  logic [IN_W-1:0]      a [16],
  input  logic [IN_W-1:0]      b [16],
  output logic                 out_valid,
  output logic [OUT_W-1:0]     result
);

  logic [IN_W-1:0]    s0 [16];            // after ABS units
  logic [IN_W:0]      s1 [8];
  logic [IN_W+1:0]    s2 [4];
  logic [IN_W+2:0]    s3 [2];
  logic [3:0]         vld;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 16; i++)
      s0[i] <= !mode_abs ? a[i] : (a[i] >= b[i] ? a[i] - b[i] : b[i] - a[i]);
    for (int i = 0; i < 8; i++) s1[i] <= {1'b0, s0[2*i]} + {1'b0, s0[2*i+1]};
    for (int i = 0; i < 4; i++) s2[i] <= {1'b0, s1[2*i]} + {1'b0, s1[2*i+1]};
    for (int i = 0; i < 2; i++) s3[i] <= {1'b0, s2[2*i]} + {1'b0, s2[2*i+1]};
  end

  assign result = OUT_W'({1'b0, s3[0]} + {1'b0, s3[1]});

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};

  // Output taken combinationally from the last registered level: the result of
  // inputs presented at cycle t is valid after the 4th clock edge.
  assign out_valid = vld[3];

endmodule
