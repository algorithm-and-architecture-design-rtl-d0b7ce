// mrf_select: one iterated-conditional-mode step of the MRF motion vector
// correction. For each of the nine candidates (eight neighbour MVs and the
// block's own MV) the energy is its 8x8 MSEA plus WEIGHT times its total
// discontinuity to the eight neighbours; the candidate with the least energy
// becomes the block's new MV. On a tie the block's own MV (index 8) is kept,
// then the lowest index wins. Inputs are sampled when in_valid is high and
// the result is registered: out_valid follows one cycle later.
// The energy formula and WEIGHT = 48 follow the document; the tie rule is
// this design's choice.
module mrf_select
  import fruc_pkg::*;
#(
  parameter int WEIGHT = 48
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  mv_t               cand_mv [9],
  input  msea_t             msea [9],
  input  logic [DIS_W-1:0]  dis [9],
  output logic              out_valid,
  output mv_t               new_mv,
  output logic [3:0]        new_idx,
  output logic [ENG_W-1:0]  new_energy
);

  logic [ENG_W-1:0] energy [9];
  logic [3:0]       bi;
  always_comb begin
    for (int k = 0; k < 9; k++)
      energy[k] = ENG_W'(msea[k]) + ENG_W'(WEIGHT) * ENG_W'(dis[k]);
    bi = 4'd8;
    for (int k = 0; k < 8; k++)
      if (energy[k] < energy[bi]) bi = 4'(k);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid  <= 1'b0;
      new_mv     <= '0;
      new_idx    <= '0;
      new_energy <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        new_mv     <= cand_mv[bi];
        new_idx    <= bi;
        new_energy <= energy[bi];
      end
    end

endmodule
