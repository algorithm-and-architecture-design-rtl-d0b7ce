// mv_grouping: motion vector discontinuity generation and grouping for the
// MRF correction step of one block.
//
// Nodes 0..7 are the eight neighbouring MVs (the MRF candidates), node 8 is
// the block's own MV. After start, the 36 node pairs are visited one per
// cycle. The L1 discontinuity |dx|+|dy| of a pair is accumulated into the
// total-discontinuity register of each node that is a candidate against the
// other: a neighbour-neighbour pair adds to both, a self-neighbour pair adds
// only to the self candidate (node 8). total_dis[k] is then the smoothness
// term sum over the 8 neighbours of |MV_k - MV_n| of candidate k. At the same
// time an edge between two neighbours is labelled when its discontinuity is at
// most 8 (the +-8 reach of the M window).
//
// Grouping then takes one cycle: the node with most labelled edges (lowest
// index on a tie) is the group centre, and it and the nodes joined to it by a
// labelled edge form group 1 if that is at least 3 nodes. Those nodes are
// removed and the same rule gives group 2. Remaining nodes are non-group.
// done is seen 36 cycles after the cycle in which start is sampled.
//
// The pair-by-pair accumulation, the <= 8 edge rule, the centre and member
// rule, the at-most-two groups and the minimum group size of three follow the
// document. The L1 norm for the discontinuity and the tie rule are this
// design's choices.
module mv_grouping
  import fruc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mv_t         self_mv,
  input  mv_t         neigh_mv [8],
  output logic        busy,
  output logic        done,
  output logic [DIS_W-1:0] total_dis [9],
  output logic        g1_valid,
  output logic [2:0]  g1_center,
  output logic [7:0]  g1_mask,
  output logic        g2_valid,
  output logic [2:0]  g2_center,
  output logic [7:0]  g2_mask,
  output logic [7:0]  nongroup_mask
);

  mv_t        node [9];
  logic [7:0] edge_l [8];        // symmetric labelled-edge matrix
  logic [3:0] pi, pj;            // current pair (pi < pj)
  logic       running;

  logic [MV_W+1:0] d;
  assign d = mv_l1(node[pi], node[pj]);

  // grouping rule applied to a set of nodes
  function automatic void group_of(input logic [7:0] alive, input logic [7:0] e [8],
                                   output logic ok, output logic [2:0] c,
                                   output logic [7:0] mask);
    int best, cnt;
    best = -1;
    c = '0;
    for (int i = 0; i < 8; i++) begin
      cnt = 0;
      for (int j = 0; j < 8; j++)
        if (alive[i] && alive[j] && e[i][j]) cnt++;
      if (alive[i] && cnt > best) begin
        best = cnt;
        c = 3'(i);
      end
    end
    mask = '0;
    for (int j = 0; j < 8; j++)
      if (alive[j] && e[c][j]) mask[j] = 1'b1;
    mask[c] = (best >= 0);
    ok = (best >= 2);            // centre plus at least two members
    if (!ok) mask = '0;
  endfunction

  logic       ok1, ok2;
  logic [2:0] c1, c2;
  logic [7:0] m1, m2;
  always_comb begin
    group_of(8'hFF, edge_l, ok1, c1, m1);
    group_of(~m1, edge_l, ok2, c2, m2);
    if (!ok1) begin
      ok2 = 1'b0;
      m2  = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      pi <= '0;
      pj <= 4'd1;
      for (int k = 0; k < 9; k++) begin
        total_dis[k] <= '0;
        node[k]      <= '0;
      end
      for (int k = 0; k < 8; k++) edge_l[k] <= '0;
      g1_valid <= 1'b0; g1_center <= '0; g1_mask <= '0;
      g2_valid <= 1'b0; g2_center <= '0; g2_mask <= '0;
      nongroup_mask <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running <= 1'b1;
        pi <= '0;
        pj <= 4'd1;
        for (int k = 0; k < 8; k++) node[k] <= neigh_mv[k];
        node[8] <= self_mv;
        for (int k = 0; k < 9; k++) total_dis[k] <= '0;
        for (int k = 0; k < 8; k++) edge_l[k] <= '0;
      end else if (running) begin
        if (pj == 4'd8) begin
          // self against neighbour pi: only the self candidate accumulates
          total_dis[8] <= total_dis[8] + DIS_W'(d);
        end else begin
          total_dis[pi] <= total_dis[pi] + DIS_W'(d);
          total_dis[pj] <= total_dis[pj] + DIS_W'(d);
          if (d <= 8) begin
            edge_l[pi[2:0]][pj[2:0]] <= 1'b1;
            edge_l[pj[2:0]][pi[2:0]] <= 1'b1;
          end
        end
        if (pi == 4'd7 && pj == 4'd8) begin
          running <= 1'b0;
          done    <= 1'b1;
          g1_valid <= ok1; g1_center <= c1; g1_mask <= m1;
          g2_valid <= ok2; g2_center <= c2; g2_mask <= m2;
          nongroup_mask <= ~(m1 | m2);
        end else if (pj == 4'd8) begin
          pi <= pi + 4'd1;
          pj <= pi + 4'd2;
        end else begin
          pj <= pj + 4'd1;
        end
      end
    end
  end

  assign busy = running;

endmodule
