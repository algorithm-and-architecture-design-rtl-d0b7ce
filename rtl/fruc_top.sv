// fruc_top: the frame rate up-conversion engine (24->120 Hz and 60->120 Hz,
// 3840x2160 output, block matching on the 1920x1080 grid).
//
// The engine is a set of units run one procedure at a time, frame by frame,
// by a sequencer outside this module, with frame data in external DRAM:
//   down-sample -> 8x8 sums -> motion estimation -> MRF correction x3 ->
//   MV mapping -> inverse MC -> bi-MSEA -> MV search -> OBMC.
// What is here:
//   * frame_sum8x8: the 8x8 sums of a whole 1080p frame on the 8-pixel grid,
//     written back to DRAM and later loaded into the O windows.
//   * me_engine: predictive square search with its ping-pong window buffers,
//     flexible sum-trees, accumulators and SAD tree. Its window refetch
//     requests go into the job queue; the DRAM read side pops them
//     (dram_req_*) and answers with fetch_done once the window is refilled.
//   * mv_grouping feeding mrf_select: one ICM step of MRF correction. The
//     grouping's total discontinuities are the smoothness terms; the
//     candidates' 8x8 MSEA values (mrf_msea) come from the ME datapath.
//   * mv_mapper (block-based through MV mapping) and imc_addr_gen (inverse
//     MC tile walker), which share the overlap geometry.
//   * artifact_detect feeding be_search: a labelled sub-block starts the
//     bilateral boundary-error search from its initial MV; unlabelled ones
//     finish at once (pp_skip).
//   * bi_msea: bilateral 8x8 MSEA of a sub-block from its forward and
//     backward blocks. Its results go back to DRAM with the sub-block
//     information and return as pp_self_bi / pp_neigh_bi.
//   * obmc_blend and downsample as stream units.
// Interfaces are valid/start pulses with registered results; see each unit.
// The unit list, the data flow between them and the request queue follow the
// document's architecture. The split of sequencing into ports is this
// design's choice: the procedure sequencer, DRAM request/receive logic and
// SRAM write address generators are not part of this module.
// Lint notes: rst_n is both the asynchronous reset of the units and the
// disable condition of their assertions, which Verilator reports as a signal
// used synchronously and asynchronously; the assertions are not circuit.
// Status outputs of the units that the sequencer outside would use (queue
// count, busy flags, group centres, the MRF energy, the mapper's area, the
// per-neighbour artifact conditions) are left unconnected here.
module fruc_top
  import fruc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // ---- motion estimation ----
  input  logic          me_start,
  input  logic          me_pp_sel,
  input  mv_t           me_neigh_mv [3],
  input  sum64_t        me_cur_sums [16],
  output mv_t           me_pred_mv,
  output logic          me_busy,
  output logic          me_done,
  output mv_t           me_mv,
  output msea_t         me_msea,
  output logic          me_rejected,
  input  logic          m_we,
  input  logic          m_pair,
  input  logic [5:0]    m_addr,
  input  logic [383:0]  m_wdata,
  input  logic          o_we,
  input  logic          o_pair,
  input  logic [3:0]    o_bank,
  input  logic [6:0]    o_addr,
  input  logic [15:0]   o_wdata,
  input  logic          fetch_done,
  output logic          dram_req_valid,
  output logic [47:0]   dram_req_data,   // {30'b0, center.x, center.y}
  input  logic          dram_req_pop,
  // ---- MRF correction ----
  input  logic          mrf_start,
  input  mv_t           mrf_self_mv,
  input  mv_t           mrf_neigh_mv [8],
  input  msea_t         mrf_msea [9],
  output logic          mrf_valid,
  output mv_t           mrf_new_mv,
  output logic [3:0]    mrf_new_idx,
  output logic          grp1_valid,
  output logic [7:0]    grp1_mask,
  output logic          grp2_valid,
  output logic [7:0]    grp2_mask,
  output logic [7:0]    nongroup_mask,
  // ---- MV mapping ----
  input  logic          map_start,
  input  logic signed [13:0] map_ib_x, map_ib_y,
  input  logic signed [3:0]  map_num,
  input  logic [3:0]    map_den,
  input  logic          map_cand_valid,
  input  logic signed [13:0] map_ex, map_ey,
  input  mv_t           map_cand_mv,
  input  logic          map_finish,
  output logic          map_valid,
  output mv_t           map_mv,
  output logic          map_by_max,
  // ---- inverse motion compensation ----
  input  logic          imc_start,
  input  logic signed [13:0] imc_ex, imc_ey, imc_ix, imc_iy, imc_sdx, imc_sdy,
  input  logic          imc_ready,
  output logic          imc_tile_valid,
  output logic [6:0]    imc_src_x, imc_src_y,
  output logic signed [13:0] imc_dst_x, imc_dst_y,
  output logic [3:0]    imc_cols,
  output logic [1:0]    imc_rows,
  output logic          imc_done,
  // ---- post-processing ----
  input  logic          pp_start,
  input  mv_t           pp_self_mv,
  input  msea_t         pp_self_bi,
  input  mv_t           pp_neigh_mv [4],
  input  msea_t         pp_neigh_bi [4],
  input  logic [3:0]    pp_neigh_valid,
  output logic          pp_label,
  output mv_t           pp_init_mv,
  output logic          pp_skip,
  output logic          be_req_valid,
  output logic          be_req_win,
  output mv_t           be_req_mv,
  output logic [1:0]    be_req_part,
  input  pix_t          be_resp_out [16],
  input  pix_t          be_resp_in [16],
  output logic          be_done,
  output mv_t           be_best_mv,
  output logic          be_best_win,
  output logic [13:0]   be_best_be,
  // ---- whole-frame 8x8 sums ----
  input  logic          fs_frame_start,
  input  logic          fs_valid,
  input  pix_t          fs_seg [48],
  output logic          fs_out_valid,
  output sum64_t        fs_out_sums [6],
  output logic [8:0]    fs_out_gx,
  output logic [7:0]    fs_out_gy,
  output logic          fs_frame_done,
  // ---- bi-MSEA ----
  input  logic          bi_start,
  input  logic          bi_line_valid,
  input  pix_t          bi_line [48],
  output logic          bi_done,
  output msea_t         bi_value,       // stored with the sub-block for detection
  // ---- OBMC ----
  input  logic          ob_valid,
  input  logic [4:0]    ob_y, ob_x0,
  input  pix_t          ob_c [16], ob_u [16], ob_r [16], ob_d [16], ob_l [16],
  output logic          ob_out_valid,
  output pix_t          ob_out [16],
  // ---- down-sample ----
  input  logic          ds_valid,
  input  pix_t          ds_row0 [8], ds_row1 [8],
  output logic          ds_out_valid,
  output pix_t          ds_out [4]
);

  // ---------------- motion estimation and its request queue ----------------
  logic fetch_req, fetch_req_d;
  mv_t  fetch_center;

  me_engine u_me (
    .clk, .rst_n, .start(me_start), .pp_sel(me_pp_sel), .neigh_mv(me_neigh_mv),
    .cur_sums(me_cur_sums), .pred_mv(me_pred_mv), .busy(me_busy), .done(me_done),
    .mv_out(me_mv), .msea_out(me_msea), .rejected(me_rejected),
    .m_we, .m_pair, .m_addr, .m_wdata, .o_we, .o_pair, .o_bank, .o_addr, .o_wdata,
    .fetch_req, .fetch_center, .fetch_done);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fetch_req_d <= 1'b0;
    else        fetch_req_d <= fetch_req;

  logic q_full, q_empty;
  logic [6:0] q_count;

  job_queue #(.DEPTH(64), .WIDTH(48)) u_jobq (
    .clk, .rst_n, .push(fetch_req && !fetch_req_d && !q_full),
    .wr_data({30'b0, fetch_center}), .pop(dram_req_pop && !q_empty),
    .rd_data(dram_req_data), .full(q_full), .empty(q_empty), .count(q_count));

  assign dram_req_valid = !q_empty;

  // ---------------- MRF correction ----------------
  logic [DIS_W-1:0] total_dis [9];
  logic       grp_busy, grp_done;
  logic [2:0] g1_center, g2_center;
  mv_t        mrf_cand [9];
  logic [ENG_W-1:0] mrf_energy;

  mv_grouping u_grp (
    .clk, .rst_n, .start(mrf_start), .self_mv(mrf_self_mv), .neigh_mv(mrf_neigh_mv),
    .busy(grp_busy), .done(grp_done), .total_dis,
    .g1_valid(grp1_valid), .g1_center, .g1_mask(grp1_mask),
    .g2_valid(grp2_valid), .g2_center, .g2_mask(grp2_mask), .nongroup_mask);

  always_comb begin
    for (int k = 0; k < 8; k++) mrf_cand[k] = mrf_neigh_mv[k];
    mrf_cand[8] = mrf_self_mv;
  end

  mrf_select u_mrf (
    .clk, .rst_n, .in_valid(grp_done), .cand_mv(mrf_cand), .msea(mrf_msea),
    .dis(total_dis), .out_valid(mrf_valid), .new_mv(mrf_new_mv),
    .new_idx(mrf_new_idx), .new_energy(mrf_energy));

  // ---------------- MV mapping and inverse MC ----------------
  logic [27:0] map_area;

  mv_mapper u_map (
    .clk, .rst_n, .start(map_start), .ib_x(map_ib_x), .ib_y(map_ib_y),
    .num(map_num), .den(map_den), .cand_valid(map_cand_valid),
    .ex(map_ex), .ey(map_ey), .cand_mv(map_cand_mv), .finish(map_finish),
    .out_valid(map_valid), .out_mv(map_mv), .out_by_max(map_by_max), .out_area(map_area));

  logic imc_busy;

  imc_addr_gen u_imc (
    .clk, .rst_n, .start(imc_start), .ex(imc_ex), .ey(imc_ey), .ix(imc_ix), .iy(imc_iy),
    .sdx(imc_sdx), .sdy(imc_sdy), .ready(imc_ready), .tile_valid(imc_tile_valid),
    .src_x(imc_src_x), .src_y(imc_src_y), .dst_x(imc_dst_x), .dst_y(imc_dst_y),
    .cols(imc_cols), .rows(imc_rows), .busy(imc_busy), .done(imc_done));

  // ---------------- post-processing ----------------
  logic [3:0] pp_cond;
  logic       be_busy;

  artifact_detect u_det (
    .self_mv(pp_self_mv), .self_bi(pp_self_bi), .neigh_mv(pp_neigh_mv),
    .neigh_bi(pp_neigh_bi), .neigh_valid(pp_neigh_valid),
    .cond(pp_cond), .label(pp_label), .init_mv(pp_init_mv));

  assign pp_skip = pp_start && !pp_label;

  be_search u_be (
    .clk, .rst_n, .start(pp_start && pp_label), .init_mv(pp_init_mv),
    .req_valid(be_req_valid), .req_win(be_req_win), .req_mv(be_req_mv),
    .req_part(be_req_part), .resp_out(be_resp_out), .resp_in(be_resp_in),
    .busy(be_busy), .done(be_done), .best_mv(be_best_mv), .best_win(be_best_win),
    .best_be(be_best_be));

  obmc_blend #(.SIZE(32)) u_obmc (
    .clk, .rst_n, .in_valid(ob_valid), .y(ob_y), .x0(ob_x0), .p_c(ob_c), .p_u(ob_u),
    .p_r(ob_r), .p_d(ob_d), .p_l(ob_l), .out_valid(ob_out_valid), .p_out(ob_out));

  frame_sum8x8 u_fs (
    .clk, .rst_n, .frame_start(fs_frame_start), .in_valid(fs_valid), .seg(fs_seg),
    .out_valid(fs_out_valid), .out_sums(fs_out_sums), .out_gx(fs_out_gx),
    .out_gy(fs_out_gy), .frame_done(fs_frame_done));

  bi_msea u_bi (
    .clk, .rst_n, .start(bi_start), .line_valid(bi_line_valid), .line(bi_line),
    .done(bi_done), .bi(bi_value));

  downsample u_ds (
    .clk, .rst_n, .in_valid(ds_valid), .row0(ds_row0), .row1(ds_row1),
    .out_valid(ds_out_valid), .p_out(ds_out));

endmodule
