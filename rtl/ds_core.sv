// ds_core: one diamond-search (DS) motion-estimation core.
//
// Holds a 34x34 reference window, the 8x8 current block, 13 local candidate
// memories (MEM 1..9 for the large diamond, MEM A..D for the small one),
// nine SAD processing units, the comparators and the control unit with its
// position controllers. The nine large-diamond candidates are matched in
// parallel; the small diamond reuses PUs 1..4 fed from MEM A..D.
//
// Fill interface: 'start' begins a new block (only accepted while 'idle');
// from that cycle on, each 'ref_we' beat writes one window row, and each
// 'cur_we' beat one current-block row. The feeder sends the rows of the
// first large diamond first; the search starts as soon as they are in and
// overlaps the rest of the fill. The result (vector relative to the core's
// start point, SAD, number of large diamonds) leaves through a
// valid/ready register.
//
// Second window (MAX_ITER > 5): when a window is used up the core raises
// 'paused' and reports in 'org_off' how far its new centre lies from the
// start point. A 'start' while paused resumes the search; the feeder then
// writes a window centred on the new centre. The current block is kept.
// 'searching' tells the feeder that the core has not yet decided.
//
// Timing with the defaults: each diamond step costs 5 RUN cycles plus the
// 5-stage PU pipeline plus one decision cycle, about 12 cycles, so the
// worst case (6 large diamonds, a reload and the small diamond) ends well
// within the 170-cycle refill period of the five-core array. Structure and
// sizes follow the document; the exact step schedule is this design's.
module ds_core
  import me_pkg::*;
#(
  parameter int MAX_ITER = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         idle,
  output logic         searching,
  output logic         paused,
  output vec_t         org_off,
  input  logic         ref_we,
  input  pos_t         ref_row,
  input  win_row_t     ref_data,
  input  logic         cur_we,
  input  logic [2:0]   cur_row,
  input  blk_row_t     cur_data,
  output logic         res_valid,
  input  logic         res_ready,
  output core_result_t res
);

  logic [WIN-1:0]        row_valid;
  logic signed [POS_W:0] base_x, base_y;
  pix_t                  patch [6][BLK+4];
  logic                  lm_we, sdsp_mode;
  logic [1:0]            lm_wpair, pu_pair;
  logic                  pu_in_valid, pu_first, pu_last;
  logic                  pu_sad_valid [N_LDSP];
  sad_t                  pu_sad [N_LDSP];
  line_pair_t            lm_wdata [N_CAND];
  line_pair_t            lm_rdata [N_CAND];
  line_pair_t            cur_rdata;
  logic [3:0]            ldsp_best_idx;
  logic [2:0]            sdsp_best_idx;
  sad_t                  ldsp_best_sad, sdsp_best_sad, center_sad;
  sad_t                  sdsp_in [5];

  ref_window_mem u_ref (
    .clk, .rst_n, .clear(start), .we(ref_we), .wrow(ref_row), .wdata(ref_data),
    .row_valid, .base_x, .base_y, .patch
  );

  // current block: one row per fill beat, two rows per cycle to the PUs
  line_pair_t cur_wdata;
  assign cur_wdata = {cur_data, cur_data};
  block_mem u_cur (
    .clk, .rst_n,
    .we({cur_we & cur_row[0], cur_we & ~cur_row[0]}), .wpair(cur_row[2:1]),
    .wdata(cur_wdata), .rpair(pu_pair), .rdata(cur_rdata)
  );

  // local memories: candidate i, line pair k = patch rows dy+2, dy+3 and
  // columns dx+2 .. dx+9 of the patch read at base row cy-2+2k
  for (genvar i = 0; i < N_CAND; i++) begin : g_lm
    localparam int OX = int'(cand_dx(i)) + 2;
    localparam int OY = int'(cand_dy(i)) + 2;
    always_comb
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < BLK; c++)
          lm_wdata[i][r][c] = patch[OY + r][OX + c];
    block_mem u_lm (
      .clk, .rst_n, .we({lm_we, lm_we}), .wpair(lm_wpair),
      .wdata(lm_wdata[i]), .rpair(pu_pair), .rdata(lm_rdata[i])
    );
  end

  // processing units: PU j takes MEM j in the large diamond; PUs 0..3 take
  // MEM A..D in the small diamond
  for (genvar j = 0; j < N_LDSP; j++) begin : g_pu
    line_pair_t cand;
    logic       v;
    if (j < N_SDSP) begin : g_shared
      assign cand = sdsp_mode ? lm_rdata[N_LDSP + j] : lm_rdata[j];
      assign v    = pu_in_valid;
    end else begin : g_ldsp_only
      assign cand = lm_rdata[j];
      assign v    = pu_in_valid & ~sdsp_mode;
    end
    sad_pu u_pu (
      .clk, .rst_n, .in_valid(v), .first(pu_first), .last(pu_last),
      .cur(cur_rdata), .cand, .sad(pu_sad[j]), .sad_valid(pu_sad_valid[j])
    );
  end

  sad_comparator #(.N(N_LDSP), .PREF(LDSP_CTR)) u_cmp_ldsp (
    .sad(pu_sad), .best_idx(ldsp_best_idx), .best_sad(ldsp_best_sad)
  );

  always_comb begin
    sdsp_in[0] = center_sad;
    for (int j = 0; j < N_SDSP; j++) sdsp_in[j+1] = pu_sad[j];
  end

  sad_comparator #(.N(5), .PREF(0)) u_cmp_sdsp (
    .sad(sdsp_in), .best_idx(sdsp_best_idx), .best_sad(sdsp_best_sad)
  );

  ds_ctrl #(.MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .start, .idle, .searching, .paused, .org_off, .row_valid,
    .base_x, .base_y, .lm_we, .lm_wpair,
    .pu_in_valid, .pu_first, .pu_last, .pu_pair, .sdsp_mode,
    .pu_sad_valid(pu_sad_valid[0]),
    .ldsp_best_idx, .ldsp_best_sad, .sdsp_best_idx, .sdsp_best_sad, .center_sad,
    .res_valid, .res_ready, .res
  );

endmodule
