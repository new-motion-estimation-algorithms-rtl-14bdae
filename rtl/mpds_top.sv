// mpds_top: multi-point diamond search motion estimator (MPDS, and DMPDS
// when DYNAMIC = 1, the default).
//
// A plain diamond search easily stops in a local SAD minimum near the
// centre of the search area, which happens often in high-definition video.
// This engine runs five independent diamond searches per 16x16 block (8x8
// after 4:1 sub-sampling): one from the centre (0,0) and one in each of the
// sectors A..D, from (d,d), (-d,d), (-d,-d) and (d,-d), and keeps the best
// result. Each search lives in its own ds_core with a private 34x34
// reference window; the feeder fills the cores one after another (34 cycles
// each), so every core searches while the next one is being filled, and a
// new block enters every 170 cycles. A three-cycle comparator picks the best
// of the five results. In DMPDS mode the d generator changes d from frame
// to frame (d, d-delta, d+delta trials, delta halving); in MPDS mode d is
// fixed at D_INIT.
//
// Interfaces:
//   blk_*    block commands (valid/ready): position of the block's top-left
//            sample in the sub-sampled frame, and a last-block-of-frame flag
//   fetch_*  frame-memory reads: fetch carries the coordinates of a 34-sample
//            reference row and (when fetch.cur_en) an 8-sample current row;
//            the memory answers in the same cycle on ref_data / cur_data and
//            fetch_ready accepts the beat
//   mv_*     one result per block, in block order: motion vector (relative to
//            the block position, sub-sampled samples), SAD, winning core,
//            block position, last flag and the d its sector cores used
//   d_*      the d generator's current d and delta
// Timing: with an always-ready memory, one vector every 170 cycles; the
// first vector of a run comes out at most 309 cycles after its first
// fetch, which are the document's figures for the five-iteration version.
// MAX_ITER = 11 (with DYNAMIC = 0, MPDS V. 2) turns on a second fill round
// for cores whose search outgrows the first window: at most 340 cycles per
// vector and 479 cycles latency, as in the document.
module mpds_top
  import me_pkg::*;
#(
  parameter int MAX_ITER   = 5,
  parameter bit DYNAMIC    = 1'b1,
  parameter int D_INIT     = 10,
  parameter int DELTA_INIT = 5,
  parameter int D_MAX      = 40,
  parameter int TAGQ_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     blk_valid,
  output logic     blk_ready,
  input  coord_t   blk_x,
  input  coord_t   blk_y,
  input  logic     blk_last,
  output logic     fetch_valid,
  input  logic     fetch_ready,
  output fetch_t   fetch,
  input  win_row_t ref_data,
  input  blk_row_t cur_data,
  output logic     mv_valid,
  output vec_t     mv,
  output sad_t     mv_sad,
  output logic [2:0] mv_core,
  output coord_t   mv_blk_x,
  output coord_t   mv_blk_y,
  output logic     mv_last,
  output dist_t    mv_d,
  output dist_t    d_base,
  output dist_t    d_delta
);

  // ---------------------------------------------------------------- d
  logic  d_ready, frame_start, frame_done;
  dist_t d_next;
  logic [FSAD_W-1:0] frame_sad;

  if (DYNAMIC) begin : g_dmpds
    d_generator #(
      .D_W(D_W), .D_INIT(D_INIT), .DELTA_INIT(DELTA_INIT), .D_MAX(D_MAX), .FSAD_W(FSAD_W)
    ) u_dgen (
      .clk, .rst_n, .frame_start, .d_ready, .d_next, .frame_done, .frame_sad,
      .d_base, .delta(d_delta)
    );
  end else begin : g_mpds
    assign d_ready = 1'b1;
    assign d_next  = dist_t'(D_INIT);
    assign d_base  = dist_t'(D_INIT);
    assign d_delta = '0;
  end

  // ---------------------------------------------------------------- feeder
  logic [N_CORES-1:0] core_idle, core_start, ref_we, cur_we;
  pos_t               ref_row;
  win_row_t           ref_wdata;
  logic [2:0]         cur_row;
  blk_row_t           cur_wdata;
  logic               tag_push, tag_full, tag_pop, tag_empty;
  blk_tag_t           tag_in, tag_head;

  // more iterations than one window holds: every core gets a second,
  // re-centred fill
  localparam bit TWO_PASS = (MAX_ITER > 5);

  logic [N_CORES-1:0] core_searching, core_paused;
  vec_t               core_off [N_CORES];

  mpds_feeder #(.TWO_PASS(TWO_PASS)) u_feed (
    .clk, .rst_n, .blk_valid, .blk_ready, .blk_x, .blk_y, .blk_last,
    .d_ready, .d_next, .frame_start,
    .fetch_valid, .fetch_ready, .fetch, .ref_data, .cur_data,
    .core_idle, .core_searching, .core_paused, .core_off, .core_start, .ref_we, .ref_row, .ref_wdata, .cur_we, .cur_row, .cur_wdata,
    .tag_push, .tag(tag_in), .tag_full
  );

  // ---------------------------------------------------------------- cores
  logic [N_CORES-1:0] res_valid;
  logic               all_valid;
  core_result_t       res [N_CORES];
  sad_t               c_sad [N_CORES];
  vec_t               c_vec [N_CORES];

  for (genvar k = 0; k < N_CORES; k++) begin : g_core
    ds_core #(.MAX_ITER(MAX_ITER)) u_core (
      .clk, .rst_n, .start(core_start[k]), .idle(core_idle[k]),
      .searching(core_searching[k]), .paused(core_paused[k]), .org_off(core_off[k]),
      .ref_we(ref_we[k]), .ref_row, .ref_data(ref_wdata),
      .cur_we(cur_we[k]), .cur_row, .cur_data(cur_wdata),
      .res_valid(res_valid[k]), .res_ready(all_valid), .res(res[k])
    );
  end

  // ---------------------------------------------------------------- tag queue
  blk_tag_t                        tq [TAGQ_DEPTH];
  logic [$clog2(TAGQ_DEPTH)-1:0]   tq_rd, tq_wr;
  logic [$clog2(TAGQ_DEPTH):0]     tq_n;

  assign tag_full  = (int'(tq_n) == TAGQ_DEPTH);
  assign tag_empty = (tq_n == '0);
  assign tag_head  = tq[tq_rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_rd <= '0; tq_wr <= '0; tq_n <= '0;
      for (int i = 0; i < TAGQ_DEPTH; i++) tq[i] <= '0;
    end else begin
      if (tag_push) begin
        tq[tq_wr] <= tag_in;
        tq_wr     <= tq_wr + 1'b1;
      end
      if (tag_pop) tq_rd <= tq_rd + 1'b1;
      tq_n <= tq_n + ($clog2(TAGQ_DEPTH)+1)'(tag_push) - ($clog2(TAGQ_DEPTH)+1)'(tag_pop);
    end
  end

  // ---------------------------------------------------------------- compare
  // all five cores hold a result of the block at the head of the queue
  assign all_valid = (&res_valid) && !tag_empty;
  assign tag_pop   = all_valid;

  function automatic mv_t off(input int c, input bit is_y, input dist_t d);
    case (c)
      1: return mv_t'(d);
      2: return is_y ? mv_t'(d) : -mv_t'(d);
      3: return -mv_t'(d);
      4: return is_y ? -mv_t'(d) : mv_t'(d);
      default: return '0;
    endcase
  endfunction

  always_comb
    for (int k = 0; k < N_CORES; k++) begin
      c_sad[k]   = res[k].sad;
      c_vec[k].x = res[k].vec.x + off(k, 1'b0, tag_head.d);
      c_vec[k].y = res[k].vec.y + off(k, 1'b1, tag_head.d);
    end

  blk_tag_t out_tag;
  core_comparator #(.TAG_W($bits(blk_tag_t))) u_cmp (
    .clk, .rst_n, .in_valid(all_valid), .sad(c_sad), .vec(c_vec), .tag(tag_head),
    .out_valid(mv_valid), .out_sad(mv_sad), .out_vec(mv), .out_core(mv_core), .out_tag
  );

  assign mv_blk_x = out_tag.x;
  assign mv_blk_y = out_tag.y;
  assign mv_last  = out_tag.last;
  assign mv_d     = out_tag.d;

  // ---------------------------------------------------------------- frame SAD
  logic [FSAD_W-1:0] frame_acc;
  assign frame_done = mv_valid && out_tag.last;
  assign frame_sad  = frame_acc + FSAD_W'(mv_sad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        frame_acc <= '0;
    else if (mv_valid) frame_acc <= out_tag.last ? '0 : frame_sad;
  end

  // a core never finishes while the tag of its block is missing (the
  // assertion's reset disable is why lint sees rst_n used synchronously too)
  assert property (@(posedge clk) disable iff (!rst_n) (&res_valid) |-> !tag_empty);

endmodule
