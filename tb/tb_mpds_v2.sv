// tb_mpds_v2: end-to-end test of the eleven-iteration MPDS version:
// MAX_ITER = 11 with d fixed at 10 (DYNAMIC = 0). A core that is still
// searching after six large diamonds has used up its 34x34 window; it
// pauses and the feeder gives it a second window centred on its current
// position once all five first fills of the block are done.
//
// A behavioural frame memory answers from the synthetic video of
// me_model_pkg, and every vector, SAD and winning core is compared with the
// software model run with eleven iterations. With an always-ready memory
// (frames 0..5) consecutive blocks must start at most 340 cycles apart and
// every vector must be out at most 479 cycles after its block's first
// fetch. Frames 6..8 add memory wait states. Coverage: second fills, cores
// skipped in the second round, searches longer than one window, the
// eleven-iteration limit, sector and centre wins, memory stalls.
`timescale 1ns/1ps
module tb_mpds_v2;
  import me_pkg::*;
  import me_model_pkg::*;

  localparam int N_FRAMES  = 9;
  localparam int BPF       = 4;            // blocks per frame
  localparam int N_BLK     = N_FRAMES * BPF;
  localparam int STALL_FR  = 6;            // first frame with memory wait states
  localparam int WATCHDOG  = 100000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     blk_valid, blk_ready, blk_last;
  coord_t   blk_x, blk_y;
  logic     fetch_valid, fetch_ready;
  fetch_t   fetch;
  win_row_t ref_data;
  blk_row_t cur_data;
  logic     mv_valid, mv_last;
  vec_t     mv;
  sad_t     mv_sad;
  logic [2:0] mv_core;
  coord_t   mv_blk_x, mv_blk_y;
  dist_t    d_base, d_delta, mv_d;

  mpds_top #(.MAX_ITER(11), .DYNAMIC(1'b0)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ expected
  int exp_x[N_BLK], exp_y[N_BLK], exp_mvx[N_BLK], exp_mvy[N_BLK];
  int exp_sad[N_BLK], exp_core[N_BLK], frame_d[N_FRAMES];
  int cov_long = 0, cov_early = 0, cov_limit = 0, cov_sector = 0, cov_center = 0;

  initial begin
    for (int f = 0; f < N_FRAMES; f++) begin
      int fd;
      fd = 10;                      // MPDS: d is fixed
      frame_d[f] = fd;
      for (int b = 0; b < BPF; b++) begin
        int i, bs;
        ds_res_t r;
        i = f * BPF + b;
        exp_x[i] = 64 + 8 * (b % 2) + 40 * f;
        exp_y[i] = 48 + 8 * (b / 2);
        bs = 1 << 30;
        for (int k = 0; k < 5; k++) begin
          r = ds_search(f, exp_x[i], exp_y[i], start_x(k, fd), start_y(k, fd), 11);
          if (r.n_ldsp > 6) cov_long++;
          if (r.early) cov_early++;
          if (r.limit) cov_limit++;
          if (r.sad < bs) begin
            bs = r.sad; exp_mvx[i] = r.mvx; exp_mvy[i] = r.mvy; exp_core[i] = k;
          end
        end
        exp_sad[i] = bs;
        if (exp_core[i] == 0) cov_center++; else cov_sector++;
      end
    end
  end

  // ------------------------------------------------------------ frame memory
  int n_tags = 0;           // blocks whose fill has started
  int cur_frame;
  int first_fetch[N_BLK];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always_comb begin
    cur_frame = (dut.tag_push ? n_tags : n_tags - 1) / BPF;
    if (cur_frame < 0) cur_frame = 0;
    if (cur_frame >= N_FRAMES) cur_frame = N_FRAMES - 1;
    for (int c = 0; c < WIN; c++)
      ref_data[c] = pix_t'(ref_pix(cur_frame, int'(fetch.ref_x) + c, int'(fetch.ref_y)));
    for (int c = 0; c < BLK; c++)
      cur_data[c] = pix_t'(cur_pix(cur_frame, int'(fetch.cur_x) + c, int'(fetch.cur_y)));
  end

  int cov_mem_stall = 0, cov_refill = 0, cov_skip = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.tag_push) begin
      first_fetch[n_tags] <= cycle;
      n_tags <= n_tags + 1;
    end
    if (dut.u_feed.pass && |dut.core_start) cov_refill++;
    if (dut.u_feed.skip) cov_skip++;
    if (fetch_valid && !fetch_ready) cov_mem_stall++;
  end

  always @(negedge clk)
    fetch_ready <= (cur_frame < STALL_FR) ? 1'b1 : ($urandom_range(0, 9) < 7);

  // ------------------------------------------------------------ blocks in
  initial begin
    blk_valid = 0; blk_x = '0; blk_y = '0; blk_last = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_BLK; i++) begin
      @(negedge clk);
      blk_valid = 1;
      blk_x = coord_t'(exp_x[i]);
      blk_y = coord_t'(exp_y[i]);
      blk_last = (i % BPF == BPF - 1);
      @(posedge clk);
      while (!blk_ready) begin
        @(posedge clk);
      end
    end
    @(negedge clk);
    blk_valid = 0;
  end

  // ------------------------------------------------------------ results
  int n_out = 0;

  always @(posedge clk) if (rst_n && mv_valid) begin
    int i;
    i = n_out;
    check(int'(mv_blk_x) == exp_x[i] && int'(mv_blk_y) == exp_y[i],
          $sformatf("block %0d position %0d,%0d", i, mv_blk_x, mv_blk_y));
    check(int'(mv.x) == exp_mvx[i] && int'(mv.y) == exp_mvy[i],
          $sformatf("block %0d mv (%0d,%0d) exp (%0d,%0d)", i, mv.x, mv.y, exp_mvx[i], exp_mvy[i]));
    check(int'(mv_sad) == exp_sad[i], $sformatf("block %0d sad %0d exp %0d", i, mv_sad, exp_sad[i]));
    check(int'(mv_core) == exp_core[i], $sformatf("block %0d core %0d exp %0d", i, mv_core, exp_core[i]));
    check(mv_last == (i % BPF == BPF - 1), $sformatf("block %0d last flag", i));
    check(int'(mv_d) == frame_d[i / BPF], $sformatf("block %0d d %0d exp %0d", i, mv_d, frame_d[i / BPF]));
    if (i / BPF < STALL_FR) begin
      check(cycle - first_fetch[i] <= 479,
            $sformatf("block %0d latency %0d > 479", i, cycle - first_fetch[i]));
      if (i % BPF != 0)
        check(first_fetch[i] - first_fetch[i-1] <= 340 && first_fetch[i] - first_fetch[i-1] >= 170,
              $sformatf("block %0d fill period %0d", i, first_fetch[i] - first_fetch[i-1]));
    end
    n_out <= n_out + 1;
    if (i == N_BLK - 1) begin
      check(cov_early > 0,     "no early small diamond");
      check(cov_limit > 0,     "iteration limit never reached");
      check(cov_sector > 0,    "no sector core ever won");
      check(cov_center > 0,    "centre core never won");
      check(cov_refill > 0,    "no second window fill");
      check(cov_skip > 0,      "no core skipped in the second round");
      check(cov_long > 0,      "no search longer than one window");
      check(cov_mem_stall > 0, "memory never stalled");
      $display("coverage: early=%0d limit=%0d long=%0d sector_wins=%0d centre_wins=%0d refills=%0d skips=%0d mem_stall=%0d",
               cov_early, cov_limit, cov_long, cov_sector, cov_center, cov_refill, cov_skip, cov_mem_stall);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
