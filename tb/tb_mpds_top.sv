// tb_mpds_top: end-to-end test of the MPDS/DMPDS motion estimator at its
// default parameters (DMPDS mode, five iterations, d = 10, delta = 5).
//
// A behavioural frame memory answers the engine's fetches from the
// synthetic video of me_model_pkg. Before the run the testbench works out,
// with the software model, the d of every frame (d, d-delta, d+delta
// trials with delta halving) and the expected vector, SAD and winning core
// of every block; each engine output is compared with it. Frames 0..5 run
// with an always-ready memory and check the timing: consecutive blocks of a
// frame start their fills exactly 170 cycles apart, and every vector is out
// at most 309 cycles after its block's first fetch. Frames 6..8 add random
// memory wait states. Coverage: early small diamond, iteration limit,
// sector-core wins, centre-core wins, d changes, d-generator stalls and
// memory stalls must each happen at least once.
`timescale 1ns/1ps
module tb_mpds_top;
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

  mpds_top dut (.*);

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
  int cov_early = 0, cov_limit = 0, cov_sector = 0, cov_center = 0;

  initial begin
    int d, delta, t_sad[3];
    d = 10; delta = 5;
    for (int f = 0; f < N_FRAMES; f++) begin
      int tr, fd, tot;
      tr = f % 3;
      fd = (tr == 0) ? d : (tr == 1) ? ((d > delta) ? d - delta : 0)
                                     : ((d + delta > 40) ? 40 : d + delta);
      frame_d[f] = fd;
      tot = 0;
      for (int b = 0; b < BPF; b++) begin
        int i, bs;
        ds_res_t r;
        i = f * BPF + b;
        exp_x[i] = 64 + 8 * (b % 2) + 40 * f;
        exp_y[i] = 48 + 8 * (b / 2);
        bs = 1 << 30;
        for (int k = 0; k < 5; k++) begin
          r = ds_search(f, exp_x[i], exp_y[i], start_x(k, fd), start_y(k, fd), 5);
          if (r.early) cov_early++;
          if (r.limit) cov_limit++;
          if (r.sad < bs) begin
            bs = r.sad; exp_mvx[i] = r.mvx; exp_mvy[i] = r.mvy; exp_core[i] = k;
          end
        end
        exp_sad[i] = bs;
        tot += bs;
        if (exp_core[i] == 0) cov_center++; else cov_sector++;
      end
      t_sad[tr] = tot;
      if (tr == 2) begin
        int lo, hi;
        lo = (d > delta) ? d - delta : 0;
        hi = (d + delta > 40) ? 40 : d + delta;
        if (t_sad[1] < t_sad[0] && t_sad[1] <= t_sad[2]) d = lo;
        else if (t_sad[2] < t_sad[0] && t_sad[2] < t_sad[1]) d = hi;
        delta = (delta > 1) ? delta / 2 : 1;
      end
    end
  end

  // ------------------------------------------------------------ frame memory
  int n_xfer = 0;           // fetch beats accepted so far
  int cur_frame;
  int first_fetch[N_BLK];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always_comb begin
    cur_frame = (n_xfer / 170) / BPF;
    if (cur_frame >= N_FRAMES) cur_frame = N_FRAMES - 1;
    for (int c = 0; c < WIN; c++)
      ref_data[c] = pix_t'(ref_pix(cur_frame, int'(fetch.ref_x) + c, int'(fetch.ref_y)));
    for (int c = 0; c < BLK; c++)
      cur_data[c] = pix_t'(cur_pix(cur_frame, int'(fetch.cur_x) + c, int'(fetch.cur_y)));
  end

  int cov_mem_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (fetch_valid && fetch_ready) begin
      if (n_xfer % 170 == 0) first_fetch[n_xfer / 170] <= cycle;
      n_xfer <= n_xfer + 1;
    end
    if (fetch_valid && !fetch_ready) cov_mem_stall++;
  end

  always @(negedge clk)
    fetch_ready <= (cur_frame < STALL_FR) ? 1'b1 : ($urandom_range(0, 9) < 7);

  // ------------------------------------------------------------ blocks in
  int cov_d_stall = 0;
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
        if (i % BPF == 0 && dut.frame_start == 0 && dut.d_ready == 0) cov_d_stall++;
        @(posedge clk);
      end
    end
    @(negedge clk);
    blk_valid = 0;
  end

  // ------------------------------------------------------------ results
  int n_out = 0, cov_d_change = 0;
  dist_t last_d = dist_t'(10);
  always @(posedge clk) if (rst_n) begin
    if (d_base != last_d) begin cov_d_change++; last_d <= d_base; end
  end

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
      check(cycle - first_fetch[i] <= 309,
            $sformatf("block %0d latency %0d > 309", i, cycle - first_fetch[i]));
      if (i % BPF != 0)
        check(first_fetch[i] - first_fetch[i-1] == 170,
              $sformatf("block %0d fill period %0d", i, first_fetch[i] - first_fetch[i-1]));
    end
    n_out <= n_out + 1;
    if (i == N_BLK - 1) begin
      check(cov_early > 0,     "no early small diamond");
      check(cov_limit > 0,     "iteration limit never reached");
      check(cov_sector > 0,    "no sector core ever won");
      check(cov_center > 0,    "centre core never won");
      check(cov_d_change > 0,  "d never changed");
      check(cov_d_stall > 0,   "d generator never stalled the feeder");
      check(cov_mem_stall > 0, "memory never stalled");
      $display("coverage: early=%0d limit=%0d sector_wins=%0d centre_wins=%0d d_changes=%0d d_stall=%0d mem_stall=%0d",
               cov_early, cov_limit, cov_sector, cov_center, cov_d_change, cov_d_stall, cov_mem_stall);
      $display("frame d: %0d %0d %0d %0d %0d %0d %0d %0d %0d", frame_d[0], frame_d[1], frame_d[2],
               frame_d[3], frame_d[4], frame_d[5], frame_d[6], frame_d[7], frame_d[8]);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // the d each block used, seen at the tag queue
  always @(posedge clk) if (rst_n && dut.tag_push) begin
    int b;
    b = n_xfer / 170;
    check(int'(dut.tag_in.d) == frame_d[b / BPF],
          $sformatf("block %0d used d=%0d exp %0d", b, dut.tag_in.d, frame_d[b / BPF]));
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
