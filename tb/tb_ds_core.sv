// tb_ds_core: one diamond-search core against the software model.
//
// For 40 blocks of the synthetic video and start points at the centre and
// at (+-d, +-d), the core's window is filled the way the feeder does it
// (rows 11..22 first, one row per cycle, current rows on the first eight
// beats) and its result (vector, SAD, number of large diamonds) is compared
// with the model. With a back-to-back fill the result must be ready at
// most 169 cycles after the start pulse, the document's worst case for a
// core. Some blocks are filled with random gaps (the search then waits for
// missing rows) and some results are held back with res_ready low while
// the next block is already being filled.
`timescale 1ns/1ps
module tb_ds_core;
  import me_pkg::*;
  import me_model_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, idle, ref_we, cur_we, res_valid, res_ready, searching, paused;
  vec_t org_off;
  pos_t ref_row;
  win_row_t ref_data;
  logic [2:0] cur_row;
  blk_row_t cur_data;
  core_result_t res;

  ds_core dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int exp_q[$], start_q[$], slow_q[$];
  bit prev_hold;
  int n_res = 0;
  int cov_limit = 0, cov_early = 0, cov_wait = 0, cov_hold = 0, max_lat = 0;

  task automatic fill(input int f, input int bx, input int by, input int sx, input int sy,
                      input bit slow);
    for (int b = 0; b < WIN; b++) begin
      int r;
      r = (b < 12) ? b + 11 : (b < 23) ? b - 12 : b;
      @(negedge clk);
      start = (b == 0);
      if (b == 0) start_q.push_back(cycle);
      ref_we = 1; ref_row = pos_t'(r);
      for (int c = 0; c < WIN; c++)
        ref_data[c] = pix_t'(ref_pix(f, bx + sx - CENTER + c, by + sy - CENTER + r));
      cur_we = (b < BLK); cur_row = 3'(b);
      for (int c = 0; c < BLK; c++) cur_data[c] = pix_t'(cur_pix(f, bx + c, by + b));
      if (slow && b >= 12) begin
        @(negedge clk);
        start = 0; ref_we = 0; cur_we = 0;
        repeat ($urandom_range(0, 6)) @(negedge clk);
      end
    end
    @(negedge clk);
    start = 0; ref_we = 0; cur_we = 0;
  endtask

  // results
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    int emx, emy, esad, enl, st, sl;
    emx = exp_q.pop_front(); emy = exp_q.pop_front(); esad = exp_q.pop_front(); enl = exp_q.pop_front();
    checks++;
    if (int'(res.vec.x) != emx || int'(res.vec.y) != emy || int'(res.sad) != esad || int'(res.ldsp) != enl) begin
      failures++;
      $display("FAIL got (%0d,%0d) sad %0d n %0d exp (%0d,%0d) sad %0d n %0d",
               res.vec.x, res.vec.y, res.sad, res.ldsp, emx, emy, esad, enl);
    end
  end

  // latency of results produced while nothing is held back
  always @(posedge clk) if (rst_n) begin
    if (res_valid && res_ready) begin
      int st, sl, lat;
      n_res++;
      st = start_q.pop_front(); sl = slow_q.pop_front();
      lat = cycle - st;
      if (!sl) begin
        checks++;
        if (lat > max_lat) max_lat = lat;
        if (lat > 169) begin failures++; $display("FAIL latency %0d > 169 (result %0d)", lat, n_res); end
      end
    end
    if (dut.u_ctrl.state == dut.u_ctrl.S_WAIT_ROWS && !dut.u_ctrl.rows_ok) cov_wait++;
    if (res_valid && !res_ready) cov_hold++;
  end

  initial begin
    start = 0; ref_we = 0; cur_we = 0; ref_row = '0; ref_data = '0; cur_row = '0; cur_data = '0;
    res_ready = 1;
    prev_hold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int f, bx, by, k, d, sx, sy;
      bit slow, hold;
      ds_res_t m;
      f = t % 4; bx = 100 + 8 * t; by = 60 + 8 * (t % 3);
      k = t % 5; d = 5 + (t % 4) * 4;
      sx = start_x(k, d); sy = start_y(k, d);
      slow = (t % 7 == 3);
      hold = (t % 6 == 5);
      m = ds_search(f, bx, by, sx, sy, 5);
      if (m.limit) cov_limit++;
      if (m.early) cov_early++;
      exp_q.push_back(m.mvx - sx); exp_q.push_back(m.mvy - sy);
      exp_q.push_back(m.sad);      exp_q.push_back(m.n_ldsp);
      slow_q.push_back(slow || hold || prev_hold || ((t + 1) % 6 == 5));
      prev_hold = hold;
      while (!idle) @(negedge clk);
      if (hold) res_ready = 0;
      fill(f, bx, by, sx, sy, slow);
      if (hold) begin
        // the next block gets filled while this result is held back
        repeat (200) @(negedge clk);
        res_ready = 1;
      end
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks += 4;
    if (cov_limit == 0) begin failures++; $display("FAIL no iteration limit"); end
    if (cov_early == 0) begin failures++; $display("FAIL no early stop"); end
    if (cov_wait == 0)  begin failures++; $display("FAIL never waited for rows"); end
    if (cov_hold == 0)  begin failures++; $display("FAIL result never held"); end
    $display("coverage: limit=%0d early=%0d row_wait=%0d hold=%0d max_latency=%0d",
             cov_limit, cov_early, cov_wait, cov_hold, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
