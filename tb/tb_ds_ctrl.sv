// tb_ds_ctrl: the diamond-search control unit on its own. The testbench
// plays the processing units and comparators: five cycles after each last
// PU beat it returns a scripted best candidate. For directed and random
// decision sequences it checks the final vector and large-diamond count
// against a model of the position controllers, that the iteration limit
// stops the search after 1 + 5 large diamonds (with a reload of MEM A..D
// before the small diamond), that a centre win goes to the small diamond
// without a reload, that local memories are only loaded from reference
// rows that have arrived, and that the result waits in its register while
// res_ready is low. A second instance with MAX_ITER = 11 checks the pause
// after every six moving large diamonds: the reported offset from the
// start point, that the pause holds until the next start, that the resumed
// search waits for the new rows, and the final vector after up to
// 1 + 11 large diamonds. Both instances run side by side; the decision
// scripts and the position-controller model are this testbench's own.
`timescale 1ns/1ps
module tb_ds_ctrl;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // h[0]: the default five-iteration control; h[1]: MAX_ITER = 11, which
  // pauses after every six moving large diamonds for a second window
  for (genvar g = 0; g < 2; g++) begin : h
    localparam int MI = g ? 11 : 5;
    logic searching, paused;
    vec_t org_off;
    logic start, idle, lm_we, pu_in_valid, pu_first, pu_last, sdsp_mode, pu_sad_valid;
    logic [WIN-1:0] row_valid;
    logic signed [POS_W:0] base_x, base_y;
    logic [1:0] lm_wpair, pu_pair;
    logic [3:0] ldsp_best_idx;
    sad_t ldsp_best_sad, sdsp_best_sad, center_sad;
    logic [2:0] sdsp_best_idx;
    logic res_valid, res_ready;
    core_result_t res;

    ds_ctrl #(.MAX_ITER(MI)) dut (.*);

    int checks = 0, failures = 0, pauses = 0;
    bit done = 0;
    task automatic chk(input bit ok, input string what);
      checks++;
      if (!ok) begin failures++; $display("FAIL %s", what); end
    endtask

    // scripted decisions
    int ldsp_script[$], sdsp_script[$];
    int loads_in_sdsp = 0, sdsp_runs = 0;
    logic [4:0] last_sh;
    always @(posedge clk) begin
      last_sh <= {last_sh[3:0], pu_in_valid & pu_last};
      pu_sad_valid <= last_sh[3];
    end
    always_comb begin
      ldsp_best_idx = 4'(ldsp_script.size() ? ldsp_script[0] : 4);
      ldsp_best_sad = sad_t'(100);
      sdsp_best_idx = 3'(sdsp_script.size() ? sdsp_script[0] : 0);
      sdsp_best_sad = sad_t'(50);
    end
    always @(posedge clk) if (rst_n && pu_sad_valid) begin
      if (!sdsp_mode) void'(ldsp_script.pop_front());
      else            void'(sdsp_script.pop_front());
    end
    // local memories are loaded only from rows that have arrived
    always @(posedge clk) if (rst_n && lm_we) begin
      for (int r = 0; r < 6; r++) begin
        int y;
        y = int'(base_y) + r;
        if (y >= 0 && y < WIN && !row_valid[y]) begin
          failures++; $display("FAIL load from missing row %0d", y);
        end
      end
      if (sdsp_mode) loads_in_sdsp++;
    end
    always @(posedge clk) if (rst_n && pu_in_valid && pu_first && sdsp_mode) sdsp_runs++;

    function automatic int ldx(input int i);
      int t[9] = '{0, -1, 1, -2, 0, 2, -1, 1, 0};
      return t[i];
    endfunction
    function automatic int ldy(input int i);
      int t[9] = '{-2, -1, -1, 0, 0, 0, 1, 1, 2};
      return t[i];
    endfunction
    function automatic int sdx(input int i);
      int t[5] = '{0, 0, -1, 1, 0};
      return t[i];
    endfunction
    function automatic int sdy(input int i);
      int t[5] = '{0, -1, 0, 0, 1};
      return t[i];
    endfunction

    // results as they leave the register
    core_result_t got;
    int n_res = 0, got_n;
    always @(posedge clk) if (rst_n && res_valid && res_ready) begin
      got <= res;
      n_res <= n_res + 1;
    end

    // run one search with the given decisions, return after the result
    task automatic run(input int l[$], input int s, input bit slow_rows, input bit hold,
                       input bit exp_reload);
      int ex, ey, n, lr0, sr0, pauses_here;
      pauses_here = 0;
      ex = 0; ey = 0; n = 0;
      for (int i = 0; i < l.size(); i++) begin
        n++;
        if (l[i] == 4) break;
        ex += ldx(l[i]); ey += ldy(l[i]);
        if (n == MI + 1) break;
      end
      ex += sdx(s); ey += sdy(s);
      ldsp_script = l; sdsp_script = {s};
      lr0 = loads_in_sdsp; sr0 = sdsp_runs;
      res_ready = !hold;
      @(negedge clk);
      chk(idle, "idle before start");
      start = 1;
      row_valid = slow_rows ? '0 : '1;
      @(negedge clk);
      start = 0;
      got_n = n_res;
      if (slow_rows)
        for (int r = 0; r < WIN && n_res == got_n && !res_valid; r++) begin
          repeat (3) @(negedge clk);
          row_valid[(r + 11) % WIN] = 1'b1;
        end
      while (n_res == got_n) begin
        if (hold && res_valid) begin
          repeat (10) @(negedge clk);
          chk(res_valid, "result held while res_ready is low");
          res_ready = 1;
        end
        if (paused) begin
          int px, py;
          // a pause comes after every six large diamonds that keep moving
          px = 0; py = 0;
          for (int i = 0; i < 6 * (pauses_here + 1); i++) begin px += ldx(l[i]); py += ldy(l[i]); end
          chk(int'(org_off.x) == px && int'(org_off.y) == py,
              $sformatf("pause offset (%0d,%0d) exp (%0d,%0d)", org_off.x, org_off.y, px, py));
          chk(!searching && !idle, "paused core is neither searching nor idle");
          pauses_here++; pauses++;
          repeat (4) @(negedge clk);
          chk(paused, "pause holds until the next start");
          start = 1; row_valid = '0;
          @(negedge clk);
          start = 0;
          repeat (3) @(negedge clk);
          chk(paused == 0 && searching, "resumed search waits for rows");
          row_valid = '1;
        end
        @(negedge clk);
      end
      chk(pauses_here == (n - 1) / 6, $sformatf("%0d pauses for %0d large diamonds", pauses_here, n));
      chk(int'(got.vec.x) == ex && int'(got.vec.y) == ey && int'(got.ldsp) == n,
          $sformatf("vector (%0d,%0d) n %0d exp (%0d,%0d) n %0d", got.vec.x, got.vec.y, got.ldsp, ex, ey, n));
      chk(sdsp_runs - sr0 == 1, "exactly one small diamond");
      chk((loads_in_sdsp - lr0 != 0) == exp_reload, "reload before the small diamond only at the limit");
      @(negedge clk);
    endtask

    initial begin
      start = 0; res_ready = 1; row_valid = '1; last_sh = '0; pu_sad_valid = 0;
      @(posedge rst_n);
      run('{5, 4}, 2, 0, 0, 0);                    // right, then centre; small: left
      run('{4}, 0, 0, 0, 0);                       // centre at once
      if (MI == 5) begin
        run('{8, 8, 8, 8, 8, 8}, 4, 0, 0, 1);      // iteration limit going down
        run('{0, 1, 3, 3, 2, 6, 6}, 1, 1, 1, 1);   // limit, rows arriving slowly, held result
      end else begin
        run('{8, 8, 8, 8, 8, 8, 4}, 3, 0, 0, 0);                   // pause, centre win after
        run('{5, 5, 5, 5, 5, 5, 3, 3, 3, 3, 3, 3}, 0, 0, 1, 1);    // pause, then limit
      end
      for (int t = 0; t < 60; t++) begin
        int l[$], n, nl;
        bit lim;
        l.delete();
        nl = MI + 2;
        n = $urandom_range(1, nl);
        for (int i = 0; i < n; i++) l.push_back((i == n - 1 && n < nl) ? 4 : $urandom_range(0, 8));
        // the limit is reached when the first MI + 1 decisions all leave the centre
        lim = 1;
        for (int i = 0; i < MI + 1 && i < l.size(); i++) if (l[i] == 4) lim = 0;
        if (l.size() < MI + 1) lim = 0;
        run(l, $urandom_range(0, 4), t % 5 == 0, t % 4 == 0, lim);
      end
      done = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (h[0].done && h[1].done);
    if (h[1].pauses == 0) begin
      h[1].failures++; $display("FAIL no pause exercised");
    end
    $display("coverage: pauses=%0d", h[1].pauses);
    $display("TB_RESULT checks=%0d failures=%0d", h[0].checks + h[1].checks, h[0].failures + h[1].failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h[0].checks + h[1].checks, h[0].failures + h[1].failures + 1);
    $finish;
  end
endmodule
