// tb_mpds_feeder: the core feeder with stand-in cores, memory and d
// generator. Every accepted fetch beat is checked against the expected
// sequence: cores 0, A, B, C, D in turn, 34 beats each, rows 11..22 then
// 0..10 then 23..33, window corner at block + start point - 13, current
// rows on the first eight beats, write strobes to the right core only and
// the start pulse on beat 0 of an idle core. Also checked: one tag per
// block with the frame's d, frame_start on each frame's first block only
// after d_ready, and, with an always-ready memory and idle cores, blocks
// exactly 170 cycles apart. Later blocks run with busy cores, memory wait
// states and d_ready held low.
`timescale 1ns/1ps
module tb_mpds_feeder;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic blk_valid, blk_ready, blk_last, d_ready, frame_start;
  coord_t blk_x, blk_y;
  dist_t d_next;
  logic fetch_valid, fetch_ready;
  fetch_t fetch;
  win_row_t ref_data;
  blk_row_t cur_data;
  logic [N_CORES-1:0] core_idle, core_start, ref_we, cur_we;
  logic [N_CORES-1:0] core_searching = '0, core_paused = '0;   // single-pass mode
  vec_t core_off [N_CORES] = '{default: '0};
  pos_t ref_row;
  win_row_t ref_wdata;
  logic [2:0] cur_row;
  blk_row_t cur_wdata;
  logic tag_push, tag_full;
  blk_tag_t tag;

  mpds_feeder dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int N_BLK = 24, BPF = 3;
  int bx[N_BLK], by[N_BLK], bd[N_BLK];
  int phase2;               // first block with stalls

  // memory stand-in: sample value encodes its coordinates
  always_comb begin
    for (int c = 0; c < WIN; c++) ref_data[c] = pix_t'(fetch.ref_x + c + 3 * fetch.ref_y);
    for (int c = 0; c < BLK; c++) cur_data[c] = pix_t'(fetch.cur_x + c + 5 * fetch.cur_y);
  end

  // core stand-ins: busy for a while after each start
  int busy [N_CORES];
  always @(posedge clk) for (int k = 0; k < N_CORES; k++)
    if (core_start[k]) busy[k] <= (nb_done >= phase2) ? $urandom_range(0, 250) : 0;
    else if (busy[k] > 0) busy[k] <= busy[k] - 1;
  always_comb for (int k = 0; k < N_CORES; k++) core_idle[k] = (busy[k] == 0);

  int nb_done = 0;
  always @(negedge clk) begin
    fetch_ready <= (nb_done < phase2) ? 1'b1 : ($urandom_range(0, 9) < 7);
    tag_full    <= (nb_done < phase2) ? 1'b0 : ($urandom_range(0, 9) < 2);
  end

  // stand-in d generator: d per frame, sometimes not ready
  int fr_started = 0, cov_dwait = 0;
  always @(negedge clk) d_ready <= (nb_done < phase2) ? 1'b1 : ($urandom_range(0, 3) != 0);
  always_comb d_next = dist_t'(3 + 2 * fr_started);
  always @(posedge clk) if (rst_n) begin
    if (frame_start) begin
      chk(d_ready, "frame_start without d_ready");
      fr_started <= fr_started + 1;
    end
    if (blk_valid && !d_ready && !blk_ready) cov_dwait++;
  end

  // beat scoreboard
  int blk = 0, core = 0, beat = 0, first_cycle[N_BLK], n_tags = 0;
  function automatic int sxf(input int k, input int d);
    case (k) 1, 4: return d; 2, 3: return -d; default: return 0; endcase
  endfunction
  function automatic int syf(input int k, input int d);
    case (k) 1, 2: return d; 3, 4: return -d; default: return 0; endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (tag_push) begin
      chk(int'(tag.x) == bx[n_tags] && int'(tag.y) == by[n_tags] && int'(tag.d) == bd[n_tags] &&
          tag.last == (n_tags % BPF == BPF - 1), $sformatf("tag %0d", n_tags));
      chk(!tag_full, "push into a full tag queue");
      n_tags <= n_tags + 1;
    end
    if (fetch_valid && fetch_ready) begin
      int r, ey, ex;
      r  = (beat < 12) ? beat + 11 : (beat < 23) ? beat - 12 : beat;
      ex = bx[blk] + sxf(core, bd[blk]) - 13;
      ey = by[blk] + syf(core, bd[blk]) - 13 + r;
      chk(int'(fetch.ref_x) == ex && int'(fetch.ref_y) == ey && int'(ref_row) == r,
          $sformatf("blk %0d core %0d beat %0d: ref (%0d,%0d) row %0d exp (%0d,%0d) row %0d",
                    blk, core, beat, fetch.ref_x, fetch.ref_y, ref_row, ex, ey, r));
      chk(ref_we == N_CORES'(1 << core) && ref_wdata == ref_data, "reference write strobe/data");
      chk(fetch.cur_en == (beat < 8) && cur_we == ((beat < 8) ? N_CORES'(1 << core) : '0), "current write strobe");
      if (beat < 8)
        chk(int'(fetch.cur_x) == bx[blk] && int'(fetch.cur_y) == by[blk] + beat && int'(cur_row) == beat &&
            cur_wdata == cur_data, "current row address");
      chk(core_start == ((beat == 0) ? N_CORES'(1 << core) : '0), "start pulse on beat 0 only");
      if (beat == 0) chk(core_idle[core], "start of a busy core");
      if (beat == 0 && core == 0) begin
        first_cycle[blk] = cycle;
        if (blk > 0 && blk < phase2)
          chk(cycle - first_cycle[blk-1] == 170, $sformatf("block period %0d", cycle - first_cycle[blk-1]));
      end
      if (beat == 33) begin
        beat = 0;
        if (core == 4) begin core = 0; blk = blk + 1; nb_done <= blk; end
        else core = core + 1;
      end else beat = beat + 1;
    end else begin
      chk(core_start == '0 && ref_we == '0 && cur_we == '0, "strobes without a beat");
    end
  end

  initial begin
    phase2 = 9;
    for (int i = 0; i < N_BLK; i++) begin
      bx[i] = 40 + 8 * i; by[i] = 32 + 8 * (i % 3);
      bd[i] = 3 + 2 * (i / BPF);
    end
    blk_valid = 0; blk_x = '0; blk_y = '0; blk_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_BLK; i++) begin
      @(negedge clk);
      blk_valid = 1; blk_x = coord_t'(bx[i]); blk_y = coord_t'(by[i]); blk_last = (i % BPF == BPF - 1);
      @(posedge clk);
      while (!blk_ready) @(posedge clk);
    end
    @(negedge clk);
    blk_valid = 0;
    while (blk < N_BLK) @(posedge clk);
    repeat (3) @(posedge clk);
    chk(n_tags == N_BLK, "one tag per block");
    chk(fr_started == N_BLK / BPF, "one frame_start per frame");
    chk(cov_dwait > 0, "d_ready never held a frame back");
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
