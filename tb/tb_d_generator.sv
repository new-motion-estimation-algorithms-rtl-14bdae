// tb_d_generator: drives frame starts and frame SAD totals into the d
// generator and checks the d of every frame against a model of the
// trial sequence (d, d-delta, d+delta; best total wins; delta halves down
// to 1), including the document's opening sequence 10, 5, 15, ties, the
// clamps at 0 and D_MAX, and d_ready staying low while a new group would
// need results that are not in yet.
`timescale 1ns/1ps
module tb_d_generator;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, d_ready, frame_done;
  logic [7:0] d_next, d_base, delta;
  logic [31:0] frame_sad;

  d_generator dut (.*);

  int checks = 0, failures = 0;
  int md = 10, mdelta = 5, tsad [3];
  int cov_zero = 0, cov_stall = 0, cov_lo = 0, cov_hi = 0, cov_keep = 0;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    frame_start = 0; frame_done = 0; frame_sad = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      int tr, ed, lo, hi;
      tr = f % 3;
      lo = (md > mdelta) ? md - mdelta : 0;
      hi = (md + mdelta > 40) ? 40 : md + mdelta;
      ed = (tr == 0) ? md : (tr == 1) ? lo : hi;
      @(negedge clk);
      if (tr == 0 && f > 0) begin
        // the previous frame is still open: a new group must wait
        checks++;
        if (d_ready) begin failures++; $display("FAIL d_ready high with a frame open"); end
        else cov_stall++;
        frame_done = 1;
        frame_sad  = 32'(tsad[2]);
        @(negedge clk);
        frame_done = 0;
        // model update for the finished group
        if (tsad[1] < tsad[0] && tsad[1] <= tsad[2]) begin md = (md > mdelta) ? md - mdelta : 0; cov_lo++; end
        else if (tsad[2] < tsad[0] && tsad[2] < tsad[1]) begin md = (md + mdelta > 40) ? 40 : md + mdelta; cov_hi++; end
        else cov_keep++;
        mdelta = (mdelta > 1) ? mdelta / 2 : 1;
        ed = md;
      end else if (f > 0) begin
        frame_done = 1;
        frame_sad  = 32'(tsad[(f - 1) % 3]);
      end
      if (tr == 1 && md == 0) cov_zero++;
      if (f < 3) expect_eq(int'(d_next), (f == 0) ? 10 : (f == 1) ? 5 : 15, "opening sequence");
      checks++;
      if (!d_ready) begin failures++; $display("FAIL d_ready low at frame %0d", f); end
      expect_eq(int'(d_next), ed, $sformatf("d of frame %0d", f));
      frame_start = 1;
      @(negedge clk);
      frame_start = 0; frame_done = 0;
      // SAD total of this frame, produced later
      case (f % 9)
        0, 3: tsad[tr] = 1000 + $urandom_range(0, 3) * 10;   // ties possible
        4, 5: tsad[tr] = 1000 - tr * 100;                     // d + delta wins
        6, 7, 8: tsad[tr] = 1000;                             // full tie: keep d
        default: tsad[tr] = $urandom_range(500, 2000);
      endcase
      if (f >= 9 && f < 48) tsad[tr] = (tr == 1) ? 900 : 1000; // push d down to 0
      if (f >= 48) tsad[tr] = 1000 - tr * 100;
      repeat (2) @(negedge clk);
    end
    expect_eq(int'(delta), 1, "delta settles at 1");
    checks += 3;
    if (cov_stall == 0 || cov_lo + cov_hi == 0 || cov_keep == 0 || cov_zero == 0) begin
      failures++; $display("FAIL coverage stall=%0d lo=%0d hi=%0d keep=%0d", cov_stall, cov_lo, cov_hi, cov_keep);
    end
    $display("coverage: zero_clamp=%0d stall=%0d lo=%0d hi=%0d keep=%0d final d=%0d", cov_zero, cov_stall, cov_lo, cov_hi, cov_keep, md);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
