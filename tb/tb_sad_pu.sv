// tb_sad_pu: self-checking test of the SAD processing unit. Random 8x8
// block pairs (including all-equal and all-extreme ones) are fed two lines
// per cycle, back to back and with gaps; every result is compared with a
// SAD computed in the testbench, and the result must appear exactly five
// cycles after the last beat.
`timescale 1ns/1ps
module tb_sad_pu;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, first = 0, last = 0, sad_valid;
  line_pair_t cur, cand;
  sad_t sad;

  sad_pu dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int exp_q[$], last_cycle_q[$];

  always @(posedge clk) if (rst_n && sad_valid) begin
    int e, lc;
    checks += 2;
    e  = exp_q.pop_front();
    lc = last_cycle_q.pop_front();
    if (int'(sad) != e) begin failures++; $display("FAIL sad %0d exp %0d", sad, e); end
    if (cycle - lc != 5) begin failures++; $display("FAIL latency %0d", cycle - lc); end
  end

  initial begin
    pix_t a [8][8], b [8][8];
    int   s;
    cur = '0; cand = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      s = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          case (t)
            0: begin a[r][c] = 8'd255; b[r][c] = 8'd0;   end
            1: begin a[r][c] = 8'd77;  b[r][c] = 8'd77;  end
            2: begin a[r][c] = 8'd0;   b[r][c] = 8'd255; end
            default: begin a[r][c] = pix_t'($urandom); b[r][c] = pix_t'($urandom); end
          endcase
          s += (a[r][c] > b[r][c]) ? a[r][c] - b[r][c] : b[r][c] - a[r][c];
        end
      exp_q.push_back(s);
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        in_valid = 1; first = (k == 0); last = (k == 3);
        for (int r = 0; r < 2; r++) begin
          cur[r]  = {a[2*k+r][7], a[2*k+r][6], a[2*k+r][5], a[2*k+r][4],
                     a[2*k+r][3], a[2*k+r][2], a[2*k+r][1], a[2*k+r][0]};
          cand[r] = {b[2*k+r][7], b[2*k+r][6], b[2*k+r][5], b[2*k+r][4],
                     b[2*k+r][3], b[2*k+r][2], b[2*k+r][1], b[2*k+r][0]};
        end
        if (k == 3) last_cycle_q.push_back(cycle);
      end
      if (t % 3 == 0) begin
        @(negedge clk);
        in_valid = 0; first = 0; last = 0;
        cur = '1; cand = '0;             // ignored while not valid
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
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
