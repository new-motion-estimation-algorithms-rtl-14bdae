// tb_core_comparator: random five-core results (with many equal SADs) go
// into the three-stage comparator every cycle or with gaps; each output
// must be the lowest SAD, lowest core index on ties, with its vector and
// tag, exactly three cycles after the input.
`timescale 1ns/1ps
module tb_core_comparator;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  sad_t sad [N_CORES], out_sad;
  vec_t vec [N_CORES], out_vec;
  logic [15:0] tag, out_tag;
  logic [2:0] out_core;

  core_comparator #(.TAG_W(16)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int sad; int x; int y; int core; int tag; int cyc; } exp_t;
  exp_t q[$];

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (int'(out_sad) != e.sad || int'(out_vec.x) != e.x || int'(out_vec.y) != e.y ||
        int'(out_core) != e.core || int'(out_tag) != e.tag || cycle - e.cyc != 3) begin
      failures++;
      $display("FAIL core %0d sad %0d exp core %0d sad %0d, latency %0d",
               out_core, out_sad, e.core, e.sad, cycle - e.cyc);
    end
  end

  initial begin
    in_valid = 0; tag = '0;
    for (int k = 0; k < N_CORES; k++) begin sad[k] = '0; vec[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      tag = 16'(t);
      e.sad = 1 << 20;
      for (int k = 0; k < N_CORES; k++) begin
        sad[k]   = sad_t'((t % 2) ? $urandom_range(0, 3) : $urandom_range(0, 16383));
        vec[k].x = mv_t'($urandom_range(0, 100) - 50);
        vec[k].y = mv_t'($urandom_range(0, 100) - 50);
        if (int'(sad[k]) < e.sad) begin
          e.sad = int'(sad[k]); e.x = int'(vec[k].x); e.y = int'(vec[k].y); e.core = k;
        end
      end
      e.tag = t; e.cyc = cycle;
      if (in_valid) q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
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
