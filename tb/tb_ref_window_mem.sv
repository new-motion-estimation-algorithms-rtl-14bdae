// tb_ref_window_mem: fills the 34x34 reference window row by row in a
// shuffled order, checks the row valid bits after every write and after
// 'clear', and compares random 6x12 patch reads (including reads that run
// off the window edges, which must return zero) with a testbench copy.
`timescale 1ns/1ps
module tb_ref_window_mem;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  clear, we;
  pos_t                  wrow;
  win_row_t              wdata;
  logic [WIN-1:0]        row_valid;
  logic signed [POS_W:0] base_x, base_y;
  pix_t                  patch [6][12];

  ref_window_mem dut (.*);

  int checks = 0, failures = 0;
  int shadow [WIN][WIN];
  logic [WIN-1:0] exp_valid;

  task automatic check_patch();
    int bad;
    bad = 0;
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 12; c++) begin
        int y, x, e;
        y = int'(base_y) + r; x = int'(base_x) + c;
        e = (y >= 0 && y < WIN && x >= 0 && x < WIN) ? shadow[y][x] : 0;
        if (int'(patch[r][c]) != e) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL patch at (%0d,%0d): %0d samples wrong", base_x, base_y, bad);
    end
  endtask

  initial begin
    int order [WIN];
    clear = 0; we = 0; wrow = '0; wdata = '0; base_x = '0; base_y = '0;
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++) shadow[y][x] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < WIN; i++) order[i] = i;
      order.shuffle();
      @(negedge clk);
      clear = 1;
      exp_valid = '0;
      for (int i = 0; i < WIN; i++) begin
        we = 1; wrow = pos_t'(order[i]);
        for (int c = 0; c < WIN; c++) begin
          wdata[c] = pix_t'($urandom);
          shadow[order[i]][c] = int'(wdata[c]);
        end
        exp_valid[order[i]] = 1'b1;
        @(negedge clk);
        clear = 0;
        checks++;
        if (row_valid !== exp_valid) begin failures++; $display("FAIL valid bits after row %0d", order[i]); end
        base_x = (POS_W+1)'($urandom_range(0, 36)) - 2;
        base_y = (POS_W+1)'($urandom_range(0, 36)) - 2;
        #1 check_patch();
      end
      we = 0;
      for (int t = 0; t < 100; t++) begin
        @(negedge clk);
        base_x = (POS_W+1)'($urandom_range(0, 36)) - 2;
        base_y = (POS_W+1)'($urandom_range(0, 36)) - 2;
        #1 check_patch();
      end
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (row_valid !== '0) begin failures++; $display("FAIL clear"); end
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
