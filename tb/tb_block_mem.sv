// tb_block_mem: writes random line pairs (both lines, single lines) into
// the 8x8 block memory and checks every read against a testbench copy.
`timescale 1ns/1ps
module tb_block_mem;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] we, wpair, rpair;
  line_pair_t wdata, rdata;
  blk_row_t   shadow [8];

  block_mem dut (.*);

  int checks = 0, failures = 0;

  initial begin
    we = '0; wpair = '0; rpair = '0; wdata = '0;
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check the read port before changing anything
      rpair = 2'($urandom);
      #1;
      checks++;
      if (rdata[0] !== shadow[{rpair, 1'b0}] || rdata[1] !== shadow[{rpair, 1'b1}]) begin
        failures++;
        $display("FAIL read pair %0d", rpair);
      end
      we    = 2'($urandom);
      wpair = 2'($urandom);
      for (int j = 0; j < 2; j++)
        for (int c = 0; c < 8; c++) wdata[j][c] = pix_t'($urandom);
      @(posedge clk);
      for (int j = 0; j < 2; j++) if (we[j]) shadow[{wpair, j[0]}] = wdata[j];
    end
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
