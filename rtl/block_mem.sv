// block_mem: 8x8 sample memory used for the 13 local candidate memories
// (MEM 1..9 for the large diamond, MEM A..D for the small diamond) and for
// the current-block memory of a diamond-search core.
//
// Write port: two lines per cycle (line pair 'wpair', lines 2*wpair and
// 2*wpair+1), each line with its own enable, so a caller can also write a
// single line per cycle. Read port: the line pair 'rpair', combinational,
// which is what a processing unit consumes each cycle. The contents are
// registers cleared by reset. The document gives the memories' role and
// size; the port shape is this design's choice.
module block_mem
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] we,      // we[0]: line 2*wpair, we[1]: line 2*wpair+1
  input  logic [1:0] wpair,
  input  line_pair_t wdata,
  input  logic [1:0] rpair,
  output line_pair_t rdata
);

  blk_row_t mem [BLK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BLK; i++) mem[i] <= '0;
    end else begin
      for (int j = 0; j < 2; j++)
        if (we[j]) mem[{wpair, j[0]}] <= wdata[j];
    end
  end

  always_comb begin
    rdata[0] = mem[{rpair, 1'b0}];
    rdata[1] = mem[{rpair, 1'b1}];
  end

endmodule
