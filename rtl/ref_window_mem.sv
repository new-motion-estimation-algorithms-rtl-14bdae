// ref_window_mem: the 34x34 sample reference memory of a diamond-search
// core.
//
// It is filled one full window row (34 samples) per cycle, so a complete
// fill takes 34 cycles. A valid bit per row tells the core's control which
// rows have arrived, so the search can start as soon as the rows of the
// first large diamond are in while the rest are still being written.
// 'clear' drops all valid bits at the start of a new block.
//
// Read port: a combinational 6-row by 12-column patch whose top-left corner
// is (base_x, base_y). That patch holds, for one line pair of the block,
// every line of all 13 diamond candidates around a centre: rows
// centre_y-2 .. centre_y+3 and columns centre_x-2 .. centre_x+9. Patch
// positions outside the window read as zero (only unused candidates ever
// reach them). The memory size is the document's; the row-wide write port,
// the valid bits and the patch read port are this design's choices.
module ref_window_mem
  import me_pkg::*;
#(
  parameter int PATCH_H = 6,
  parameter int PATCH_W = BLK + 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  we,
  input  pos_t                  wrow,
  input  win_row_t              wdata,
  output logic [WIN-1:0]        row_valid,
  input  logic signed [POS_W:0] base_x,
  input  logic signed [POS_W:0] base_y,
  output pix_t                  patch [PATCH_H][PATCH_W]
);

  win_row_t mem [WIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= '0;
      for (int i = 0; i < WIN; i++) mem[i] <= '0;
    end else begin
      if (clear) row_valid <= '0;
      if (we && int'(wrow) < WIN) begin
        mem[wrow] <= wdata;
        row_valid[wrow] <= 1'b1;
      end
    end
  end

  // Row selection first (six window rows), then column selection: far
  // smaller than selecting each of the 13 candidate lines independently.
  win_row_t sel_row [PATCH_H];

  always_comb begin
    for (int r = 0; r < PATCH_H; r++) begin
      int y;
      y = int'(base_y) + r;
      sel_row[r] = (y >= 0 && y < WIN) ? mem[y] : '0;
    end
    for (int r = 0; r < PATCH_H; r++)
      for (int c = 0; c < PATCH_W; c++) begin
        int x;
        x = int'(base_x) + c;
        patch[r][c] = (x >= 0 && x < WIN) ? sel_row[r][x] : '0;
      end
  end

endmodule
