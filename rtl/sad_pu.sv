// sad_pu: processing unit that computes the sum of absolute differences
// (SAD) between an 8x8 current block and one 8x8 candidate block.
//
// Each cycle it takes two block lines (16 sample pairs), so a block needs
// four input beats. The adder tree is pipelined in five stages, as in the
// document: (1) 16 absolute differences, (2) 8 sums, (3) 4 sums, (4) 2 sums,
// (5) the accumulator that adds the beat's partial SAD to the running total.
// 'first' marks the first beat of a block and restarts the accumulator;
// 'last' marks the final beat. sad_valid pulses for one cycle five cycles
// after the 'last' beat and 'sad' then holds the block SAD until the next
// block finishes. The stage split is this design's choice; the document
// gives the stage count and the two-lines-per-cycle rate.
module sad_pu
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       first,
  input  logic       last,
  input  line_pair_t cur,
  input  line_pair_t cand,
  output sad_t       sad,
  output logic       sad_valid
);

  logic [PIX_W-1:0]  s1_ad [16];
  logic [PIX_W:0]    s2_sum [8];
  logic [PIX_W+1:0]  s3_sum [4];
  logic [PIX_W+2:0]  s4_sum [2];
  logic [4:1]        v, f, l;   // valid / first / last of stages 1..4
  sad_t              acc;

  // stage 5 combinational part: the beat's partial SAD and the new total
  sad_t part, nxt;
  always_comb begin
    part = SAD_W'(s4_sum[0]) + SAD_W'(s4_sum[1]);
    nxt  = f[4] ? part : acc + part;
  end

  function automatic logic [PIX_W-1:0] absdiff(input pix_t a, input pix_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; f <= '0; l <= '0;
      acc <= '0; sad <= '0; sad_valid <= 1'b0;
      for (int i = 0; i < 16; i++) s1_ad[i] <= '0;
      for (int i = 0; i < 8; i++)  s2_sum[i] <= '0;
      for (int i = 0; i < 4; i++)  s3_sum[i] <= '0;
      for (int i = 0; i < 2; i++)  s4_sum[i] <= '0;
    end else begin
      // stage 1: absolute differences
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < BLK; c++)
          s1_ad[r*BLK+c] <= absdiff(cur[r][c], cand[r][c]);
      v[1] <= in_valid; f[1] <= first & in_valid; l[1] <= last & in_valid;
      // stage 2..4: adder tree
      for (int i = 0; i < 8; i++) s2_sum[i] <= {1'b0, s1_ad[2*i]} + {1'b0, s1_ad[2*i+1]};
      for (int i = 0; i < 4; i++) s3_sum[i] <= {1'b0, s2_sum[2*i]} + {1'b0, s2_sum[2*i+1]};
      for (int i = 0; i < 2; i++) s4_sum[i] <= {1'b0, s3_sum[2*i]} + {1'b0, s3_sum[2*i+1]};
      v[4:2] <= v[3:1]; f[4:2] <= f[3:1]; l[4:2] <= l[3:1];
      // stage 5: accumulate
      sad_valid <= 1'b0;
      if (v[4]) begin
        acc <= nxt;
        if (l[4]) begin
          sad <= nxt;
          sad_valid <= 1'b1;
        end
      end
    end
  end

endmodule
