// core_comparator: picks the best of the five diamond-search cores' results
// (centre core 0 and sector cores A..D) in three pipelined cycles.
//
//   stage 1: min(core 0, core A) and min(core B, core C); core D waits
//   stage 2: minimum of the two winners
//   stage 3: minimum of that and core D
// On equal SADs the lower core index wins, so the centre core (plain
// diamond search) is preferred. A TAG_W-bit tag travels with the data
// (block position and frame marks). out_valid follows in_valid by exactly
// three cycles; there is no back-pressure. The three-cycle latency is the
// document's; the pairing of the stages is this design's choice.
module core_comparator
  import me_pkg::*;
#(
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  sad_t             sad [N_CORES],
  input  vec_t             vec [N_CORES],
  input  logic [TAG_W-1:0] tag,
  output logic             out_valid,
  output sad_t             out_sad,
  output vec_t             out_vec,
  output logic [2:0]       out_core,
  output logic [TAG_W-1:0] out_tag
);

  typedef struct packed {
    sad_t       sad;
    vec_t       vec;
    logic [2:0] core;
  } cand_t;

  function automatic cand_t pick(input cand_t a, input cand_t b);
    return (b.sad < a.sad) ? b : a;   // a has the lower index
  endfunction

  cand_t            s1_w01, s1_w23, s1_d, s2_w, s2_d, s3_w;
  logic [2:0]       v;
  logic [TAG_W-1:0] t1, t2, t3;
  cand_t            c [N_CORES];

  always_comb
    for (int i = 0; i < N_CORES; i++) c[i] = '{sad: sad[i], vec: vec[i], core: 3'(i)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      s1_w01 <= '0; s1_w23 <= '0; s1_d <= '0; s2_w <= '0; s2_d <= '0; s3_w <= '0;
      t1 <= '0; t2 <= '0; t3 <= '0;
    end else begin
      v      <= {v[1:0], in_valid};
      s1_w01 <= pick(c[0], c[1]);
      s1_w23 <= pick(c[2], c[3]);
      s1_d   <= c[4];
      t1     <= tag;
      s2_w   <= pick(s1_w01, s1_w23);
      s2_d   <= s1_d;
      t2     <= t1;
      s3_w   <= pick(s2_w, s2_d);
      t3     <= t2;
    end
  end

  assign out_valid = v[2];
  assign out_sad   = s3_w.sad;
  assign out_vec   = s3_w.vec;
  assign out_core  = s3_w.core;
  assign out_tag   = t3;

endmodule
