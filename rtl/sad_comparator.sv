// sad_comparator: selects the candidate with the lowest SAD.
//
// Combinational. Among equal SADs the preferred index PREF wins (the
// diamond centre, so that a flat SAD surface ends the search), and after it
// the lowest index. Used with N = 9 for the large diamond and N = 5 (the
// centre plus MEM A..D) for the small diamond. The tie rule is this
// design's choice; the document only says the comparator sends the best
// block on.
module sad_comparator
  import me_pkg::*;
#(
  parameter int N    = 9,
  parameter int PREF = 4
) (
  input  sad_t                     sad [N],
  output logic [$clog2(N)-1:0]     best_idx,
  output sad_t                     best_sad
);

  always_comb begin
    best_idx = ($clog2(N))'(PREF);
    best_sad = sad[PREF];
    for (int i = 0; i < N; i++)
      if (sad[i] < best_sad) begin
        best_idx = ($clog2(N))'(i);
        best_sad = sad[i];
      end
  end

endmodule
