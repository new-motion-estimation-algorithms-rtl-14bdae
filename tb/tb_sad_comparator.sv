// tb_sad_comparator: random and tie-heavy SAD sets for the 9-input (centre
// preferred) and 5-input (first preferred) comparators, checked against a
// direct search in the testbench.
`timescale 1ns/1ps
module tb_sad_comparator;
  import me_pkg::*;

  sad_t       s9 [9], s5 [5], b9, b5;
  logic [3:0] i9;
  logic [2:0] i5;

  sad_comparator #(.N(9), .PREF(4)) dut9 (.sad(s9), .best_idx(i9), .best_sad(b9));
  sad_comparator #(.N(5), .PREF(0)) dut5 (.sad(s5), .best_idx(i5), .best_sad(b5));

  int checks = 0, failures = 0;

  function automatic int ref_idx(input int v [], input int pref);
    int bi;
    bi = pref;
    for (int i = 0; i < v.size(); i++) if (v[i] < v[bi]) bi = i;
    // among equal minima the preferred one, else the lowest index
    if (v[pref] == v[bi]) return pref;
    for (int i = 0; i < v.size(); i++) if (v[i] == v[bi]) return i;
    return bi;
  endfunction

  initial begin
    int v9 [], v5 [];
    v9 = new[9]; v5 = new[5];
    for (int t = 0; t < 2000; t++) begin
      int span;
      span = (t % 3 == 0) ? 4 : 16383;        // small span: many ties
      for (int i = 0; i < 9; i++) begin v9[i] = $urandom_range(0, span); s9[i] = sad_t'(v9[i]); end
      for (int i = 0; i < 5; i++) begin v5[i] = $urandom_range(0, span); s5[i] = sad_t'(v5[i]); end
      #1;
      checks += 2;
      if (int'(i9) != ref_idx(v9, 4) || int'(b9) != v9[ref_idx(v9, 4)]) begin
        failures++; $display("FAIL 9-way got %0d", i9);
      end
      if (int'(i5) != ref_idx(v5, 0) || int'(b5) != v5[ref_idx(v5, 0)]) begin
        failures++; $display("FAIL 5-way got %0d", i5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
