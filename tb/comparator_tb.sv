// comparator_tb: an ideal comparator must decide 1 exactly when I1 > I0
// (p1 above one half); one with an offset of 400 codes must decide 1 only
// when I1 - I0 exceeds 400.
module comparator_tb;
  import hamming_pkg::*;

  prob_t p1;
  logic d0, d1;
  int checks = 0, failures = 0;

  comparator #(.OFFSET(0))   u0 (.p1, .d(d0));
  comparator #(.OFFSET(400)) u1 (.p1, .d(d1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v += 7) begin
      int i1, i0;
      i1 = v;
      i0 = 4096 - v;
      p1 = prob_t'(v);
      #1;
      checks++;
      if (d0 !== (i1 > i0) || d1 !== (i1 - i0 > 400)) begin
        failures++; $display("FAIL p1=%0d: %b %b", v, d0, d1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
