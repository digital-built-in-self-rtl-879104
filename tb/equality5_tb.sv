// equality5_tb: every outgoing message of the five-edge equality node must be
// the normalised product of the other four incoming messages, computed here in
// floating point; in test mode the three groups must be 8, 8 and 6 bits of XOR
// pairs, and ERR2 must fault only the EQUALITY3 group.
module equality5_tb;
  import hamming_pkg::*;

  logic  test = 0, tx = 0, ty = 0, err2 = 0;
  prob_t e_in [5], e_out [5];
  logic [7:0] resp_a, resp_b;
  logic [5:0] resp_c;
  int checks = 0, failures = 0;

  equality5 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      real p [5];
      for (int k = 0; k < 5; k++) begin
        e_in[k] = prob_t'(800 + $urandom_range(2496));
        p[k] = real'(e_in[k]) / 4096.0;
      end
      #1;
      for (int k = 0; k < 5; k++) begin
        real p1, p0, expv, g;
        p1 = 1.0; p0 = 1.0;
        for (int m = 0; m < 5; m++) if (m != k) begin p1 *= p[m]; p0 *= 1.0 - p[m]; end
        expv = p1 / (p1 + p0);
        g = real'(e_out[k]) / 4096.0;
        checks++;
        if (g - expv > 0.004 || expv - g > 0.004) begin
          failures++;
          $display("FAIL edge %0d: got %f expected %f", k, g, expv);
        end
      end
    end
    test = 1;
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 4; v++) begin
        logic [1:0] p, f;
        err2 = e[0];
        {tx, ty} = 2'(v);
        #1;
        p = (tx ^ ty) ? 2'b10 : 2'b01;
        f = err2 ? 2'b10 : p;
        checks++;
        if (resp_a !== {p, p, p, p} || resp_b !== {p, p, p, p} || resp_c !== {p, p, f}) begin
          failures++;
          $display("FAIL test xy=%b err2=%b: %b %b %b", {tx, ty}, err2, resp_a, resp_b, resp_c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
