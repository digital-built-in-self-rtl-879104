// check4_tb: every outgoing message of the four-edge check node must be the
// parity (XOR) combination of the other three incoming messages,
// p1 = (1 - prod(1 - 2 p_i)) / 2, computed here in floating point; in test
// mode the two groups must be 8 and 10 bits of XOR pairs, and ERR1 must fault
// only the CHECK3_1NG group.
module check4_tb;
  import hamming_pkg::*;

  logic  test = 0, tx = 0, ty = 0, err1 = 0;
  prob_t e_in [4], e_out [4];
  logic [7:0] resp_a;
  logic [9:0] resp_b;
  int checks = 0, failures = 0;

  check4 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      real p [4];
      for (int k = 0; k < 4; k++) begin
        e_in[k] = prob_t'(200 + $urandom_range(3696));
        p[k] = real'(e_in[k]) / 4096.0;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        real prod, expv, g;
        prod = 1.0;
        for (int m = 0; m < 4; m++) if (m != k) prod *= (1.0 - 2.0 * p[m]);
        expv = (1.0 - prod) / 2.0;
        g = real'(e_out[k]) / 4096.0;
        checks++;
        if (g - expv > 0.003 || expv - g > 0.003) begin
          failures++;
          $display("FAIL edge %0d: got %f expected %f", k, g, expv);
        end
      end
    end
    test = 1;
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 4; v++) begin
        logic [1:0] p, f;
        err1 = e[0];
        {tx, ty} = 2'(v);
        #1;
        p = (tx ^ ty) ? 2'b10 : 2'b01;
        f = err1 ? 2'b10 : p;
        checks++;
        if (resp_a !== {p, p, f, f} || resp_b !== {p, p, p, p, p}) begin
          failures++;
          $display("FAIL test xy=%b err1=%b: %b %b", {tx, ty}, err1, resp_a, resp_b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
