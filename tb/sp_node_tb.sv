// sp_node_tb: checks both unidirectional node types against the sum-product
// equations evaluated in floating point, and their test-mode truth table
// (differential XOR, Table 5.1 of the design notes) with and without the
// error-injection switch and with one or two output pairs.
module sp_node_tb;
  import hamming_pkg::*;

  logic  test = 0, tx = 0, ty = 0, err = 0;
  prob_t px = 0, py = 0, pz_c, pz_e;
  logic [3:0] tr_c;
  logic [1:0] tr_e;
  int checks = 0, failures = 0;

  sp_node #(.IS_CHECK(1'b1), .NPAIR(2)) u_chk (.test, .tx, .ty, .err, .px, .py, .pz(pz_c), .tresp(tr_c));
  sp_node #(.IS_CHECK(1'b0), .NPAIR(1)) u_eq  (.test, .tx, .ty, .err, .px, .py, .pz(pz_e), .tresp(tr_e));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input prob_t got, input real expv, input string what);
    real g = real'(got) / 4096.0;
    checks++;
    if (g - expv > 0.002 || expv - g > 0.002) begin
      failures++;
      $display("FAIL %s: px=%0d py=%0d got %f expected %f", what, px, py, g, expv);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      real a, b;
      px = prob_t'(1 + $urandom_range(4094));
      py = prob_t'(1 + $urandom_range(4094));
      #1;
      a = real'(px) / 4096.0;
      b = real'(py) / 4096.0;
      near(pz_c, a * (1.0 - b) + (1.0 - a) * b, "check");
      near(pz_e, a * b / (a * b + (1.0 - a) * (1.0 - b)), "equality");
    end
    test = 1;
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 4; v++) begin
        logic [1:0] exp;
        err = e[0];
        {tx, ty} = 2'(v);
        #1;
        // Table 5.1: Vout = X xor Y, Vout_n its complement.
        exp = err ? 2'b10 : ((v == 1 || v == 2) ? 2'b10 : 2'b01);
        checks++;
        if (tr_c !== {exp, exp} || tr_e !== exp) begin
          failures++;
          $display("FAIL test xy=%b err=%b: %b %b expected %b", {tx, ty}, err, tr_c, tr_e, exp);
        end
      end
    test = 0; #1;
    checks++;
    if (tr_c !== 4'b0 || tr_e !== 2'b0) begin failures++; $display("FAIL pairs in decode mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
