// node3_tb: checks the three-edge node's extrinsic outputs (each outgoing
// message from the other two incoming ones, computed in floating point) for a
// check and an equality variant, and the size and contents of their
// test-result groups, including the error switch on unidirectional node 0.
module node3_tb;
  import hamming_pkg::*;

  logic  test = 0, tx = 0, ty = 0, err = 0;
  prob_t i0, i1, i2, c0, c1, c2, e0, e1, e2;
  logic [9:0] tr_c;
  logic [5:0] tr_e;
  int checks = 0, failures = 0;

  node3 #(.IS_CHECK(1'b1), .EXTRA(2), .HAS_ERR(1'b1)) u_c (
    .test, .tx, .ty, .err, .pin0(i0), .pin1(i1), .pin2(i2),
    .pout0(c0), .pout1(c1), .pout2(c2), .tresp(tr_c));
  node3 #(.IS_CHECK(1'b0), .EXTRA(0), .HAS_ERR(1'b1)) u_e (
    .test, .tx, .ty, .err, .pin0(i0), .pin1(i1), .pin2(i2),
    .pout0(e0), .pout1(e1), .pout2(e2), .tresp(tr_e));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real xr(real a, real b);
    return a * (1.0 - b) + (1.0 - a) * b;
  endfunction
  function automatic real er(real a, real b);
    return a * b / (a * b + (1.0 - a) * (1.0 - b));
  endfunction

  task automatic near(input prob_t got, input real expv, input string what);
    real g = real'(got) / 4096.0;
    checks++;
    if (g - expv > 0.002 || expv - g > 0.002) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, g, expv);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      real a, b, c;
      i0 = prob_t'(1 + $urandom_range(4094));
      i1 = prob_t'(1 + $urandom_range(4094));
      i2 = prob_t'(1 + $urandom_range(4094));
      #1;
      a = real'(i0) / 4096.0; b = real'(i1) / 4096.0; c = real'(i2) / 4096.0;
      near(c0, xr(b, c), "check out0");
      near(c1, xr(c, a), "check out1");
      near(c2, xr(a, b), "check out2");
      near(e0, er(b, c), "eq out0");
      near(e1, er(c, a), "eq out1");
      near(e2, er(a, b), "eq out2");
    end
    test = 1;
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 4; v++) begin
        logic [1:0] p, f;
        logic [9:0] exp_c;
        logic [5:0] exp_e;
        err = e[0];
        {tx, ty} = 2'(v);
        #1;
        p = (tx ^ ty) ? 2'b10 : 2'b01;
        f = err ? 2'b10 : p;
        exp_c = {p, p, p, f, f};   // node 0 and node 1 carry two pairs
        exp_e = {p, p, f};
        checks++;
        if (tr_c !== exp_c || tr_e !== exp_e) begin
          failures++;
          $display("FAIL test xy=%b err=%b: %b %b", {tx, ty}, err, tr_c, tr_e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
