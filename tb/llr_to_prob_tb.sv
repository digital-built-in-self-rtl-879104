// llr_to_prob_tb: sweeps Vin - Vref over the whole code range and compares
// the probability code with the differential-pair law
// p1 = 1 / (1 + 2**((Vin - Vref)/16)) evaluated in floating point (tolerance
// 2% of full scale for the piecewise-linear exponential), and checks that
// equal inputs give 0.5, that p(d) + p(-d) = 1 and that p1 falls as Vin rises.
module llr_to_prob_tb;
  import hamming_pkg::*;

  volt_t vin, vref;
  prob_t p1;
  int checks = 0, failures = 0;

  llr_to_prob dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prob_t last;
    vref = 8'd128;
    last = 12'hfff;
    for (int v = 0; v < 256; v++) begin
      real expv, g;
      vin = volt_t'(v);
      #1;
      expv = 1.0 / (1.0 + 2.0 ** ((real'(v) - 128.0) / 16.0));
      g = real'(p1) / 4096.0;
      checks++;
      if (g - expv > 0.02 || expv - g > 0.02) begin
        failures++; $display("FAIL vin=%0d: %f expected %f", v, g, expv);
      end
      checks++;
      if (p1 > last) begin failures++; $display("FAIL not monotonic at vin=%0d", v); end
      last = p1;
    end
    for (int n = 0; n < 200; n++) begin
      prob_t a;
      vin = volt_t'($urandom_range(255));
      vref = volt_t'($urandom_range(255));
      #1 a = p1;
      {vin, vref} = {vref, vin};
      #1;
      checks++;
      if (32'(a) + 32'(p1) != 32'd4096 && !(a == 12'd4095 && p1 == 12'd1) && !(a == 12'd1 && p1 == 12'd4095)) begin
        failures++; $display("FAIL symmetry %0d + %0d", a, p1);
      end
    end
    vin = 8'd77; vref = 8'd77; #1;
    checks++;
    if (p1 != 12'd2048) begin failures++; $display("FAIL equal inputs give %0d", p1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
