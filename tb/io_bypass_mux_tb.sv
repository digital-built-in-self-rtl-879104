// io_bypass_mux_tb: random data on all inputs; the comparators must see the
// core outputs in decoding mode and the first or last four converted inputs
// in I/O test mode.
module io_bypass_mux_tb;
  import hamming_pkg::*;

  logic  test, sel_last;
  prob_t y [K], p_in [N], to_cmp [K];
  int checks = 0, failures = 0;

  io_bypass_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < K; i++) y[i] = prob_t'($urandom);
      for (int i = 0; i < N; i++) p_in[i] = prob_t'($urandom);
      {test, sel_last} = 2'(n % 4);
      #1;
      for (int i = 0; i < K; i++) begin
        prob_t e;
        e = !test ? y[i] : (sel_last ? p_in[i + 4] : p_in[i]);
        checks++;
        if (to_cmp[i] !== e) begin failures++; $display("FAIL n=%0d i=%0d", n, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
