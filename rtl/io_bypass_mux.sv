// io_bypass_mux: the transmission-gate switches between the input interface,
// the decoder core and the comparators.
//
// In decoding mode (test = 0) the four comparators see the core's soft
// outputs y.  In I/O self-test mode the core is bypassed: the converted
// probabilities of either the first four (sel_last = 0) or the last four
// (sel_last = 1) sample-and-hold cells go straight to the comparators, since
// there are eight cells but only four comparators.  Combinational.
module io_bypass_mux
  import hamming_pkg::*;
(
  input  logic  test,
  input  logic  sel_last,
  input  prob_t y      [K],
  input  prob_t p_in   [N],
  output prob_t to_cmp [K]
);

  always_comb begin
    for (int i = 0; i < K; i++)
      to_cmp[i] = !test ? y[i] : (sel_last ? p_in[K + i] : p_in[i]);
  end

endmodule
