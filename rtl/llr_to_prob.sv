// llr_to_prob: behavioural model of the differential pair that turns a held
// LLR voltage pair (Vin, Vref) into a pair of probability currents.
//
// The pair's currents are I0 = a*exp((Vin-Vs)/UT') and I1 = a*exp((Vref-Vs)/UT'),
// so p1 = I1/(I0+I1) = 1 / (1 + exp((Vin-Vref)/K)): a higher Vin favours bit 0.
// The model takes K as 16 voltage codes per factor of two (exp replaced by a
// power of two, which only rescales the LLR) and evaluates
//   2**(d/16) ~ (16 + d%16) / 16 * 2**(d/16 rounded down)
// with d = |Vin - Vref|, i.e. a piecewise-linear exponential.  The result is
// the probability code p1 (see hamming_pkg), clipped to [PMIN, PMAX].
// Combinational; no clock.  The scale factor and the approximation are this
// model's choices.
module llr_to_prob
  import hamming_pkg::*;
(
  input  volt_t vin,
  input  volt_t vref,
  output prob_t p1
);

  logic signed [VW:0] d;
  logic [VW-1:0]      a;
  logic [31:0]        r;
  logic [31:0]        ps;

  always_comb begin
    d  = $signed({1'b0, vin}) - $signed({1'b0, vref});
    a  = d[VW] ? VW'(-d) : VW'(d);
    r  = (32'd16 + 32'(a[3:0])) << a[VW-1:4];
    ps = (32'd16 * 32'(IU)) / (32'd16 + r);
    p1 = d[VW] ? clip(wide_t'(IU) - wide_t'(ps)) : clip(wide_t'(ps));
  end

endmodule
