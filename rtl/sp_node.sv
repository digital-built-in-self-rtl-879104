// sp_node: behavioural model of one unidirectional sum-product node, the
// Gilbert-multiplier circuit that every node of the decoder core is built
// from (CHECK1, CHECK1_NG, EQUALITY1, EQUALITY1_NG, EQUALITY1_IOUT).
//
// Decoding mode (test = 0): the node takes the probability codes of its two
// inputs X and Y and produces the normalised output Z:
//   check node     p1(Z) = p0(X)p1(Y) + p1(X)p0(Y)
//   equality node  p1(Z) = p1(X)p1(Y) / (p0(X)p0(Y) + p1(X)p1(Y))
// The analog circuit settles continuously; here the output is combinational.
//
// Test mode (test = 1): the bias and reference voltages are switched to the
// rails and the transmission-gate switches cut the node off from its
// neighbours and feed it the digital test bits tx and ty.  Both node types
// then behave as a static differential XOR gate (the equality node is turned
// into a check-node topology by four extra transistors), giving the pair
// {Vout, Vout_n} = {tx^ty, ~(tx^ty)}.  NG variants have an extra pair of
// diode-connected output transistors, observed as a second copy of the pair.
// In decoding mode the test pairs read 0.
//
// Error injection (this model's reading of the extra switch in CHECK3_1NG and
// EQUALITY3): with err = 1 in test mode the output pair is stuck at {1, 0},
// which a good response contradicts for XY = 00 and XY = 11.
//
// Parameters: IS_CHECK selects check or equality; NPAIR is 1 or 2.
// The output is combinational; no clock.
module sp_node
  import hamming_pkg::*;
#(
  parameter bit IS_CHECK = 1'b1,
  parameter int NPAIR    = 1
) (
  input  logic               test,
  input  logic               tx,
  input  logic               ty,
  input  logic               err,
  input  prob_t              px,
  input  prob_t              py,
  output prob_t              pz,
  output logic [2*NPAIR-1:0] tresp
);

  logic v;

  always_comb begin
    pz = IS_CHECK ? chk_combine(px, py) : eq_combine(px, py);
    v  = tx ^ ty;
    for (int k = 0; k < NPAIR; k++) begin
      if (!test)    tresp[2*k +: 2] = 2'b00;
      else if (err) tresp[2*k +: 2] = 2'b10;
      else          tresp[2*k +: 2] = {v, ~v};
    end
  end

endmodule
