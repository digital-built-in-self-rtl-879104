// node3: behavioural model of a bi-directional three-edge node built from
// three unidirectional sum-product nodes (CHECK3_1NG, CHECK3_2NG, EQUALITY3,
// EQUALITY3_NG).
//
// Each edge k has an incoming message pin<k> and an outgoing message
// pout<k>; following the extrinsic rule, pout<k> is computed by
// unidirectional node k from the two other incoming messages.
//
// In test mode the three unidirectional nodes are separated and each acts as
// a differential XOR of the broadcast test bits; their output pairs form the
// node's test-result group tresp, read by the decoder BIST.  EXTRA (0, 1 or 2)
// is the number of unidirectional nodes that carry an extra diode-connected
// output pair, so the group holds 3+EXTRA pairs: 6, 8 or 10 bits.  HAS_ERR
// gives unidirectional node 0 the error-injection switch driven by err.
//
// Combinational; no clock.  Which unidirectional nodes carry the extra pairs
// and the error switch is this model's choice.
module node3
  import hamming_pkg::*;
#(
  parameter bit IS_CHECK = 1'b1,
  parameter int EXTRA    = 0,
  parameter bit HAS_ERR  = 1'b0
) (
  input  logic                   test,
  input  logic                   tx,
  input  logic                   ty,
  input  logic                   err,
  input  prob_t                  pin0,
  input  prob_t                  pin1,
  input  prob_t                  pin2,
  output prob_t                  pout0,
  output prob_t                  pout1,
  output prob_t                  pout2,
  output logic [2*(3+EXTRA)-1:0] tresp
);

  localparam int NP0 = (EXTRA >= 1) ? 2 : 1;
  localparam int NP1 = (EXTRA >= 2) ? 2 : 1;

  logic [2*NP0-1:0] r0;
  logic [2*NP1-1:0] r1;
  logic [1:0]       r2;

  sp_node #(.IS_CHECK(IS_CHECK), .NPAIR(NP0)) u0 (
    .test, .tx, .ty, .err(HAS_ERR ? err : 1'b0),
    .px(pin1), .py(pin2), .pz(pout0), .tresp(r0));

  sp_node #(.IS_CHECK(IS_CHECK), .NPAIR(NP1)) u1 (
    .test, .tx, .ty, .err(1'b0),
    .px(pin2), .py(pin0), .pz(pout1), .tresp(r1));

  sp_node #(.IS_CHECK(IS_CHECK), .NPAIR(1)) u2 (
    .test, .tx, .ty, .err(1'b0),
    .px(pin0), .py(pin1), .pz(pout2), .tresp(r2));

  assign tresp = {r2, r1, r0};

endmodule
