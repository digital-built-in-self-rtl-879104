// equality5: behavioural model of the five-edge equality node EQUALITY5, made
// of three three-edge equality nodes in a chain: two EQUALITY3_NG (nodes A and
// B) and one EQUALITY3 (node C, with the ERR2 error-injection switch).
//
// External edges: [0] and [1] on node A, [2] on node B, [3] and [4] on node C.
// Every outgoing message is the normalised product of the other four incoming
// messages.  In the decoder edge 0 carries the channel (intrinsic) message and
// edges 1..4 the four check nodes.  In test mode the internal edges are cut
// and the three nodes report their result groups: resp_a and resp_b (8 bits)
// and resp_c (6 bits).  Combinational; no clock.
module equality5
  import hamming_pkg::*;
(
  input  logic  test,
  input  logic  tx,
  input  logic  ty,
  input  logic  err2,
  input  prob_t e_in  [5],
  output prob_t e_out [5],
  output logic [7:0] resp_a,
  output logic [7:0] resp_b,
  output logic [5:0] resp_c
);

  prob_t ab, ba, bc, cb;   // internal edges A-B and B-C, both directions

  node3 #(.IS_CHECK(1'b0), .EXTRA(1), .HAS_ERR(1'b0)) u_a (
    .test, .tx, .ty, .err(1'b0),
    .pin0(e_in[0]), .pin1(e_in[1]), .pin2(ba),
    .pout0(e_out[0]), .pout1(e_out[1]), .pout2(ab), .tresp(resp_a));

  node3 #(.IS_CHECK(1'b0), .EXTRA(1), .HAS_ERR(1'b0)) u_b (
    .test, .tx, .ty, .err(1'b0),
    .pin0(ab), .pin1(e_in[2]), .pin2(cb),
    .pout0(ba), .pout1(e_out[2]), .pout2(bc), .tresp(resp_b));

  node3 #(.IS_CHECK(1'b0), .EXTRA(0), .HAS_ERR(1'b1)) u_c (
    .test, .tx, .ty, .err(err2),
    .pin0(bc), .pin1(e_in[3]), .pin2(e_in[4]),
    .pout0(cb), .pout1(e_out[3]), .pout2(e_out[4]), .tresp(resp_c));

endmodule
